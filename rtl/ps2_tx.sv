// ps2_tx: PS/2 host-to-device transmitter.
//
// Sends one byte to the keyboard, which the design description requires so
// that arbitrary codes (reset, LED settings, ...) can be sent. The PS/2 lines
// are open-collector: this block only pulls a line low (clk_oe / data_oe high)
// or releases it.
//
// Sequence (standard PS/2 host-to-device protocol):
//   1. pull the clock low for INHIBIT_CYCLES (at least 100 us),
//   2. pull data low (start bit) and release the clock,
//   3. the keyboard now generates the clock; on each of its falling edges the
//      next bit is put on the data line: 8 data bits LSB first, odd parity,
//      then the data line is released for the stop bit,
//   4. on the eleventh falling edge the keyboard acknowledges by holding data
//      low; done pulses, with err set if the acknowledge was missing.
// If the keyboard produces no clock edge for WAIT_CYCLES the transfer is
// abandoned with err (no keyboard attached).
//
// Interface: start with byte_in is accepted when busy is low. done pulses for
// one clock at the end; err is valid with done.
module ps2_tx #(
  parameter int unsigned INHIBIT_CYCLES = 12_000,     // 120 us at 100 MHz
  parameter int unsigned WAIT_CYCLES    = 2_000_000   // 20 ms at 100 MHz
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] byte_in,
  input  logic       ps2_clk_i,
  input  logic       ps2_data_i,
  output logic       clk_oe,
  output logic       data_oe,
  output logic       busy,
  output logic       done,
  output logic       err
);

  typedef enum logic [1:0] {IDLE, INHIBIT, SEND, ACK} state_t;
  state_t state;

  logic [2:0] clk_sync;
  logic [1:0] dat_sync;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clk_sync <= '1;
      dat_sync <= '1;
    end else begin
      clk_sync <= {clk_sync[1:0], ps2_clk_i};
      dat_sync <= {dat_sync[0], ps2_data_i};
    end
  end
  logic fall;
  assign fall = clk_sync[2] & ~clk_sync[1];

  localparam int unsigned CW = $clog2(((INHIBIT_CYCLES > WAIT_CYCLES) ? INHIBIT_CYCLES : WAIT_CYCLES) + 1);
  logic [CW-1:0] cnt;
  logic [8:0]    shreg;   // {parity, data}
  logic [3:0]    nbits;

  assign busy = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      cnt     <= '0;
      shreg   <= '0;
      nbits   <= '0;
      clk_oe  <= 1'b0;
      data_oe <= 1'b0;
      done    <= 1'b0;
      err     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: begin
          if (start) begin
            shreg  <= {~^byte_in, byte_in};
            cnt    <= '0;
            nbits  <= '0;
            clk_oe <= 1'b1;
            state  <= INHIBIT;
          end
        end
        INHIBIT: begin
          if (cnt == CW'(INHIBIT_CYCLES - 1)) begin
            data_oe <= 1'b1;          // start bit
            clk_oe  <= 1'b0;
            cnt     <= '0;
            state   <= SEND;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        SEND: begin
          if (fall) begin
            cnt <= '0;
            if (nbits == 4'd9) begin
              data_oe <= 1'b0;        // release for the stop bit
              state   <= ACK;
            end else begin
              data_oe <= ~shreg[0];
              shreg   <= {1'b0, shreg[8:1]};
              nbits   <= nbits + 1'b1;
            end
          end else if (cnt == CW'(WAIT_CYCLES)) begin
            data_oe <= 1'b0;
            err     <= 1'b1;
            done    <= 1'b1;
            state   <= IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        ACK: begin
          if (fall) begin
            err   <= dat_sync[1];     // acknowledge = data held low
            done  <= 1'b1;
            state <= IDLE;
          end else if (cnt == CW'(WAIT_CYCLES)) begin
            err   <= 1'b1;
            done  <= 1'b1;
            state <= IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
