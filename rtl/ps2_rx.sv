// ps2_rx: PS/2 device-to-host frame receiver.
//
// A PS/2 keyboard sends 11-bit frames: a start bit (0), eight data bits LSB
// first, an odd parity bit and a stop bit (1), each valid on the falling edge
// of the keyboard-driven clock. As the design description asks, the bits are
// collected by a shift register, and frames with a bad start, stop or parity
// bit are flagged and not delivered.
//
// How it works: both PS/2 lines pass through two-flop synchronisers; a falling
// edge of the synchronised clock shifts the data line into an 11-bit register
// and counts the bit. After the eleventh bit the frame is checked. If no clock
// edge arrives for IDLE_CYCLES while a frame is half received, the frame is
// dropped (resynchronisation after a glitch or an unplugged keyboard). While
// en is low (the transmitter owns the bus) the receiver is held idle.
//
// Interface/timing: data_valid or frame_err pulses for one clock, three
// clocks after the stop bit's falling edge reaches the pins.
// Own choices: the synchroniser depth, the time-out, no glitch filter.
module ps2_rx #(
  parameter int unsigned IDLE_CYCLES = 20_000   // 200 us at 100 MHz
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       ps2_clk_i,
  input  logic       ps2_data_i,
  output logic       data_valid,
  output logic [7:0] data,
  output logic       frame_err
);

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

  localparam int unsigned TW = $clog2(IDLE_CYCLES + 1);
  logic [9:0]    shreg;    // bits 0..9 of the frame, bit 10 is on the line
  logic [3:0]    nbits;
  logic [TW-1:0] idle;

  // frame as received: [0] = start, [8:1] = data, [9] = parity, [10] = stop
  logic [10:0] frame;
  logic        frame_ok;
  assign frame    = {dat_sync[1], shreg};
  assign frame_ok = (frame[0] == 1'b0) && (frame[10] == 1'b1) && (^frame[9:1] == 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg      <= '0;
      nbits      <= '0;
      idle       <= '0;
      data_valid <= 1'b0;
      frame_err  <= 1'b0;
      data       <= '0;
    end else begin
      data_valid <= 1'b0;
      frame_err  <= 1'b0;
      if (!en) begin
        nbits <= '0;
        idle  <= '0;
      end else if (fall) begin
        idle  <= '0;
        shreg <= {dat_sync[1], shreg[9:1]};
        if (nbits == 4'd10) begin
          nbits <= '0;
          if (frame_ok) begin
            data_valid <= 1'b1;
            data       <= frame[8:1];
          end else begin
            frame_err  <= 1'b1;
          end
        end else begin
          nbits <= nbits + 1'b1;
        end
      end else if (nbits != '0) begin
        if (idle == TW'(IDLE_CYCLES)) begin
          nbits <= '0;
          idle  <= '0;
        end else begin
          idle <= idle + 1'b1;
        end
      end
    end
  end

endmodule
