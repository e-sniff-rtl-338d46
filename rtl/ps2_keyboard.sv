// ps2_keyboard: PS/2 keyboard driver of the sniffer's user interface.
//
// Collects what the user types into the one-line keyboard partition of video
// memory and hands the finished line to the processor. Following the design
// description it
//   * reads scan codes with a shift register receiver (ps2_rx) that drops
//     frames with a bad start, parity or stop bit,
//   * translates them to ASCII (ps2_keymap),
//   * writes each character into the input line, one character per clock,
//   * raises a two-clock interrupt pulse (enter_irq) when Enter is pressed,
//   * can send an arbitrary code to the keyboard (ps2_tx, cmd_* port), and
//   * checks at boot whether a keyboard is connected; if none answers it
//     raises auto_start, telling the processor to start capturing with the
//     default settings.
//
// Boot check (own choice of method): after reset the driver sends the
// keyboard reset command 0xFF. A keyboard acknowledges with 0xFA and reports
// its self test with 0xAA. If 0xAA arrives within DETECT_CYCLES, kbd_present
// is set; if the transmission fails or the time runs out, auto_start is set.
// Both are levels that hold until the next reset.
//
// Line editing (own choices): printable characters go at the cursor, which
// then advances (characters past LINE_CHARS are dropped); Backspace moves the
// cursor back and blanks that cell; Enter fires enter_irq and locks the line
// so that it stays intact while the processor reads it. The processor unlocks
// it by clearing the line in video memory, which pulses line_clr here and
// returns the cursor to column 0.
//
// Ports: the PS/2 pins are open-collector: *_oe high pulls the line low.
// cmd_valid/cmd_ready is a valid/ready handshake; cmd_done pulses when the
// byte has been sent, with cmd_err if the keyboard did not acknowledge it.
module ps2_keyboard
  import esniff_pkg::*;
#(
  parameter int unsigned LINE_CHARS     = LINE_LEN,
  parameter int unsigned IDLE_CYCLES    = 20_000,       // rx frame time-out
  parameter int unsigned INHIBIT_CYCLES = 12_000,       // tx clock inhibit
  parameter int unsigned WAIT_CYCLES    = 2_000_000,    // tx: no clock from keyboard
  parameter int unsigned DETECT_CYCLES  = 100_000_000   // boot: wait for 0xAA (1 s)
) (
  input  logic             clk,
  input  logic             rst_n,
  // PS/2 pins
  input  logic             ps2_clk_i,
  input  logic             ps2_data_i,
  output logic             ps2_clk_oe,
  output logic             ps2_data_oe,
  // processor: send a code to the keyboard
  input  logic             cmd_valid,
  input  logic [7:0]       cmd_data,
  output logic             cmd_ready,
  output logic             cmd_done,
  output logic             cmd_err,
  // processor: status and interrupt
  output logic             enter_irq,
  output logic             kbd_present,
  output logic             auto_start,
  output logic             frame_err,
  // keyboard line in video memory
  output logic             line_we,
  output logic [COL_W-1:0] line_col,
  output logic [7:0]       line_char,
  input  logic             line_clr
);

  // ---------------- receiver, transmitter, translator ----------------
  logic       tx_busy, tx_done, tx_err, tx_start;
  logic [7:0] tx_byte;
  logic       rx_valid;
  logic [7:0] rx_data;

  ps2_rx #(.IDLE_CYCLES(IDLE_CYCLES)) u_rx (
    .clk, .rst_n,
    .en        (!tx_busy),
    .ps2_clk_i, .ps2_data_i,
    .data_valid(rx_valid),
    .data      (rx_data),
    .frame_err (frame_err)
  );

  ps2_tx #(.INHIBIT_CYCLES(INHIBIT_CYCLES), .WAIT_CYCLES(WAIT_CYCLES)) u_tx (
    .clk, .rst_n,
    .start     (tx_start),
    .byte_in   (tx_byte),
    .ps2_clk_i, .ps2_data_i,
    .clk_oe    (ps2_clk_oe),
    .data_oe   (ps2_data_oe),
    .busy      (tx_busy),
    .done      (tx_done),
    .err       (tx_err)
  );

  typedef enum logic [2:0] {B_SEND, B_WAIT_TX, B_WAIT_BAT, B_RUN} boot_t;
  boot_t boot;

  logic       km_valid;
  logic [7:0] km_ascii;
  ps2_keymap u_map (
    .clk, .rst_n,
    .code_valid (rx_valid && boot == B_RUN),
    .code       (rx_data),
    .ascii_valid(km_valid),
    .ascii      (km_ascii)
  );

  // ---------------- boot check and command path ----------------
  localparam int unsigned DW = $clog2(DETECT_CYCLES + 1);
  logic [DW-1:0] det_cnt;
  logic          cmd_busy;   // a processor command is in flight

  assign cmd_ready = (boot == B_RUN) && !tx_busy && !cmd_busy;
  assign tx_start  = (boot == B_SEND) || (cmd_valid && cmd_ready);
  assign tx_byte   = (boot == B_SEND) ? PS2_CMD_RESET : cmd_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      boot        <= B_SEND;
      det_cnt     <= '0;
      kbd_present <= 1'b0;
      auto_start  <= 1'b0;
      cmd_busy    <= 1'b0;
      cmd_done    <= 1'b0;
      cmd_err     <= 1'b0;
    end else begin
      cmd_done <= 1'b0;
      unique case (boot)
        B_SEND:    boot <= B_WAIT_TX;
        B_WAIT_TX: if (tx_done) begin
                     det_cnt <= '0;
                     if (tx_err) begin
                       auto_start <= 1'b1;
                       boot       <= B_RUN;
                     end else begin
                       boot <= B_WAIT_BAT;
                     end
                   end
        B_WAIT_BAT: begin
                     if (rx_valid && rx_data == PS2_BAT_OK) begin
                       kbd_present <= 1'b1;
                       boot        <= B_RUN;
                     end else if (det_cnt == DW'(DETECT_CYCLES)) begin
                       auto_start <= 1'b1;
                       boot       <= B_RUN;
                     end else begin
                       det_cnt <= det_cnt + 1'b1;
                     end
                   end
        B_RUN: begin
                     if (cmd_valid && cmd_ready) cmd_busy <= 1'b1;
                     if (cmd_busy && tx_done) begin
                       cmd_busy <= 1'b0;
                       cmd_done <= 1'b1;
                       cmd_err  <= tx_err;
                     end
                   end
        default:   boot <= B_RUN;
      endcase
    end
  end

  // ---------------- line editor ----------------
  localparam int unsigned CURW = $clog2(LINE_CHARS + 1);
  logic [CURW-1:0] cursor;
  logic            locked;
  logic [1:0]      irq_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cursor    <= '0;
      locked    <= 1'b0;
      line_we   <= 1'b0;
      line_col  <= '0;
      line_char <= ASCII_SPACE;
      irq_cnt   <= '0;
    end else begin
      line_we <= 1'b0;
      if (irq_cnt != '0) irq_cnt <= irq_cnt - 1'b1;
      if (line_clr) begin
        cursor <= '0;
        locked <= 1'b0;
      end else if (km_valid && !locked) begin
        if (km_ascii == ASCII_CR) begin
          locked  <= 1'b1;
          irq_cnt <= 2'd2;
        end else if (km_ascii == ASCII_BS) begin
          if (cursor != '0) begin
            cursor    <= cursor - 1'b1;
            line_we   <= 1'b1;
            line_col  <= COL_W'(cursor - 1'b1);
            line_char <= ASCII_SPACE;
          end
        end else if (cursor < CURW'(LINE_CHARS)) begin
          cursor    <= cursor + 1'b1;
          line_we   <= 1'b1;
          line_col  <= COL_W'(cursor);
          line_char <= km_ascii;
        end
      end
    end
  end

  assign enter_irq = (irq_cnt != '0);

endmodule
