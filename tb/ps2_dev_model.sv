// ps2_dev_model: behavioural model of a PS/2 keyboard, for testbenches only.
//
// Drives the open-collector PS/2 clock and data lines together with the
// host's pull-downs (host_*_oe). send_byte() transmits one device-to-host
// frame, optionally with a bad start, parity or stop bit. When the host
// requests to send (data pulled low, clock released) the model clocks the
// byte in, acknowledges it, records it in rx_log, and, if present, answers a
// reset command (0xFF) with 0xFA then 0xAA and any other command with 0xFA.
// With present low the model never drives the lines (no keyboard plugged in).
// HALF is half a PS/2 clock period in system clocks.
module ps2_dev_model #(
  parameter int HALF = 20
) (
  input  logic clk,
  input  logic present,
  input  logic host_clk_oe,
  input  logic host_data_oe,
  output logic ps2_clk,
  output logic ps2_data
);
  logic dclk_low = 1'b0;
  logic ddat_low = 1'b0;
  bit   busy = 1'b0;
  int   rx_count = 0;
  int   rx_bad   = 0;
  logic [7:0] rx_log [64];

  assign ps2_clk  = !(host_clk_oe  | dclk_low);
  assign ps2_data = !(host_data_oe | ddat_low);

  task automatic wait_clks(input int n);
    repeat (n) @(posedge clk);
  endtask

  task automatic send_byte(input logic [7:0] b, input bit bad_start = 0,
                           input bit bad_parity = 0, input bit bad_stop = 0);
    logic [10:0] f;
    while (busy) @(posedge clk);
    busy = 1'b1;
    f = {~bad_stop, (~^b) ^ bad_parity, b, bad_start};
    for (int i = 0; i < 11; i++) begin
      ddat_low = ~f[i];
      wait_clks(HALF);
      dclk_low = 1'b1;
      wait_clks(HALF);
      dclk_low = 1'b0;
    end
    ddat_low = 1'b0;
    wait_clks(2 * HALF);
    busy = 1'b0;
  endtask

  // host-to-device reception
  initial begin
    logic [9:0] bits;
    forever begin
      @(posedge clk);
      if (present && !busy && host_data_oe && !host_clk_oe) begin
        busy = 1'b1;
        wait_clks(HALF);
        for (int k = 0; k < 10; k++) begin
          dclk_low = 1'b1;
          wait_clks(HALF);
          dclk_low = 1'b0;
          bits[k] = ps2_data;
          wait_clks(HALF);
        end
        ddat_low = 1'b1;               // acknowledge
        dclk_low = 1'b1;
        wait_clks(HALF);
        dclk_low = 1'b0;
        wait_clks(HALF);
        ddat_low = 1'b0;
        if ((^bits[8:0]) != 1'b1 || bits[9] != 1'b1) rx_bad++;
        rx_log[rx_count % 64] = bits[7:0];
        rx_count++;
        wait_clks(4 * HALF);
        busy = 1'b0;
        if (bits[7:0] == 8'hFF) begin
          send_byte(8'hFA);
          send_byte(8'hAA);
        end else begin
          send_byte(8'hFA);
        end
      end
    end
  end

endmodule
