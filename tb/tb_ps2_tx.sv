// tb_ps2_tx: self-checking test of the PS/2 host-to-device transmitter.
// Sends random bytes to a keyboard model and checks the byte and parity the
// model clocked in, the acknowledge, and the length of the clock inhibit.
// With no keyboard attached the transfer must end with err after the wait
// time-out.
module tb_ps2_tx;
  localparam int INH = 300, WAITC = 2000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ps2_clk, ps2_data, clk_oe, data_oe, busy, done, err, start = 0, present = 1;
  logic [7:0] byte_in = 0;
  ps2_dev_model #(.HALF(20)) u_dev (.clk, .present, .host_clk_oe(clk_oe),
                                    .host_data_oe(data_oe), .ps2_clk, .ps2_data);
  ps2_tx #(.INHIBIT_CYCLES(INH), .WAIT_CYCLES(WAITC)) dut (
    .clk, .rst_n, .start, .byte_in, .ps2_clk_i(ps2_clk), .ps2_data_i(ps2_data),
    .clk_oe, .data_oe, .busy, .done, .err);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int inh_len = 0, inh_max = 0;
  always @(posedge clk) begin
    if (clk_oe) inh_len++;
    else begin if (inh_len > inh_max) inh_max = inh_len; inh_len = 0; end
  end

  task automatic send(input logic [7:0] b, output bit e);
    @(posedge clk);
    while (busy) @(posedge clk);
    byte_in <= b; start <= 1;
    @(posedge clk);
    start <= 0;
    do @(posedge clk); while (!done);
    e = err;
  endtask

  initial begin
    bit e;
    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 12; i++) begin
      automatic logic [7:0] b = (i == 0) ? 8'hED : 8'($urandom);
      automatic int n = u_dev.rx_count;
      inh_max = 0;
      send(b, e);
      check(!e, "acknowledged");
      repeat (100) @(posedge clk);
      check(u_dev.rx_count == n + 1 && u_dev.rx_log[n % 64] == b,
            $sformatf("keyboard got %02h, sent %02h", u_dev.rx_log[n % 64], b));
      check(inh_max == INH, $sformatf("clock inhibit %0d cycles", inh_max));
      wait (!u_dev.busy);                 // let the model answer 0xFA
      repeat (50) @(posedge clk);
    end
    check(u_dev.rx_bad == 0, "parity and stop bits correct");
    present = 0;
    repeat (10) @(posedge clk);
    begin
      int t0, t1;
      t0 = $time / 10;
      send(8'h55, e);
      t1 = $time / 10;
      check(e, "no keyboard: err");
      check(t1 - t0 >= INH + WAITC && t1 - t0 < INH + WAITC + 20, $sformatf("time-out after %0d", t1 - t0));
      check(!clk_oe && !data_oe, "lines released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
