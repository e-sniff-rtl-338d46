// tb_ps2_rx: self-checking test of the PS/2 frame receiver.
// A keyboard model sends random bytes, then frames with a bad start, parity
// or stop bit; good frames must be delivered with the right data, bad ones
// flagged and dropped. A half-sent frame followed by silence must be
// discarded by the time-out so the next frame is received intact.
module tb_ps2_rx;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ps2_clk, ps2_data, valid, ferr;
  logic [7:0] data;
  ps2_dev_model #(.HALF(20)) u_dev (.clk, .present(1'b1), .host_clk_oe(1'b0),
                                    .host_data_oe(1'b0), .ps2_clk, .ps2_data);
  ps2_rx #(.IDLE_CYCLES(200)) dut (.clk, .rst_n, .en(1'b1), .ps2_clk_i(ps2_clk),
                                   .ps2_data_i(ps2_data), .data_valid(valid),
                                   .data, .frame_err(ferr));

  int n_valid = 0, n_err = 0;
  logic [7:0] last;
  always @(posedge clk) if (rst_n) begin
    if (valid) begin n_valid++; last = data; end
    if (ferr) n_err++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    for (int i = 0; i < 20; i++) begin
      automatic logic [7:0] b = 8'($urandom);
      automatic int nv = n_valid;
      u_dev.send_byte(b);
      check(n_valid == nv + 1 && last == b, $sformatf("byte %02h received as %02h", b, last));
    end
    check(n_err == 0, "no errors on good frames");
    u_dev.send_byte(8'h5A, 0, 1, 0);
    check(n_err == 1, "bad parity flagged");
    u_dev.send_byte(8'h5A, 0, 0, 1);
    check(n_err == 2, "bad stop flagged");
    u_dev.send_byte(8'h5A, 1, 0, 0);
    check(n_err == 3, "bad start flagged");
    check(n_valid == 20, "bad frames not delivered");
    // three clock pulses then silence: the time-out must discard them
    repeat (3) begin
      u_dev.dclk_low = 1; repeat (20) @(posedge clk);
      u_dev.dclk_low = 0; repeat (20) @(posedge clk);
    end
    repeat (400) @(posedge clk);
    u_dev.send_byte(8'hC3);
    check(n_valid == 21 && last == 8'hC3, "frame after time-out received");
    check(n_err == 3, "no error from the aborted frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
