// tb_ps2_keyboard: self-checking test of the PS/2 keyboard driver.
// Two drivers run side by side: one with a keyboard model attached, one with
// nothing attached. Checked: the boot-time reset/self-test exchange and the
// resulting kbd_present / auto_start, typing into the line (one write per
// character), Shift, Backspace, a frame with bad parity being ignored, the
// two-clock Enter interrupt, the line lock until the processor clears it,
// and sending a code to the keyboard through the command port.
module tb_ps2_keyboard;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // driver A: keyboard attached
  logic a_clk, a_dat, a_clk_oe, a_dat_oe;
  logic cmd_valid = 0, cmd_ready, cmd_done, cmd_err, irq, present, auto_start, ferr;
  logic [7:0] cmd_data = 0;
  logic line_we, line_clr = 0;
  logic [6:0] line_col;
  logic [7:0] line_char;
  ps2_dev_model #(.HALF(20)) u_dev (.clk, .present(1'b1), .host_clk_oe(a_clk_oe),
                                    .host_data_oe(a_dat_oe), .ps2_clk(a_clk), .ps2_data(a_dat));
  ps2_keyboard #(.IDLE_CYCLES(500), .INHIBIT_CYCLES(200), .WAIT_CYCLES(3000), .DETECT_CYCLES(20000)) dut (
    .clk, .rst_n, .ps2_clk_i(a_clk), .ps2_data_i(a_dat), .ps2_clk_oe(a_clk_oe), .ps2_data_oe(a_dat_oe),
    .cmd_valid, .cmd_data, .cmd_ready, .cmd_done, .cmd_err,
    .enter_irq(irq), .kbd_present(present), .auto_start, .frame_err(ferr),
    .line_we, .line_col, .line_char, .line_clr);

  // driver B: nothing attached (lines pulled up)
  logic b_clk_oe, b_dat_oe, b_cmd_valid = 0, b_cmd_ready, b_cmd_done, b_cmd_err, b_irq, b_present, b_auto, b_ferr, b_we;
  logic [6:0] b_col;
  logic [7:0] b_char;
  ps2_keyboard #(.IDLE_CYCLES(500), .INHIBIT_CYCLES(200), .WAIT_CYCLES(3000), .DETECT_CYCLES(20000)) dut_b (
    .clk, .rst_n, .ps2_clk_i(!b_clk_oe), .ps2_data_i(!b_dat_oe), .ps2_clk_oe(b_clk_oe), .ps2_data_oe(b_dat_oe),
    .cmd_valid(b_cmd_valid), .cmd_data(8'hED), .cmd_ready(b_cmd_ready), .cmd_done(b_cmd_done), .cmd_err(b_cmd_err),
    .enter_irq(b_irq), .kbd_present(b_present), .auto_start(b_auto), .frame_err(b_ferr),
    .line_we(b_we), .line_col(b_col), .line_char(b_char), .line_clr(1'b0));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // the line as written by the driver
  logic [7:0] line [80];
  int n_writes = 0, n_ferr = 0, irq_len = 0, n_irq = 0, bad_irq = 0;
  always @(posedge clk) if (rst_n) begin
    if (line_we) begin line[line_col] = line_char; n_writes++; end
    if (ferr) n_ferr++;
    if (irq) irq_len++;
    else if (irq_len != 0) begin n_irq++; if (irq_len != 2) bad_irq++; irq_len = 0; end
  end

  task automatic press(input logic [7:0] sc);
    u_dev.send_byte(sc); u_dev.send_byte(8'hF0); u_dev.send_byte(sc);
  endtask

  function automatic string line_str(input int n);
    string s = "";
    for (int i = 0; i < n; i++) s = {s, string'(line[i])};
    return s;
  endfunction

  initial begin
    int w;
    foreach (line[i]) line[i] = 8'h20;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // boot
    wait (present || auto_start);
    check(present && !auto_start, "keyboard detected");
    check(u_dev.rx_count == 1 && u_dev.rx_log[0] == 8'hFF, "reset command sent at boot");
    wait (b_present || b_auto);
    check(b_auto && !b_present, "no keyboard: auto_start");
    wait (!u_dev.busy);
    // type "ab", Shift+c, Backspace, "1.2"
    press(8'h1C); press(8'h32);
    check(line_str(2) == "ab" && n_writes == 2, "typed ab");
    u_dev.send_byte(8'h12); press(8'h21); u_dev.send_byte(8'hF0); u_dev.send_byte(8'h12);
    check(line_str(3) == "abC", "shift C");
    press(8'h66);
    check(line_str(3) == "ab " && n_writes == 4, "backspace");
    press(8'h16); press(8'h49); press(8'h1E);
    check(line_str(5) == "ab1.2", $sformatf("typed digits: %s", line_str(6)));
    // bad parity: ignored
    w = n_writes;
    u_dev.send_byte(8'h22, 0, 1, 0);
    u_dev.send_byte(8'hF0); u_dev.send_byte(8'h22);
    check(n_ferr == 1 && n_writes == w, $sformatf("bad frame ignored ferr=%0d writes=%0d w=%0d", n_ferr, n_writes, w));
    // Enter
    press(8'h5A);
    repeat (5) @(posedge clk);
    check(n_irq == 1 && bad_irq == 0, $sformatf("two-clock enter interrupt %0d %0d", n_irq, bad_irq));
    press(8'h1A);
    check(n_writes == w && n_irq == 1, "line locked after enter");
    // processor clears the line; typing restarts at column 0
    @(negedge clk); line_clr = 1; @(negedge clk); line_clr = 0;
    foreach (line[i]) line[i] = 8'h20;
    press(8'h1A);
    check(line_str(2) == "z " && n_writes == w + 1, "after clear, typing at column 0");
    // more than a line of characters: the rest is dropped
    for (int i = 0; i < 82; i++) press(8'h29);
    check(n_writes == w + 80, $sformatf("line limited to 80 (%0d writes)", n_writes - w));
    // command to the keyboard
    wait (cmd_ready);
    @(negedge clk); cmd_valid = 1; cmd_data = 8'hED;
    @(negedge clk); cmd_valid = 0;
    wait (cmd_done);
    @(negedge clk);
    check(!cmd_err, "command acknowledged");
    repeat (200) @(posedge clk);
    check(u_dev.rx_count == 2 && u_dev.rx_log[1] == 8'hED, "keyboard received ED");
    // the same without a keyboard fails
    wait (b_cmd_ready);
    @(negedge clk); b_cmd_valid = 1;
    @(negedge clk); b_cmd_valid = 0;
    wait (b_cmd_done);
    @(negedge clk);
    check(b_cmd_err, "command to absent keyboard fails");
    check(n_ferr == 1, "no other frame errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
