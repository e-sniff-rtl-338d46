// tb_esniff_top: end-to-end test of the sniffer's user-I/O hardware with
// every parameter at its default (100 MHz clock, 25 MHz pixels, real PS/2
// timing with a 16.7 kHz keyboard clock).
//
// The testbench plays the processor on the cpu_* / kbd_* ports and drives a
// keyboard model on the PS/2 pins. One complete operation:
//   boot: the driver resets the keyboard and detects it;
//   the user types "start", a mistyped key and Backspace, one frame with bad
//   parity is injected, then Enter;
//   on the two-clock interrupt the processor reads the line from the keyboard
//   partition, clears it, writes a packet line into the text ring and scrolls;
//   the processor sends a code to the keyboard;
//   the user types "go" (left on the input line);
//   one whole VGA frame is compared pixel by pixel against the expected screen
//   (29 scrolled text rows plus the input line) built from the processor's
//   writes.
// Then the board is reset with no keyboard attached and the driver must raise
// auto_start. Each of these mechanisms is counted; one that never happened is
// a failure.
module tb_esniff_top;
  import esniff_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ps2_clk, ps2_data, ps2_clk_oe, ps2_data_oe, present = 1;
  logic cpu_cs = 0, cpu_we = 0;
  logic [CPU_AW-1:0] cpu_addr = 0;
  logic [7:0] cpu_wdata = 0, cpu_rdata;
  logic kbd_cmd_valid = 0, kbd_cmd_ready, kbd_cmd_done, kbd_cmd_err;
  logic [7:0] kbd_cmd_data = 0;
  logic kbd_irq, kbd_present, auto_start, kbd_frame_err;
  logic [ROW_W-1:0] scroll_offset;
  logic vga_pix_stb, vga_hsync_n, vga_vsync_n, vga_blank_n, vga_frame_start;
  logic [9:0] vga_r, vga_g, vga_b;

  ps2_dev_model #(.HALF(3000)) u_dev (.clk, .present, .host_clk_oe(ps2_clk_oe),
                                      .host_data_oe(ps2_data_oe), .ps2_clk, .ps2_data);
  esniff_top dut (.clk, .rst_n, .ps2_clk_i(ps2_clk), .ps2_data_i(ps2_data), .*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- processor bus model ----------------
  task automatic cpu_write(input logic [12:0] a, input logic [7:0] d);
    @(negedge clk); cpu_cs = 1; cpu_we = 1; cpu_addr = a; cpu_wdata = d;
    @(negedge clk); cpu_cs = 0; cpu_we = 0;
  endtask
  task automatic cpu_read(input logic [12:0] a, output logic [7:0] d);
    @(negedge clk); cpu_cs = 1; cpu_we = 0; cpu_addr = a;
    @(negedge clk); cpu_cs = 0; d = cpu_rdata;
  endtask

  // expected screen: ring by physical row, input line, offset
  logic [7:0] ring [32][80];
  logic [7:0] kline [80];
  logic [4:0] moff = 0;

  task automatic cpu_put_line(input int lrow, input string s);
    for (int c = 0; c < 80; c++) begin
      automatic logic [7:0] ch = (c < s.len()) ? s[c] : 8'h20;
      cpu_write({1'b0, 5'(lrow), 7'(c)}, ch);
      ring[5'(lrow) + moff][c] = ch;
    end
  endtask

  // ---------------- keyboard model helpers ----------------
  task automatic press(input logic [7:0] sc);
    u_dev.send_byte(sc); u_dev.send_byte(8'hF0); u_dev.send_byte(sc);
  endtask

  // ---------------- mechanism counters ----------------
  int m_detect = 0, m_auto = 0, m_chars = 0, m_bs = 0, m_badframe = 0, m_irq = 0,
      m_line_read = 0, m_clear = 0, m_scroll = 0, m_cmd = 0, m_frame = 0;
  int irq_len = 0, irq_bad = 0;
  always @(posedge clk) if (rst_n) begin
    if (kbd_irq) irq_len++;
    else if (irq_len != 0) begin m_irq++; if (irq_len != 2) irq_bad++; irq_len = 0; end
    if (kbd_frame_err) m_badframe++;
    if (dut.line_we && dut.line_char != 8'h20) m_chars++;
    if (dut.line_we && dut.line_char == 8'h20) m_bs++;
  end

  // ---------------- VGA frame checker ----------------
  logic [39:0] font [128];
  initial $readmemh("rtl/font5x8.hex", font);

  function automatic logic [7:0] screen_char(input int r, input int c);
    if (r < 29) return ring[5'(r) + moff][c];
    if (r == 29) return kline[c];
    return 8'h20;
  endfunction

  bit checking = 0, in_frame = 0;
  int px_h = 0, px_v = 0, px_bad = 0, px_lit = 0;
  always @(posedge clk) if (rst_n && checking) begin
    if (vga_frame_start) begin
      if (in_frame) begin m_frame++; checking = 0; end
      in_frame = 1; px_h = 0; px_v = 0;
    end
    if (checking && in_frame && vga_pix_stb) begin
      automatic bit vis = px_h < 640 && px_v < 480;
      automatic logic [7:0] ch = screen_char(px_v / 16, px_h / 8);
      automatic int cx = px_h % 8;
      automatic bit d = vis && cx < 5 && font[ch[6:0]][8 * (4 - cx) + (px_v % 16) / 2];
      if (d) px_lit++;
      if (vga_blank_n != vis || vga_r != (d ? 10'h3FF : 10'h0) ||
          vga_hsync_n != !(px_h >= 656 && px_h < 752) || vga_vsync_n != !(px_v >= 490 && px_v < 492)) begin
        if (px_bad++ < 5) $display("FAIL: pixel %0d,%0d", px_h, px_v);
      end
      px_h++;
      if (px_h == 800) begin px_h = 0; px_v++; end
    end
  end

  function automatic string str_of(input logic [7:0] a [80], input int n);
    string s = "";
    for (int i = 0; i < n; i++) s = {s, string'(a[i])};
    return s;
  endfunction

  initial begin
    logic [7:0] d;
    logic [7:0] got [80];
    int t0;
    foreach (kline[i]) kline[i] = 8'h20;
    repeat (5) @(posedge clk);
    rst_n = 1;
    // processor clears the whole ring while the keyboard boots
    for (int r = 0; r < 32; r++) cpu_put_line(r, "");
    cpu_put_line(0, "E-Sniff ready");
    // ---- boot detection
    t0 = $time / 10;
    wait (kbd_present || auto_start);
    if (kbd_present) m_detect++;
    check(kbd_present && !auto_start, "keyboard detected at boot");
    $display("keyboard detected after %0d cycles", $time / 10 - t0);
    wait (!u_dev.busy);
    // ---- typing
    press(8'h1B); press(8'h2C); press(8'h1C); press(8'h2D);   // s t a r
    press(8'h22);                                             // x (mistyped)
    press(8'h66);                                             // Backspace
    u_dev.send_byte(8'h2C, 0, 1, 0);                          // 't' with bad parity: lost
    press(8'h2C);                                             // t again
    press(8'h5A);                                             // Enter
    repeat (10) @(posedge clk);
    check(m_irq == 1 && irq_bad == 0, "one two-clock interrupt on Enter");
    // ---- processor services the interrupt: read the line
    for (int c = 0; c < 80; c++) begin cpu_read(13'h1000 | 13'(c), d); got[c] = d; end
    m_line_read++;
    check(str_of(got, 6) == "start ", $sformatf("line read back: '%s'", str_of(got, 8)));
    cpu_write(REG_CLEAR, 8'h00); m_clear++;
    cpu_read(13'h1000, d);
    check(d == 8'h20, "line cleared");
    // acknowledgement and a packet line, each after a scroll
    cpu_write(REG_SCROLL, 8'h00); moff++; m_scroll++;
    cpu_put_line(28, "> start: capture running");
    cpu_write(REG_SCROLL, 8'h00); moff++; m_scroll++;
    cpu_put_line(28, "TCP 192.168.1.10:80 > 192.168.1.20:5000 len 1500");
    check(scroll_offset == moff, "offset after two scrolls");
    // ---- processor sends a code to the keyboard
    wait (kbd_cmd_ready);
    @(negedge clk); kbd_cmd_valid = 1; kbd_cmd_data = 8'hED;
    @(negedge clk); kbd_cmd_valid = 0;
    wait (kbd_cmd_done);
    @(negedge clk);
    check(!kbd_cmd_err, "keyboard acknowledged the command");
    repeat (20000) @(posedge clk);
    check(u_dev.rx_log[1] == 8'hED, "keyboard received ED");
    if (!kbd_cmd_err) m_cmd++;
    wait (!u_dev.busy);
    // ---- new input "go"
    press(8'h34); press(8'h44);
    kline[0] = "g"; kline[1] = "o";
    // ---- one VGA frame against the expected screen
    checking = 1; in_frame = 0;
    wait (!checking);
    check(px_bad == 0, $sformatf("VGA frame matches (%0d bad pixels)", px_bad));
    check(px_lit > 500, "frame shows text");
    // ---- reset with no keyboard: auto start
    present = 0;
    wait (!u_dev.busy);
    @(negedge clk); rst_n = 0;
    repeat (5) @(negedge clk); rst_n = 1;
    wait (kbd_present || auto_start);
    if (auto_start) m_auto++;
    check(auto_start && !kbd_present, "no keyboard: auto_start");
    // ---- every mechanism happened
    check(m_detect > 0, "mechanism: keyboard detection");
    check(m_auto > 0, "mechanism: auto start");
    check(m_chars >= 7, "mechanism: character writes");
    check(m_bs > 0, "mechanism: backspace");
    check(m_badframe == 1, "mechanism: bad frame rejected");
    check(m_irq == 1, "mechanism: enter interrupt");
    check(m_line_read > 0 && m_clear > 0, "mechanism: line read and clear");
    check(m_scroll == 2, "mechanism: scroll");
    check(m_cmd > 0, "mechanism: command to keyboard");
    check(m_frame > 0, "mechanism: frame displayed");
    $display("mechanisms: detect=%0d auto=%0d chars=%0d bs=%0d badframe=%0d irq=%0d read=%0d clear=%0d scroll=%0d cmd=%0d frame=%0d",
             m_detect, m_auto, m_chars, m_bs, m_badframe, m_irq, m_line_read, m_clear, m_scroll, m_cmd, m_frame);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
