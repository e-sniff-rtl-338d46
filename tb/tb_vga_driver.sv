// tb_vga_driver: self-checking test of the VGA text driver at its default
// 100 MHz / 4 pixel rate.
// A memory model answers the driver's reads with a known character pattern.
// The test follows the output pixel by pixel over two frames and checks the
// sync pulses (position and width), the blanking, every visible pixel against
// the glyph dot the pattern calls for, and the frame period of 800x525 pixels
// (59.5 Hz).
module tb_vga_driver;
  import esniff_pkg::*;
  localparam int DIV = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic mem_en, pix_stb, hsync_n, vsync_n, blank_n, frame_start;
  logic [4:0] mem_row;
  logic [6:0] mem_col;
  logic [7:0] mem_char;
  logic [9:0] vga_r, vga_g, vga_b;
  vga_driver dut (.*);

  function automatic logic [7:0] pattern(input int r, input int c);
    return 8'(32 + (r * 7 + c * 3) % 96);   // includes 0x7F and space
  endfunction

  // memory model: one clock of read latency
  always_ff @(posedge clk) if (mem_en) mem_char <= pattern(int'(mem_row), int'(mem_col));

  logic [39:0] font [128];
  initial $readmemh("rtl/font5x8.hex", font);

  function automatic bit dot(input int x, input int y);
    logic [7:0] c = pattern(y / 16, x / 8);
    int cx = x % 8, gy = (y % 16) / 2;
    if (cx >= 5) return 0;
    return font[c[6:0]][8 * (4 - cx) + gy];
  endfunction

  int nfail_px = 0, nframes = 0, h = 0, v = 0, last_fs = 0;
  bit started = 0;
  int hs_w = 0, vs_lines = 0;
  int lit = 0;

  always @(posedge clk) begin
    if (frame_start && rst_n) begin
      if (started) begin
        checks++;
        if ((int'($time / 10) - last_fs) != 800 * 525 * DIV) begin
          failures++; $display("FAIL: frame period %0d", int'($time / 10) - last_fs);
        end
        checks++;
        if (h != 0 || v != 0) begin failures++; $display("FAIL: frame length h=%0d v=%0d", h, v); end
        nframes++;
      end
      started = 1; last_fs = int'($time / 10); h = 0; v = 0;
    end
    if (started && pix_stb) begin
      automatic bit exp_hs  = (h >= 656 && h < 752);
      automatic bit exp_vs  = (v >= 490 && v < 492);
      automatic bit exp_vis = (h < 640 && v < 480);
      automatic bit exp_dot = exp_vis && dot(h, v);
      checks++;
      if (hsync_n != !exp_hs || vsync_n != !exp_vs || blank_n != exp_vis ||
          vga_r != (exp_dot ? 10'h3FF : 10'h0) || vga_g != vga_r || vga_b != vga_r) begin
        failures++;
        if (nfail_px++ < 10)
          $display("FAIL: pixel h=%0d v=%0d hs=%b vs=%b bl=%b r=%h exp dot=%b", h, v, hsync_n, vsync_n, blank_n, vga_r, exp_dot);
      end
      if (exp_dot) lit++;
      h++;
      if (h == 800) begin h = 0; v++; if (v == 525) v = 0; end
    end
  end

  // pixel strobe period
  int stb_gap = 0, stb_bad = 0;
  always @(posedge clk) if (rst_n) begin
    if (pix_stb) begin if (stb_gap != DIV - 1 && started) stb_bad++; stb_gap = 0; end
    else stb_gap++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (nframes == 2);
    checks++; if (stb_bad != 0) begin failures++; $display("FAIL: pixel strobe period"); end
    checks++; if (lit < 1000) begin failures++; $display("FAIL: too few lit pixels %0d", lit); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (800 * 525 * DIV * 3 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
