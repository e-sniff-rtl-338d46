// tb_video_mem: self-checking test of the ASCII video memory.
// Keeps its own model of the screen (a 32x128 array indexed by physical row)
// and checks processor reads, VGA reads, scrolling through the line offset,
// the keyboard line (writes, processor and VGA reads, asynchronous clear to
// spaces) and the blank rows below the keyboard line. It also prints one
// packet line the way the processor would (scroll, then 80 back-to-back
// character writes) and checks that this takes 81 clocks, within the budget
// of about 100 clocks per displayed line.
module tb_video_mem;
  import esniff_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cpu_cs = 0, cpu_we = 0, vga_en = 0, kbd_we = 0, line_cleared;
  logic [CPU_AW-1:0] cpu_addr = 0;
  logic [7:0] cpu_wdata = 0, cpu_rdata, vga_char, kbd_char = 0;
  logic [4:0] vga_row = 0, offset;
  logic [6:0] vga_col = 0, kbd_col = 0;

  video_mem dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cpu_write(input logic [12:0] a, input logic [7:0] d);
    @(negedge clk); cpu_cs = 1; cpu_we = 1; cpu_addr = a; cpu_wdata = d;
    @(negedge clk); cpu_cs = 0; cpu_we = 0;
  endtask
  task automatic cpu_read(input logic [12:0] a, output logic [7:0] d);
    @(negedge clk); cpu_cs = 1; cpu_we = 0; cpu_addr = a;
    @(negedge clk); cpu_cs = 0; d = cpu_rdata;
  endtask
  task automatic vga_read(input int r, input int c, output logic [7:0] d);
    @(negedge clk); vga_en = 1; vga_row = 5'(r); vga_col = 7'(c);
    @(negedge clk); vga_en = 0; d = vga_char;
  endtask
  task automatic kbd_write(input int c, input logic [7:0] d);
    @(negedge clk); kbd_we = 1; kbd_col = 7'(c); kbd_char = d;
    @(negedge clk); kbd_we = 0;
  endtask

  logic [7:0] model [32][128];
  logic [4:0] moff = 0;

  initial begin
    logic [7:0] d;
    int clr_pulses;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // the keyboard line comes out of reset as spaces
    for (int c = 0; c < 80; c += 7) begin
      cpu_read(13'h1000 | 13'(c), d); check(d == 8'h20, "line reset to 0x20 (cpu)");
      vga_read(29, c, d);             check(d == 8'h20, "line reset to 0x20 (vga)");
    end
    // fill logical rows 0..31 with a pattern
    for (int r = 0; r < 32; r++)
      for (int c = 0; c < 80; c += 3) begin
        d = 8'h21 + 8'((r * 5 + c) % 90);
        cpu_write({1'b0, 5'(r), 7'(c)}, d);
        model[5'(r)][c] = d;
      end
    for (int r = 0; r < 29; r++)
      for (int c = 0; c < 80; c += 9) begin
        vga_read(r, c, d); check(d == model[5'(r) + moff][c], $sformatf("vga r%0d c%0d", r, c));
        cpu_read({1'b0, 5'(r), 7'(c)}, d); check(d == model[5'(r) + moff][c], $sformatf("cpu r%0d c%0d", r, c));
      end
    // scroll: every row moves up by one
    for (int s = 0; s < 3; s++) begin
      cpu_write(REG_SCROLL, 8'h00); moff++;
      cpu_read(REG_OFFSET, d); check(d == 8'(moff), "offset register");
      for (int r = 0; r < 29; r += 4) begin
        vga_read(r, 3, d); check(d == model[5'(r) + moff][3], $sformatf("scrolled vga r%0d", r));
      end
    end
    // new bottom line written through the logical address
    cpu_write({1'b0, 5'd28, 7'd0}, "Z"); model[5'd28 + moff][0] = "Z";
    vga_read(28, 0, d); check(d == "Z", "new bottom line");
    vga_read(27, 0, d); check(d == model[5'd27 + moff][0], "row above bottom");
    // offset written directly, wrap-around
    cpu_write(REG_OFFSET, 8'd30); moff = 30;
    vga_read(5, 6, d); check(d == model[5'd3][6], "offset wraps");
    // keyboard line
    kbd_write(0, "s"); kbd_write(1, "t"); kbd_write(79, "x"); kbd_write(100, "!");
    vga_read(29, 0, d); check(d == "s", "vga line 0");
    vga_read(29, 1, d); check(d == "t", "vga line 1");
    vga_read(29, 79, d); check(d == "x", "vga line 79");
    cpu_read(13'h1001, d); check(d == "t", "cpu line 1");
    cpu_read(13'h104F, d); check(d == "x", "cpu line 79");
    vga_read(29, 100, d); check(d == 8'h20, "past line end is blank");
    vga_read(30, 0, d); check(d == 8'h20, "row 30 blank");
    vga_read(31, 3, d); check(d == 8'h20, "row 31 blank");
    // clear
    clr_pulses = 0;
    fork
      cpu_write(REG_CLEAR, 8'h00);
      repeat (4) @(posedge clk) if (line_cleared) clr_pulses++;
    join
    check(clr_pulses == 1, "one line_cleared pulse");
    cpu_read(13'h1000, d); check(d == 8'h20, "cleared 0");
    cpu_read(13'h104F, d); check(d == 8'h20, "cleared 79");
    vga_read(29, 1, d); check(d == 8'h20, "cleared on screen");
    vga_read(5, 6, d); check(d == model[5'd3][6], "text untouched by clear");
    // workload: print one line (scroll + 80 characters) in about 100 clocks,
    // one processor write per clock
    begin
      int t_start, t_end;
      string msg = "UDP 10.0.0.7:68 > 255.255.255.255:67 DHCP len 300";
      @(negedge clk); t_start = $time / 10;
      cpu_cs = 1; cpu_we = 1; cpu_addr = REG_SCROLL;
      @(negedge clk); moff++;
      for (int c = 0; c < 80; c++) begin
        cpu_addr = {1'b0, 5'd28, 7'(c)};
        cpu_wdata = (c < msg.len()) ? msg[c] : 8'h20;
        model[5'd28 + moff][c] = cpu_wdata;
        @(negedge clk);
      end
      cpu_cs = 0; cpu_we = 0;
      t_end = $time / 10;
      check(t_end - t_start == 81, $sformatf("line printed in %0d clocks", t_end - t_start));
      check(t_end - t_start <= 100, "line within about 100 clocks");
      for (int c = 0; c < 80; c += 5) begin
        vga_read(28, c, d); check(d == model[5'd28 + moff][c], $sformatf("burst line col %0d", c));
      end
      vga_read(27, 6, d); check(d == model[5'd27 + moff][6], "row above burst line");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
