// tb_font_rom: self-checking test of the glyph ROM.
// Checks a few glyphs against their dot patterns written out here, that the
// control codes are blank, the one-clock read latency and that the output
// holds while en is low.
module tb_font_rom;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en = 0;
  logic [6:0] addr = 0;
  logic [39:0] glyph;
  font_rom dut (.clk, .en, .addr, .glyph);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic rd(input logic [6:0] a, output logic [39:0] g);
    @(negedge clk); en = 1; addr = a;
    @(negedge clk); en = 0; g = glyph;
  endtask

  // 'A' drawn row by row (top first), five columns left to right
  localparam string A_ROWS[7] = '{"..#..", ".#.#.", "#...#", "#...#", "#####", "#...#", "#...#"};

  initial begin
    logic [39:0] g;
    rd("A", g);
    for (int r = 0; r < 7; r++)
      for (int c = 0; c < 5; c++)
        check(g[8 * (4 - c) + r] == (A_ROWS[r][c] == "#"), $sformatf("A row %0d col %0d", r, c));
    check(g[8*4+7] == 0 && g[7] == 0, "A has no descender");
    rd("0", g);  check(g == 40'h3E5149453E, "glyph 0");
    rd(" ", g);  check(g == 40'h0, "space blank");
    rd("1", g);  check(g == 40'h00427F4000, "glyph 1");
    rd(".", g);  check(g == 40'h0000606000, "glyph .");
    rd("g", g);  check(g[8*3+7] == 1'b1, "g descends into row 7");
    for (int c = 0; c < 32; c++) begin
      rd(7'(c), g); check(g == 40'h0, $sformatf("control code %02h blank", c));
    end
    rd(7'h7F, g); check(g == 40'h0, "DEL blank");
    // latency and hold
    @(negedge clk); en = 1; addr = "A";
    @(negedge clk); en = 0; addr = "0";
    check(glyph == 40'h7C1211127C, "read after one clock");
    @(negedge clk); @(negedge clk);
    check(glyph == 40'h7C1211127C, "holds while en low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
