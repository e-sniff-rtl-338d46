// tb_ps2_keymap: self-checking test of the scan code to ASCII translator.
// Feeds make/break sequences and checks the ASCII produced against a table
// written out here key by key: lower case, Shift with both Shift keys,
// break codes producing nothing, the extended prefix, Enter and Backspace.
module tb_ps2_keymap;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cv = 0, av;
  logic [7:0] code = 0, ascii;
  ps2_keymap dut (.clk, .rst_n, .code_valid(cv), .code, .ascii_valid(av), .ascii);

  int n_out = 0;
  logic [7:0] last;
  always @(posedge clk) if (rst_n && av) begin n_out++; last = ascii; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic put(input logic [7:0] c);
    @(negedge clk); cv = 1; code = c;
    @(negedge clk); cv = 0;
    @(negedge clk);
  endtask

  // press and release, expecting one character (or none if exp == 0)
  task automatic key(input logic [7:0] c, input logic [7:0] exp);
    int n = n_out;
    put(c);
    if (exp == 0) check(n_out == n, $sformatf("code %02h gives nothing", c));
    else check(n_out == n + 1 && last == exp, $sformatf("code %02h -> %02h, want %02h", c, last, exp));
    n = n_out;
    put(8'hF0); put(c);
    check(n_out == n, $sformatf("release of %02h gives nothing", c));
  endtask

  typedef struct { logic [7:0] sc; byte lo; byte hi; } ent_t;
  ent_t tbl[] = '{
    '{8'h1C, "a", "A"}, '{8'h32, "b", "B"}, '{8'h21, "c", "C"}, '{8'h2C, "t", "T"},
    '{8'h1B, "s", "S"}, '{8'h2D, "r", "R"}, '{8'h4D, "p", "P"}, '{8'h44, "o", "O"},
    '{8'h1A, "z", "Z"}, '{8'h15, "q", "Q"}, '{8'h45, "0", ")"}, '{8'h16, "1", "!"},
    '{8'h1E, "2", "@"}, '{8'h46, "9", "("}, '{8'h49, ".", ">"}, '{8'h4A, "/", "?"},
    '{8'h4C, ";", ":"}, '{8'h4E, "-", "_"}, '{8'h29, " ", " "}, '{8'h5A, 8'h0D, 8'h0D},
    '{8'h66, 8'h08, 8'h08}, '{8'h71, ".", "."}, '{8'h69, "1", "1"}
  };

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (tbl[i]) key(tbl[i].sc, tbl[i].lo);
    put(8'h12);                                   // left Shift down
    foreach (tbl[i]) key(tbl[i].sc, tbl[i].hi);
    put(8'hF0); put(8'h12);                       // left Shift up
    key(8'h1C, "a");
    put(8'h59);                                   // right Shift down
    key(8'h24, "E");
    put(8'hF0); put(8'h59);
    key(8'h24, "e");
    key(8'h05, 8'h00);                            // F1: no character
    key(8'hFA, 8'h00);                            // keyboard acknowledge byte
    begin
      automatic int n = n_out;
      put(8'hE0); put(8'h5A);                     // keypad Enter
      check(n_out == n + 1 && last == 8'h0D, "keypad Enter");
      put(8'hE0); put(8'hF0); put(8'h5A);
      n = n_out;
      put(8'hE0); put(8'h75);                     // cursor up: nothing
      check(n_out == n, "extended arrow gives nothing");
      put(8'hE0); put(8'hF0); put(8'h75);
      key(8'h75, "8");                            // same code without E0: keypad 8
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
