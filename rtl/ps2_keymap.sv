// ps2_keymap: PS/2 scan code (set 2) to ASCII translator.
//
// The keyboard reports key presses as make codes and releases as the break
// prefix 0xF0 followed by the make code; some keys carry the 0xE0 prefix. The
// design description asks the keyboard driver to turn scan codes into ASCII
// for letters, digits and the punctuation needed to type IP addresses,
// netmasks and MAC addresses. This block does that.
//
// How it works: a small state records whether the previous byte was a break
// or an extended prefix and whether a Shift key is held. Each make code that
// names a character key is looked up in a case table (lower or upper row
// depending on Shift) and emitted as one ASCII byte. Enter gives 0x0D,
// Backspace 0x08. Break codes, extended keys other than keypad Enter and '/',
// and keys with no character produce nothing.
//
// Interface/timing: code_valid/code in, ascii_valid/ascii out one clock
// later. Own choices: the set of keys covered (US layout), no Caps Lock.
module ps2_keymap (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       code_valid,
  input  logic [7:0] code,
  output logic       ascii_valid,
  output logic [7:0] ascii
);
  import esniff_pkg::*;

  logic brk, ext, shift_l, shift_r;

  // returns {valid, ascii}
  function automatic logic [8:0] lookup(input logic [7:0] c, input logic sh, input logic e);
    logic [7:0] lo, hi;
    lo = 8'h00; hi = 8'h00;
    if (e) begin
      case (c)
        8'h5A: begin lo = ASCII_CR; hi = ASCII_CR; end   // keypad Enter
        8'h4A: begin lo = "/"; hi = "/"; end             // keypad /
        default: ;
      endcase
    end else begin
      case (c)
        8'h1C: begin lo = "a"; hi = "A"; end
        8'h32: begin lo = "b"; hi = "B"; end
        8'h21: begin lo = "c"; hi = "C"; end
        8'h23: begin lo = "d"; hi = "D"; end
        8'h24: begin lo = "e"; hi = "E"; end
        8'h2B: begin lo = "f"; hi = "F"; end
        8'h34: begin lo = "g"; hi = "G"; end
        8'h33: begin lo = "h"; hi = "H"; end
        8'h43: begin lo = "i"; hi = "I"; end
        8'h3B: begin lo = "j"; hi = "J"; end
        8'h42: begin lo = "k"; hi = "K"; end
        8'h4B: begin lo = "l"; hi = "L"; end
        8'h3A: begin lo = "m"; hi = "M"; end
        8'h31: begin lo = "n"; hi = "N"; end
        8'h44: begin lo = "o"; hi = "O"; end
        8'h4D: begin lo = "p"; hi = "P"; end
        8'h15: begin lo = "q"; hi = "Q"; end
        8'h2D: begin lo = "r"; hi = "R"; end
        8'h1B: begin lo = "s"; hi = "S"; end
        8'h2C: begin lo = "t"; hi = "T"; end
        8'h3C: begin lo = "u"; hi = "U"; end
        8'h2A: begin lo = "v"; hi = "V"; end
        8'h1D: begin lo = "w"; hi = "W"; end
        8'h22: begin lo = "x"; hi = "X"; end
        8'h35: begin lo = "y"; hi = "Y"; end
        8'h1A: begin lo = "z"; hi = "Z"; end
        8'h45: begin lo = "0"; hi = ")"; end
        8'h16: begin lo = "1"; hi = "!"; end
        8'h1E: begin lo = "2"; hi = "@"; end
        8'h26: begin lo = "3"; hi = "#"; end
        8'h25: begin lo = "4"; hi = "$"; end
        8'h2E: begin lo = "5"; hi = "%"; end
        8'h36: begin lo = "6"; hi = "^"; end
        8'h3D: begin lo = "7"; hi = "&"; end
        8'h3E: begin lo = "8"; hi = "*"; end
        8'h46: begin lo = "9"; hi = "("; end
        8'h29: begin lo = " "; hi = " "; end
        8'h4E: begin lo = "-"; hi = "_"; end
        8'h55: begin lo = "="; hi = "+"; end
        8'h41: begin lo = ","; hi = "<"; end
        8'h49: begin lo = "."; hi = ">"; end
        8'h4A: begin lo = "/"; hi = "?"; end
        8'h4C: begin lo = ";"; hi = ":"; end
        8'h52: begin lo = "'"; hi = "\""; end
        8'h54: begin lo = "["; hi = "{"; end
        8'h5B: begin lo = "]"; hi = "}"; end
        8'h5D: begin lo = "\\"; hi = "|"; end
        8'h0E: begin lo = "`"; hi = "~"; end
        8'h5A: begin lo = ASCII_CR; hi = ASCII_CR; end
        8'h66: begin lo = ASCII_BS; hi = ASCII_BS; end
        // numeric keypad digits and point
        8'h70: begin lo = "0"; hi = "0"; end
        8'h69: begin lo = "1"; hi = "1"; end
        8'h72: begin lo = "2"; hi = "2"; end
        8'h7A: begin lo = "3"; hi = "3"; end
        8'h6B: begin lo = "4"; hi = "4"; end
        8'h73: begin lo = "5"; hi = "5"; end
        8'h74: begin lo = "6"; hi = "6"; end
        8'h6C: begin lo = "7"; hi = "7"; end
        8'h75: begin lo = "8"; hi = "8"; end
        8'h7D: begin lo = "9"; hi = "9"; end
        8'h71: begin lo = "."; hi = "."; end
        default: ;
      endcase
    end
    return {(lo != 8'h00), (sh ? hi : lo)};
  endfunction

  logic [8:0] hit;
  assign hit = lookup(code, shift_l | shift_r, ext);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      brk         <= 1'b0;
      ext         <= 1'b0;
      shift_l     <= 1'b0;
      shift_r     <= 1'b0;
      ascii_valid <= 1'b0;
      ascii       <= '0;
    end else begin
      ascii_valid <= 1'b0;
      if (code_valid) begin
        if (code == PS2_BREAK) begin
          brk <= 1'b1;
        end else if (code == PS2_EXTENDED) begin
          ext <= 1'b1;
        end else begin
          brk <= 1'b0;
          ext <= 1'b0;
          if (!ext && code == 8'h12)      shift_l <= ~brk;
          else if (!ext && code == 8'h59) shift_r <= ~brk;
          else if (!brk && hit[8]) begin
            ascii_valid <= 1'b1;
            ascii       <= hit[7:0];
          end
        end
      end
    end
  end

endmodule
