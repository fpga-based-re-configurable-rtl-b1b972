// tb_seg7: self-checking test of the hexadecimal seven-segment decoder.
//
// For every nibble 0..F the expected glyph is written as the list of lit
// segment letters (a = top, then clockwise, g = middle), converted to an
// active-low 7-bit pattern (bit 0 = a) and compared with the decoder output.
module tb_seg7;
  import dac_pkg::*;

  logic [3:0] binary;
  seg7_t      hex;

  int checks = 0;
  int failures = 0;

  seg7 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic seg7_t pattern(input string lit);
    seg7_t p = '1;
    for (int i = 0; i < lit.len(); i++) p[lit[i] - "a"] = 1'b0;
    return p;
  endfunction

  string glyph [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg",
                        "acdefg", "abc", "abcdefg", "abcdfg", "abcefg",
                        "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      for (int v = 0; v < 16; v++) begin
        binary = 4'(v);
        #10;
        checks++;
        if (hex !== pattern(glyph[v])) begin
          failures++;
          $display("FAIL digit %h: got %b expected %b", v, hex, pattern(glyph[v]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
