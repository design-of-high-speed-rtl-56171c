// seg7_expect.svh: reference seven-segment patterns for the testbenches.
// Each hexadecimal digit is described by the letters of the segments it
// lights (a top, b top right, c bottom right, d bottom, e bottom left,
// f top left, g middle); the function turns that list into {g..a}.
`ifndef SEG7_EXPECT_SVH
`define SEG7_EXPECT_SVH
function automatic logic [6:0] seg7_expect(input logic [3:0] d);
  string lit;
  logic [6:0] s;
  case (d)
    4'h0: lit = "abcdef";   4'h1: lit = "bc";
    4'h2: lit = "abdeg";    4'h3: lit = "abcdg";
    4'h4: lit = "bcfg";     4'h5: lit = "acdfg";
    4'h6: lit = "acdefg";   4'h7: lit = "abc";
    4'h8: lit = "abcdefg";  4'h9: lit = "abcdfg";
    4'hA: lit = "abcefg";   4'hB: lit = "cdefg";
    4'hC: lit = "adef";     4'hD: lit = "bcdeg";
    4'hE: lit = "adefg";    default: lit = "aefg";
  endcase
  s = '0;
  for (int i = 0; i < lit.len(); i++) s[lit[i] - "a"] = 1'b1;
  return s;
endfunction
`endif
