// tb_pkg: helpers shared by the testbenches: the initial contents the L2
// model gives a line that was never written, so a checker can predict what
// a first load returns.
package tb_pkg;
  import l1_pkg::*;

  // Word i of a never-written line: a fixed mix of the line address.
  function automatic word_t init_word(logic [63:0] line, int unsigned i);
    logic [63:0] x;
    x = (line * 64'h9E37_79B9_7F4A_7C15) ^ (64'(i) * 64'hC2B2_AE3D_27D4_EB4F);
    return word_t'(x ^ (x >> 29));
  endfunction

  function automatic line_t init_line(logic [63:0] line);
    line_t r;
    for (int i = 0; i < int'(WORDS_PER_LINE); i++)
      r[i*DATA_W +: DATA_W] = init_word(line, i);
    return r;
  endfunction
endpackage
