// abc_tb_pkg: helpers shared by the ABC cache testbenches.
//
// init_word gives the contents memory holds for a word that was never
// written: a fixed mixing function of the word address, so that every test
// can predict load data without a table.
package abc_tb_pkg;
  import abc_pkg::*;

  function automatic word_t init_word(logic [ADDR_W-3:0] waddr);
    word_t x = word_t'(waddr);
    x = x * 32'h9E37_79B1;
    return x ^ 32'h5A5A_5A5A ^ (x >> 15);
  endfunction

  function automatic line_t init_line(laddr_t la);
    line_t l;
    for (int w = 0; w < WORDS; w++)
      l[w*WORD_W +: WORD_W] = init_word({la, WSEL_W'(w)});
    return l;
  endfunction
endpackage
