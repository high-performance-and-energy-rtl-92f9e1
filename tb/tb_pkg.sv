// Shared helpers of the testbenches: the instruction word every address of
// the behavioural L2 holds, and the line made of four such words.
package tb_pkg;
  import icache_pkg::*;

  function automatic word_t mem_word(addr_t a);
    return (a * 32'h9E37_79B1) ^ 32'h0000_1234;
  endfunction

  function automatic line_t mem_line(addr_t la);
    line_t l;
    for (int k = 0; k < WORDS; k++) l[WORD_W*k +: WORD_W] = mem_word(la + ADDR_W'(4 * k));
    return l;
  endfunction
endpackage
