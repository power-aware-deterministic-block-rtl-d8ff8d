// tb_sws_pkg: helpers shared by the SWS cache testbenches.
//
// init_word gives the contents of a never-written memory word, so the memory
// model and the checker's reference model agree on it without storing it.
package tb_sws_pkg;

  function automatic logic [31:0] init_word(input logic [31:0] word_addr);
    return (word_addr * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

endpackage
