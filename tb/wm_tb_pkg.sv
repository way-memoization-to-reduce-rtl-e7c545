// wm_tb_pkg: helpers shared by the cache testbenches and the memory model.
//
// mem_word() defines the contents of secondary memory: every instruction
// word is a fixed scramble of its own address, so a testbench can tell the
// expected word of any fetch without storing a program image.
package wm_tb_pkg;
  function automatic logic [31:0] mem_word(logic [31:0] addr);
    logic [31:0] a = {addr[31:2], 2'b00};
    return (a * 32'h9E3779B1) ^ {a[15:0], a[31:16]} ^ 32'h0DEC0DE5;
  endfunction

  // cheap integer hash used to build synthetic control flow
  function automatic logic [31:0] hash32(logic [31:0] x);
    x = x ^ (x >> 16); x = x * 32'h7FEB352D;
    x = x ^ (x >> 15); x = x * 32'h846CA68B;
    return x ^ (x >> 16);
  endfunction
endpackage
