// rt_tb_pkg: helpers shared by the cache testbenches.
//
// mem_word() defines the content of the simulated next memory level: every
// 32-bit word is a fixed scramble of its own word address, so any word a
// cache returns can be checked without storing the memory.
package rt_tb_pkg;

  function automatic logic [31:0] mem_word(logic [31:0] byte_addr);
    logic [31:0] a;
    a = byte_addr & 32'hFFFF_FFFC;
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_0F0F ^ (a >> 7);
  endfunction

endpackage
