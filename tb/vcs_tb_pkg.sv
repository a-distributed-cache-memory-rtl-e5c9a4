// vcs_tb_pkg: helpers shared by the testbenches.
//
// mem_word() defines the contents of the simulated external memory: every
// 32-bit word is a fixed scramble of its own word address, so any word read
// back can be checked without storing the memory.
package vcs_tb_pkg;
  import vcs_pkg::*;

  function automatic data_t mem_word(addr_t a);
    return (data_t'(a) * 32'h9E37_79B1) ^ 32'h5A5A_1234;
  endfunction

  // The 128-bit beat h (0 or 1) of 32-byte block b.
  function automatic beat_t mem_beat(blk_addr_t b, int h);
    beat_t r;
    for (int w = 0; w < BEAT_WORDS; w++)
      r[w*DATA_W +: DATA_W] = mem_word(addr_t'({b, 3'b000}) + addr_t'(h * BEAT_WORDS + w));
    return r;
  endfunction
endpackage
