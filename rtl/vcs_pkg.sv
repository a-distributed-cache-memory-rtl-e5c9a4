// vcs_pkg: types, constants and the vector configuration of the distributed
// vector cache system.
//
// The memory system feeds a custom vector datapath from several caches that
// share one external DDR2 memory. Every datum is a 32-bit word and every
// address in the system is a word address. The external memory answers each
// read with one 32-byte block delivered as two 128-bit beats; cache lines are
// whole multiples of that block.
//
// Vector configuration: each vector is fixed at synthesis time by its start
// address START and its sizes NI, NJ, NK, stored row by row (i fastest, then
// j, then k). The functions below derive the constant offsets that the
// address generator adds for each iteration command: +-1 along i, +-NI along
// j, +-NI*NJ along k, and the offset of the last element along each dimension
// (NI-1, NI*(NJ-1), NI*NJ*(NK-1)).
//
// Follows the source design: 32-bit data, 4-bit iteration commands, the
// command set, 32-byte memory blocks in two 128-bit beats, the three
// replacement policies. Own choices: the numeric command encoding, a 27-bit
// word address (512 MB of memory), the example vector table returned by
// default_sys_tab(), and the table limits MAX_VEC / MAX_CACHE.
package vcs_pkg;

  localparam int DATA_W      = 32;   // one data value
  localparam int ADDR_W      = 27;   // word address: 512 MB / 4 bytes
  localparam int BEAT_W      = 128;  // one beat from the memory interface
  localparam int BLOCK_WORDS = 8;    // 32-byte block = one memory read
  localparam int BEAT_WORDS  = BEAT_W / DATA_W;
  localparam int BLK_AW      = ADDR_W - $clog2(BLOCK_WORDS);
  localparam int DIM_W       = 16;   // width of NI, NJ, NK
  localparam int MAX_VEC     = 8;    // vectors per address generator
  localparam int MAX_CACHE   = 8;    // caches per system

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;
  typedef logic [BEAT_W-1:0] beat_t;
  typedef logic [BLK_AW-1:0] blk_addr_t;

  // Iteration commands (4 bits). CMD_SAME re-reads the current element.
  typedef enum logic [3:0] {
    CMD_SAME    = 4'd0,   // A[i, j, k]
    CMD_I_INC   = 4'd1,   // A[i++, j, k]    ADDR+1
    CMD_I_DEC   = 4'd2,   // A[i--, j, k]    ADDR-1
    CMD_J_INC   = 4'd3,   // A[i, j++, k]    ADDR+NI
    CMD_J_DEC   = 4'd4,   // A[i, j--, k]    ADDR-NI
    CMD_K_INC   = 4'd5,   // A[i, j, k++]    ADDR+NI*NJ
    CMD_K_DEC   = 4'd6,   // A[i, j, k--]    ADDR-NI*NJ
    CMD_ORIGIN  = 4'd7,   // A[0, 0, 0]      START
    CMD_I_FIRST = 4'd8,   // A[0, j, k]      START_I
    CMD_J_FIRST = 4'd9,   // A[i, 0, k]      START_J
    CMD_K_FIRST = 4'd10,  // A[i, j, 0]      START_K
    CMD_I_LAST  = 4'd11,  // A[NI-1, j, k]   START_I+NI-1
    CMD_J_LAST  = 4'd12,  // A[i, NJ-1, k]   START_J+NI*(NJ-1)
    CMD_K_LAST  = 4'd13   // A[i, j, NK-1]   START_K+NI*NJ*(NK-1)
  } cmd_e;

  typedef enum logic [1:0] {
    POL_FIFO = 2'd0,  // replace the oldest written line
    POL_LRU  = 2'd1,  // least recently used
    POL_LFU  = 2'd2   // least frequently used
  } policy_e;

  typedef struct packed {
    addr_t            start;
    logic [DIM_W-1:0] ni;
    logic [DIM_W-1:0] nj;
    logic [DIM_W-1:0] nk;
  } vec_desc_t;

  typedef vec_desc_t [MAX_VEC-1:0] vec_tab_t;     // one address generator
  typedef vec_tab_t  [MAX_CACHE-1:0] sys_vec_tab_t; // whole system

  function automatic vec_desc_t mk_vec(addr_t start, int ni, int nj, int nk);
    vec_desc_t d;
    d.start = start;
    d.ni    = DIM_W'(ni);
    d.nj    = DIM_W'(nj);
    d.nk    = DIM_W'(nk);
    return d;
  endfunction

  // Step along j: NI elements.
  function automatic addr_t stride_j(vec_desc_t d);
    return addr_t'(d.ni);
  endfunction

  // Step along k: one NI x NJ plane.
  function automatic addr_t stride_k(vec_desc_t d);
    return addr_t'(d.ni) * addr_t'(d.nj);
  endfunction

  // Offset of the last element along each dimension from its row start.
  function automatic addr_t last_off_i(vec_desc_t d);
    return addr_t'(d.ni) - addr_t'(1);
  endfunction

  function automatic addr_t last_off_j(vec_desc_t d);
    return addr_t'(d.ni) * (addr_t'(d.nj) - addr_t'(1));
  endfunction

  function automatic addr_t last_off_k(vec_desc_t d);
    return addr_t'(d.ni) * addr_t'(d.nj) * (addr_t'(d.nk) - addr_t'(1));
  endfunction

  // Word address of element (i, j, k).
  function automatic addr_t elem_addr(vec_desc_t d, int i, int j, int k);
    return d.start + addr_t'(i) + addr_t'(j) * addr_t'(d.ni)
         + addr_t'(k) * addr_t'(d.ni) * addr_t'(d.nj);
  endfunction

  // Example configuration: vector v of cache c is a 32 x 32 x 16 array
  // (16 K words) placed at word address (c * MAX_VEC + v) * 2^16.
  function automatic sys_vec_tab_t default_sys_tab();
    sys_vec_tab_t t;
    for (int c = 0; c < MAX_CACHE; c++)
      for (int v = 0; v < MAX_VEC; v++)
        t[c][v] = mk_vec(addr_t'((c * MAX_VEC + v) << 16), 32, 32, 16);
    return t;
  endfunction

  // The vectors of cache c in the example configuration.
  function automatic vec_tab_t default_vec_tab(int c);
    sys_vec_tab_t t;
    t = default_sys_tab();
    return t[c];
  endfunction

endpackage
