// vcs_cache: one cache block of the distributed cache memory system.
//
// Reads 32-bit words for one lane of the vector datapath. A request is
// looked up in the associative tag memory (vcs_assoc_mem) in the same cycle;
// on a hit the word comes out of the data RAM (vcs_line_ram) on the next
// cycle, so a hit costs one cycle and a new request can be taken every
// cycle. On a miss the cache stops taking requests, asks the replacement
// unit (vcs_repl) for a victim line and asks the main-memory arbiter for the
// whole line. The arbiter streams the line as 128-bit beats, which are
// written into the victim line as they arrive. Only when the last beat has
// been written is the new tag stored in the tag memory (the victim search
// therefore has the whole memory latency to finish). The missed word is
// then read from the new line, and the cache takes requests again.
//
// Address split (word address): tag = addr / LINE_WORDS, word in line =
// addr % LINE_WORDS. The memory request carries the line number (the tag).
//
// Interface:
//   req_valid/req_addr - a read, taken on a clock edge when ready is high.
//   ready              - high in the idle state (registered, no
//                        combinational path from req_valid).
//   rd_valid/rd_data   - the word, one cycle after a hit, or one cycle after
//                        the refill of a miss.
//   mem_req/mem_line   - line refill request, held until the last beat.
//   mem_beat_valid/mem_beat_data - refill beats, in address order.
//   ev_hit/ev_miss     - one-cycle event pulses for statistics.
// Timing of a miss: refill beats + 2 cycles after the request was taken
// plus the arbiter and memory latency.
//
// Follows the source design: direct use of the tag memory in distributed
// logic, one-cycle hit, line fill from the shared memory, replacement
// policies, tag written when the data arrives. Own choices: blocking on a
// miss (no hits under a miss), the fill order, and reading only (the
// write-allocate path is not part of this block).
module vcs_cache
  import vcs_pkg::*;
#(
  parameter policy_e POLICY     = POL_LRU,
  parameter int      NLINES     = 32,
  parameter int      LINE_WORDS = 512,
  parameter int      HR_W       = 8,
  parameter int      PAR        = 2
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               req_valid,
  input  addr_t                              req_addr,
  output logic                               ready,
  output logic                               rd_valid,
  output data_t                              rd_data,
  output logic                               mem_req,
  output logic [ADDR_W-$clog2(LINE_WORDS)-1:0] mem_line,
  input  logic                               mem_beat_valid,
  input  beat_t                              mem_beat_data,
  output logic                               ev_hit,
  output logic                               ev_miss
);

  localparam int OFF_W = $clog2(LINE_WORDS);
  localparam int TAG_W = ADDR_W - OFF_W;
  localparam int IW    = $clog2(NLINES);
  localparam int BEATS = LINE_WORDS / BEAT_WORDS;
  localparam int BW    = $clog2(BEATS);

  typedef enum logic [1:0] {S_IDLE, S_FILL, S_REPLAY} state_e;

  state_e            state_q;
  logic [TAG_W-1:0]  tag_q;
  logic [OFF_W-1:0]  off_q;
  logic [BW-1:0]     beat_q;

  logic              hit;
  logic [NLINES-1:0] hit_vec, valid;
  logic [IW-1:0]     hit_idx;
  logic              victim_ready;
  logic [IW-1:0]     victim_idx;

  logic              lookup, is_hit, is_miss, last_beat;
  logic [NLINES-1:0] acc, fill;
  logic              ram_rd;
  logic [IW+OFF_W-1:0] ram_addr;

  vcs_assoc_mem #(.NLINES(NLINES), .TAG_W(TAG_W)) u_tags (
    .clk, .rst_n,
    .lookup_tag(req_addr[ADDR_W-1:OFF_W]),
    .hit, .hit_vec, .hit_idx,
    .wr_en (last_beat),
    .wr_idx(victim_idx),
    .wr_tag(tag_q),
    .valid
  );

  assign lookup    = (state_q == S_IDLE) && req_valid;
  assign is_hit    = lookup && hit;
  assign is_miss   = lookup && !hit;
  assign last_beat = (state_q == S_FILL) && mem_beat_valid && (int'(beat_q) == BEATS - 1);

  always_comb begin
    acc  = '0;
    fill = '0;
    if (is_hit)                 acc = hit_vec;
    if (state_q == S_REPLAY)    acc[victim_idx] = 1'b1;
    if (last_beat)              fill[victim_idx] = 1'b1;
  end

  vcs_repl #(.POLICY(POLICY), .NLINES(NLINES), .HR_W(HR_W), .PAR(PAR)) u_repl (
    .clk, .rst_n, .acc, .fill, .valid,
    .find(is_miss), .victim_ready, .victim_idx
  );

  always_comb begin
    ram_rd   = is_hit || (state_q == S_REPLAY);
    ram_addr = is_hit ? {hit_idx, req_addr[OFF_W-1:0]} : {victim_idx, off_q};
  end

  vcs_line_ram #(.NLINES(NLINES), .LINE_WORDS(LINE_WORDS)) u_ram (
    .clk,
    .wr_en  ((state_q == S_FILL) && mem_beat_valid),
    .wr_row ({victim_idx, beat_q}),
    .wr_data(mem_beat_data),
    .rd_en  (ram_rd),
    .rd_addr(ram_addr),
    .rd_data
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      tag_q    <= '0;
      off_q    <= '0;
      beat_q   <= '0;
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= ram_rd;
      unique case (state_q)
        S_IDLE: if (is_miss) begin
          state_q <= S_FILL;
          tag_q   <= req_addr[ADDR_W-1:OFF_W];
          off_q   <= req_addr[OFF_W-1:0];
          beat_q  <= '0;
        end
        S_FILL: if (mem_beat_valid) begin
          beat_q <= beat_q + 1'b1;
          if (last_beat) state_q <= S_REPLAY;
        end
        S_REPLAY: state_q <= S_IDLE;
        default:  state_q <= S_IDLE;
      endcase
    end
  end

  assign ready    = (state_q == S_IDLE);
  assign mem_req  = (state_q == S_FILL);
  assign mem_line = tag_q;
  assign ev_hit   = is_hit;
  assign ev_miss  = is_miss;

  // The victim must be known when the first refill beat arrives.
  a_victim_in_time: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_FILL && mem_beat_valid) |-> victim_ready);
  a_no_beat_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    mem_beat_valid |-> state_q == S_FILL);

endmodule
