// vcs_arbiter: shares the one external memory between all caches.
//
// Every cache that misses raises its line request. When the arbiter is free
// it grants the requesting cache with the highest priority and keeps that
// grant for the whole line. Each cache has a fixed 4-bit priority level in
// the PRIO parameter (higher wins); equal levels go to the lower cache
// index, so the default (all zero) serves cache 0 first, then 1, and so on. It sends the line to
// the memory interface as LINE_WORDS/8 read commands, one per 32-byte block,
// in address order, as fast as the interface accepts them, and routes every
// returning 128-bit beat to the granted cache. After the last of the
// 2*LINE_WORDS/8 beats it becomes free and arbitrates again on the next
// cycle; the other caches wait with their requests raised.
//
// Interface:
//   req[c]/line[c]      - line request and line number of cache c.
//   beat_valid[c]       - a beat for cache c this cycle, data on beat_data.
//   mem_cmd_valid/mem_cmd_ready/mem_cmd_blk - read command of one 32-byte
//                         block (block address = word address / 8); a
//                         command is taken when valid and ready are high.
//   mem_rd_valid/mem_rd_data - beats returned by the interface, in order.
//   ev_conflict         - pulses when a grant is made while another cache
//                         also waits.
//
// Follows the source design: one control module for the shared memory,
// predefined priorities per cache, 32-byte reads in two 128-bit beats.
// Own choices: 4-bit priority levels with ties to the lower index,
// whole-line grants, no write port.
module vcs_arbiter
  import vcs_pkg::*;
#(
  parameter int                NC         = 4,
  parameter int                LINE_WORDS = 512,
  parameter logic [NC-1:0][3:0] PRIO      = '0   // priority level per cache
) (
  input  logic                                      clk,
  input  logic                                      rst_n,
  input  logic [NC-1:0]                             req,
  input  logic [NC-1:0][ADDR_W-$clog2(LINE_WORDS)-1:0] line,
  output logic [NC-1:0]                             beat_valid,
  output beat_t                                     beat_data,
  output logic                                      mem_cmd_valid,
  input  logic                                      mem_cmd_ready,
  output blk_addr_t                                 mem_cmd_blk,
  input  logic                                      mem_rd_valid,
  input  beat_t                                     mem_rd_data,
  output logic                                      ev_conflict
);

  localparam int BLKS   = LINE_WORDS / BLOCK_WORDS;   // commands per line
  localparam int BEATS  = LINE_WORDS / BEAT_WORDS;    // beats per line
  localparam int CW     = $clog2(BLKS + 1);
  localparam int BTW    = $clog2(BEATS + 1);
  localparam int GW     = (NC > 1) ? $clog2(NC) : 1;
  localparam int BOFF_W = $clog2(BLKS);

  logic              busy_q;
  logic [GW-1:0]     own_q;
  logic [CW-1:0]     cmd_q;
  logic [BTW-1:0]    beat_q;

  logic              pick;
  logic [GW-1:0]     pick_idx;

  // Highest PRIO level wins; among equal levels the lowest index.
  always_comb begin
    logic [3:0] lvl;
    pick     = 1'b0;
    pick_idx = '0;
    lvl      = '0;
    for (int c = 0; c < NC; c++) begin
      if (req[c] && (!pick || PRIO[c] > lvl)) begin
        pick     = 1'b1;
        pick_idx = GW'(c);
        lvl      = PRIO[c];
      end
    end
  end

  assign mem_cmd_valid = busy_q && (int'(cmd_q) < BLKS);
  if (BLKS > 1) begin : g_blk
    assign mem_cmd_blk = {line[own_q], cmd_q[BOFF_W-1:0]};
  end else begin : g_one
    assign mem_cmd_blk = line[own_q];
  end

  always_comb begin
    beat_valid = '0;
    if (busy_q && mem_rd_valid) beat_valid[own_q] = 1'b1;
  end
  assign beat_data = mem_rd_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q      <= 1'b0;
      own_q       <= '0;
      cmd_q       <= '0;
      beat_q      <= '0;
      ev_conflict <= 1'b0;
    end else begin
      ev_conflict <= 1'b0;
      if (!busy_q) begin
        if (pick) begin
          busy_q      <= 1'b1;
          own_q       <= pick_idx;
          cmd_q       <= '0;
          beat_q      <= '0;
          ev_conflict <= (req & (req - 1'b1)) != '0;
        end
      end else begin
        if (mem_cmd_valid && mem_cmd_ready) cmd_q <= cmd_q + 1'b1;
        if (mem_rd_valid) begin
          beat_q <= beat_q + 1'b1;
          if (int'(beat_q) == BEATS - 1) busy_q <= 1'b0;
        end
      end
    end
  end

  a_cmd_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (mem_cmd_valid && !mem_cmd_ready) |=> (mem_cmd_valid && $stable(mem_cmd_blk)));
  a_no_stray_beat: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rd_valid |-> busy_q);

endmodule
