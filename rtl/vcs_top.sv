// vcs_top: distributed cache memory system for a custom vector datapath.
//
// NC caches, each with its own vector address generator, share one external
// DRAM through the arbiter. A microcode sequencer sends every address
// generator a vector id and an iteration command each cycle, and sends a
// configuration word towards the datapath. The words read from the caches
// are gathered into one operand set per microinstruction and presented with
// that configuration on the op_* outputs, where the application's arithmetic
// datapath connects. The DRAM controller is outside: its read-command and
// read-data channels are the mem_* ports.
//
// Pipeline (no miss): sequencer instruction in cycle t, addresses registered
// in the address generators at t+1 and looked up in the caches in that cycle,
// words out of the caches at t+2, operand set on op_* at t+3. One operand set
// per cycle.
//
// Stall: a cache that misses stops accepting requests until its line has
// been refilled. While any cache is busy, stall is high: the sequencer, the
// address generators and the configuration pipeline hold, and no cache is
// sent a request. Words of the other lanes that were already read wait in
// the operand collector, so the set leaves op_* complete and in order.
//
// Interface:
//   uc_ld_en/uc_ld_addr/uc_ld_data - write one microinstruction (layout in
//                                     vcs_useq); start runs the program,
//                                     busy/done report it.
//   op_valid/op_cfg/op_mask/op_data - one operand set: the datapath
//                                     configuration, which lanes were read,
//                                     and their words.
//   mem_cmd_valid/ready/blk         - 32-byte block read commands.
//   mem_rd_valid/mem_rd_data        - returned 128-bit beats, in order,
//                                     two per command.
//   stall                           - a cache is refilling.
//   ev_hit/ev_miss/ev_conflict      - event pulses for performance counters:
//                                     per-lane hit and miss, and a memory
//                                     grant made while another cache waited.
//
// Follows the source design: caches, address generators, vector
// configuration, arbiter, microcode sequencer and their connections, four
// caches of 32 lines of 16 Kbit with LRU replacement. Own choices: the
// operand collector, the stall scheme, and all handshakes. Writes from the
// datapath to memory are not included.
module vcs_top
  import vcs_pkg::*;
#(
  parameter int           NC         = 4,
  parameter int           NLINES     = 32,
  parameter int           LINE_WORDS = 512,
  parameter policy_e      POLICY     = POL_LRU,
  parameter int           HR_W       = 8,
  parameter int           PAR        = 2,
  parameter int           NVEC       = 2,
  parameter int           UC_DEPTH   = 64,
  parameter int           DPC_W      = 8,
  parameter int           REP_W      = 8,
  parameter logic [NC-1:0][3:0] PRIO = '0,   // memory priority per cache
  parameter sys_vec_tab_t VEC_CFG    = default_sys_tab()
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // microcode
  input  logic                         uc_ld_en,
  input  logic [$clog2(UC_DEPTH)-1:0]  uc_ld_addr,
  input  logic [NC*(1+$clog2(MAX_VEC)+4)+DPC_W+2*REP_W+$clog2(UC_DEPTH)+2-1:0] uc_ld_data,
  input  logic                         start,
  output logic                         busy,
  output logic                         done,
  // datapath side
  output logic                         op_valid,
  output logic [DPC_W-1:0]             op_cfg,
  output logic [NC-1:0]                op_mask,
  output data_t [NC-1:0]               op_data,
  output logic                         stall,
  output logic [NC-1:0]                ev_hit,
  output logic [NC-1:0]                ev_miss,
  output logic                         ev_conflict,
  // external memory interface
  output logic                         mem_cmd_valid,
  input  logic                         mem_cmd_ready,
  output blk_addr_t                    mem_cmd_blk,
  input  logic                         mem_rd_valid,
  input  beat_t                        mem_rd_data
);

  localparam int VID_W  = $clog2(MAX_VEC);
  localparam int LINE_W = ADDR_W - $clog2(LINE_WORDS);

  // sequencer outputs
  logic [NC-1:0]             sq_valid;
  cmd_e [NC-1:0]             sq_cmd;
  logic [NC-1:0][VID_W-1:0]  sq_vid;
  logic                      sq_dp_valid;
  logic [DPC_W-1:0]          sq_dp_cfg;

  // address generator outputs
  logic [NC-1:0]             ag_valid;
  addr_t [NC-1:0]            ag_addr;
  logic [NC-1:0][VID_W-1:0]  ag_vid;

  // caches
  logic [NC-1:0]             c_ready, c_rd_valid, c_mem_req, c_beat_valid;
  data_t [NC-1:0]            c_rd_data;
  logic [NC-1:0][LINE_W-1:0] c_mem_line;
  beat_t                     beat_data;

  assign stall = !(&c_ready);

  vcs_useq #(.NC(NC), .UC_DEPTH(UC_DEPTH), .DPC_W(DPC_W), .REP_W(REP_W)) u_seq (
    .clk, .rst_n,
    .ld_en(uc_ld_en), .ld_addr(uc_ld_addr), .ld_data(uc_ld_data),
    .start, .stall, .busy, .done,
    .lane_valid(sq_valid), .lane_cmd(sq_cmd), .lane_vid(sq_vid),
    .dp_valid(sq_dp_valid), .dp_cfg(sq_dp_cfg)
  );

  for (genvar c = 0; c < NC; c++) begin : g_lane
    vcs_addr_gen #(.NVEC(NVEC), .VECS(VEC_CFG[c])) u_ag (
      .clk, .rst_n, .stall,
      .cmd_valid(sq_valid[c]), .cmd(sq_cmd[c]), .vid(sq_vid[c]),
      .addr_valid(ag_valid[c]), .addr(ag_addr[c]), .addr_vid(ag_vid[c])
    );

    vcs_cache #(.POLICY(POLICY), .NLINES(NLINES), .LINE_WORDS(LINE_WORDS),
                .HR_W(HR_W), .PAR(PAR)) u_cache (
      .clk, .rst_n,
      .req_valid(ag_valid[c] && !stall), .req_addr(ag_addr[c]),
      .ready(c_ready[c]),
      .rd_valid(c_rd_valid[c]), .rd_data(c_rd_data[c]),
      .mem_req(c_mem_req[c]), .mem_line(c_mem_line[c]),
      .mem_beat_valid(c_beat_valid[c]), .mem_beat_data(beat_data),
      .ev_hit(ev_hit[c]), .ev_miss(ev_miss[c])
    );
  end

  vcs_arbiter #(.NC(NC), .LINE_WORDS(LINE_WORDS), .PRIO(PRIO)) u_arb (
    .clk, .rst_n,
    .req(c_mem_req), .line(c_mem_line),
    .beat_valid(c_beat_valid), .beat_data,
    .mem_cmd_valid, .mem_cmd_ready, .mem_cmd_blk,
    .mem_rd_valid, .mem_rd_data,
    .ev_conflict
  );

  // Datapath configuration, aligned with the address generator stage.
  logic             dp1_valid;
  logic [DPC_W-1:0] dp1_cfg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp1_valid <= 1'b0;
      dp1_cfg   <= '0;
    end else if (!stall) begin
      dp1_valid <= sq_dp_valid;
      dp1_cfg   <= sq_dp_cfg;
    end
  end

  // Operand collector: one set in flight, completed when every lane that
  // was sent a request has returned its word.
  logic             issue;
  logic             pend_q;
  logic [NC-1:0]    exp_q, got_q;
  logic [DPC_W-1:0] cfg_q;
  data_t [NC-1:0]   dat_q;
  logic             complete;

  assign issue    = dp1_valid && !stall;
  assign complete = pend_q && (((got_q | c_rd_valid) & exp_q) == exp_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q   <= 1'b0;
      exp_q    <= '0;
      got_q    <= '0;
      cfg_q    <= '0;
      op_valid <= 1'b0;
      op_cfg   <= '0;
      op_mask  <= '0;
    end else begin
      op_valid <= complete;
      if (complete) begin
        op_cfg  <= cfg_q;
        op_mask <= exp_q;
      end
      if (issue) begin
        pend_q <= 1'b1;
        exp_q  <= ag_valid;
        cfg_q  <= dp1_cfg;
        got_q  <= '0;
      end else if (complete) begin
        pend_q <= 1'b0;
        got_q  <= '0;
      end else if (pend_q) begin
        got_q  <= got_q | c_rd_valid;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int c = 0; c < NC; c++)
      if (c_rd_valid[c]) dat_q[c] <= c_rd_data[c];
  end

  always_comb begin
    for (int c = 0; c < NC; c++) op_data[c] = dat_q[c];
  end

  // A new set may only be issued when the previous one completes now.
  a_one_in_flight: assert property (@(posedge clk) disable iff (!rst_n)
    (issue && pend_q) |-> complete);

endmodule
