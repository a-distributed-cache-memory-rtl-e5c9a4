// tb_vcs_top: end-to-end run of the whole memory system at its default
// size (4 caches of 32 lines x 512 words, LRU, two 32x32x16 vectors per
// cache) against the behavioural DRAM model (22-cycle latency).
//
// A microcode program is loaded and run: it first sweeps both vectors of
// every cache along k and j (touching more lines than a cache holds, so
// lines are evicted), then runs a block of random iteration commands three
// times through a counted loop. The expected operand sets are produced by
// interpreting the same program here with an (i, j, k) index model per
// vector; each expected word is the memory contents at
// START + i + NI*j + NI*NJ*k. Every operand set leaving the system is
// compared, in order, with that list (configuration, lane mask, words).
//
// It also counts the mechanisms of the design and fails if one never
// happened: hits, misses, evictions of a valid line, stalls, arbitration
// between several waiting caches, repeated instructions, a taken loop
// branch, and each of the 14 iteration commands. It checks that the
// sequencer issues one instruction per cycle whenever nothing stalls.
module tb_vcs_top;
  import vcs_pkg::*;
  import vcs_tb_pkg::*;

  localparam int NC = 4, UC_DEPTH = 64, DPC_W = 8, REP_W = 8, NVEC = 2;
  localparam int VID_W = $clog2(MAX_VEC), PC_W = $clog2(UC_DEPTH);
  localparam int LW = 1 + VID_W + 4;
  localparam int UIW = NC * LW + DPC_W + 2 * REP_W + PC_W + 2;
  localparam sys_vec_tab_t VT = default_sys_tab();

  logic clk = 0, rst_n = 0;
  logic uc_ld_en = 0, start = 0;
  logic [PC_W-1:0] uc_ld_addr = '0;
  logic [UIW-1:0] uc_ld_data = '0;
  logic busy, done, op_valid, stall, ev_conflict;
  logic [DPC_W-1:0] op_cfg;
  logic [NC-1:0] op_mask, ev_hit, ev_miss;
  data_t [NC-1:0] op_data;
  logic mem_cmd_valid, mem_cmd_ready, mem_rd_valid;
  blk_addr_t mem_cmd_blk;
  beat_t mem_rd_data;

  vcs_top dut (.*);

  vcs_ddr_model #(.LAT(22)) u_mem (
    .clk, .rst_n, .cmd_valid(mem_cmd_valid), .cmd_ready(mem_cmd_ready),
    .cmd_blk(mem_cmd_blk), .rd_valid(mem_rd_valid), .rd_data(mem_rd_data));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- program ----------------
  int p_en [UC_DEPTH][NC], p_vid [UC_DEPTH][NC], p_cmd [UC_DEPTH][NC];
  int p_cfg [UC_DEPTH], p_rep [UC_DEPTH], p_br [UC_DEPTH], p_tgt [UC_DEPTH];
  int p_cnt [UC_DEPTH], p_halt [UC_DEPTH];

  function automatic logic [UIW-1:0] pack(int a);
    logic [UIW-1:0] w;
    w = '0;
    for (int c = 0; c < NC; c++)
      w[UIW-1-(NC-1-c)*LW -: LW] = {1'(p_en[a][c]), VID_W'(p_vid[a][c]), 4'(p_cmd[a][c])};
    w[2*REP_W+PC_W+2 +: DPC_W] = DPC_W'(p_cfg[a]);
    w[REP_W+PC_W+2 +: REP_W]   = REP_W'(p_rep[a]);
    w[REP_W+PC_W+1]            = 1'(p_br[a]);
    w[REP_W+1 +: PC_W]         = PC_W'(p_tgt[a]);
    w[1 +: REP_W]              = REP_W'(p_cnt[a]);
    w[0]                       = 1'(p_halt[a]);
    return w;
  endfunction

  task automatic set_all(int a, int vid, int cmd, int rep);
    for (int c = 0; c < NC; c++) begin p_en[a][c] = 1; p_vid[a][c] = vid; p_cmd[a][c] = cmd; end
    p_rep[a] = rep;
  endtask

  // ---------------- reference model ----------------
  int ix [NC][NVEC], jx [NC][NVEC], kx [NC][NVEC];
  int cmd_used [16];
  int reps_used = 0, branches_taken = 0;

  typedef struct {
    int          cfg;
    logic [NC-1:0] mask;
    data_t       w [NC];
  } opset_t;
  opset_t exp_q [$];

  function automatic addr_t ref_addr(int c, int v);
    vec_desc_t d;
    longint a;
    d = VT[c][v];
    a = longint'(d.start) + ix[c][v] + longint'(d.ni) * jx[c][v]
      + longint'(d.ni) * d.nj * kx[c][v];
    return addr_t'(a);
  endfunction

  task automatic step(int c, int v, int cmd);
    vec_desc_t d;
    d = VT[c][v];
    case (cmd)
      1: ix[c][v]++;   2: ix[c][v]--;
      3: jx[c][v]++;   4: jx[c][v]--;
      5: kx[c][v]++;   6: kx[c][v]--;
      7: begin ix[c][v] = 0; jx[c][v] = 0; kx[c][v] = 0; end
      8: ix[c][v] = 0; 9: jx[c][v] = 0; 10: kx[c][v] = 0;
      11: ix[c][v] = d.ni - 1; 12: jx[c][v] = d.nj - 1; 13: kx[c][v] = d.nk - 1;
      default: ;
    endcase
  endtask

  task automatic issue(int a);
    opset_t o;
    o.cfg = p_cfg[a];
    o.mask = '0;
    for (int c = 0; c < NC; c++) begin
      o.w[c] = '0;
      if (p_en[a][c]) begin
        step(c, p_vid[a][c], p_cmd[a][c]);
        o.mask[c] = 1'b1;
        o.w[c] = mem_word(ref_addr(c, p_vid[a][c]));
        cmd_used[p_cmd[a][c]]++;
      end
    end
    exp_q.push_back(o);
  endtask

  // ---------------- monitors ----------------
  int hits = 0, misses = 0, evictions = 0, stall_cycles = 0, conflicts = 0;
  int ops = 0, busy_free_cycles = 0;

  for (genvar c = 0; c < NC; c++) begin : g_mon
    always @(posedge clk) if (rst_n && ev_miss[c] && &dut.g_lane[c].u_cache.valid) evictions++;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      for (int c = 0; c < NC; c++) begin
        if (ev_hit[c]) hits++;
        if (ev_miss[c]) misses++;
      end
      if (stall) stall_cycles++;
      if (ev_conflict) conflicts++;
      if (busy && !stall) busy_free_cycles++;
      if (op_valid) begin
        opset_t o;
        ops++;
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL unexpected operand set %0d", ops);
        end else begin
          bit ok;
          o = exp_q.pop_front();
          ok = (int'(op_cfg) == o.cfg) && (op_mask == o.mask);
          for (int c = 0; c < NC; c++) if (o.mask[c] && op_data[c] !== o.w[c]) ok = 0;
          if (!ok) begin
            failures++;
            if (failures < 10)
              $display("FAIL operand set %0d: cfg %0d/%0d mask %b/%b data %h %h %h %h / %h %h %h %h",
                       ops, op_cfg, o.cfg, op_mask, o.mask, op_data[0], op_data[1], op_data[2],
                       op_data[3], o.w[0], o.w[1], o.w[2], o.w[3]);
          end
        end
      end
    end
  end

  // ---------------- stimulus ----------------
  initial begin
    int pc, loop, issues;
    for (int a = 0; a < UC_DEPTH; a++) begin
      for (int c = 0; c < NC; c++) begin
        p_en[a][c] = $urandom_range(0, 3) != 0;
        p_vid[a][c] = $urandom_range(0, NVEC - 1);
        p_cmd[a][c] = $urandom_range(0, 13);
      end
      p_cfg[a] = $urandom_range(0, 255);
      p_rep[a] = $urandom_range(0, 3);
      p_br[a] = 0; p_tgt[a] = 0; p_cnt[a] = 0; p_halt[a] = 0;
    end
    for (int c = 0; c < NC; c++) for (int v = 0; v < NVEC; v++) begin
      ix[c][v] = 0; jx[c][v] = 0; kx[c][v] = 0;
    end
    set_all(0, 0, 7, 0);    // A[0,0,0]
    set_all(1, 1, 7, 0);    // B[0,0,0]
    set_all(2, 0, 5, 14);   // A[i,j,k++] x15
    set_all(3, 1, 5, 14);   // B[i,j,k++] x15
    set_all(4, 0, 3, 30);   // A[i,j++,k] x31
    set_all(5, 1, 12, 0);   // B[i,NJ-1,k]
    p_br[41] = 1; p_tgt[41] = 6; p_cnt[41] = 2;
    p_halt[42] = 1;

    // expected operand sets
    pc = 0; loop = 0; issues = 0;
    forever begin
      for (int r = 0; r <= p_rep[pc]; r++) begin issue(pc); issues++; if (r > 0) reps_used++; end
      if (p_halt[pc]) break;
      if (p_br[pc] && loop < p_cnt[pc]) begin loop++; pc = p_tgt[pc]; branches_taken++; end
      else begin if (p_br[pc]) loop = 0; pc++; end
    end

    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < UC_DEPTH; a++) begin
      @(negedge clk);
      uc_ld_en = 1; uc_ld_addr = a; uc_ld_data = pack(a);
    end
    @(negedge clk);
    uc_ld_en = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    // the last operand sets may still wait for a refill
    for (int n = 0; n < 5000 && exp_q.size() != 0; n++) @(negedge clk);
    repeat (5) @(negedge clk);

    checks++;
    if (exp_q.size() != 0 || ops != issues) begin
      failures++;
      $display("FAIL %0d operand sets received, %0d expected", ops, issues);
    end
    checks++;
    if (busy_free_cycles != issues) begin
      failures++;
      $display("FAIL %0d instructions issued in %0d unstalled cycles", issues, busy_free_cycles);
    end
    begin
      int missing;
      missing = 0;
      for (int c = 0; c < 14; c++) if (cmd_used[c] == 0) missing++;
      checks++;
      if (missing != 0) begin failures++; $display("FAIL %0d commands never used", missing); end
    end
    checks++;
    if (hits == 0 || misses == 0 || evictions == 0 || stall_cycles == 0 || conflicts == 0
        || reps_used == 0 || branches_taken == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("operand sets %0d, hits %0d, misses %0d, evictions %0d, stall cycles %0d, contended grants %0d, repeats %0d, loop branches %0d",
             ops, hits, misses, evictions, stall_cycles, conflicts, reps_used, branches_taken);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
