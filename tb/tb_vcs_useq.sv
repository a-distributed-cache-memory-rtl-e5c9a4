// tb_vcs_useq: loads a program with repeats, a counted loop and a halt,
// runs it with random stalls, and compares the issued lane commands, vector
// ids, enables and datapath configuration, cycle by cycle, with a trace
// produced by interpreting the same program here. Checks one instruction
// per non-stalled cycle, held outputs during stalls, and the done pulse.
module tb_vcs_useq;
  import vcs_pkg::*;

  localparam int NC = 2, UC_DEPTH = 16, DPC_W = 8, REP_W = 8;
  localparam int VID_W = $clog2(MAX_VEC), PC_W = $clog2(UC_DEPTH);
  localparam int LW = 1 + VID_W + 4;
  localparam int UIW = NC * LW + DPC_W + 2 * REP_W + PC_W + 2;

  logic clk = 0, rst_n = 0, ld_en = 0, start = 0, stall = 0;
  logic [PC_W-1:0] ld_addr = '0;
  logic [UIW-1:0] ld_data = '0;
  logic busy, done, dp_valid;
  logic [NC-1:0] lane_valid;
  cmd_e [NC-1:0] lane_cmd;
  logic [NC-1:0][VID_W-1:0] lane_vid;
  logic [DPC_W-1:0] dp_cfg;

  vcs_useq #(.NC(NC), .UC_DEPTH(UC_DEPTH), .DPC_W(DPC_W), .REP_W(REP_W)) dut (.*);

  always #5 clk = ~clk;

  // program held here as separate fields
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

  int checks = 0, failures = 0;
  int trace [$];   // instruction address per issue
  int dones = 0;

  initial begin
    int pc, rep, loop, n, issued, stalls, cyc;
    // random lane fields
    for (int a = 0; a < UC_DEPTH; a++) begin
      for (int c = 0; c < NC; c++) begin
        p_en[a][c] = $urandom_range(0, 1); p_vid[a][c] = $urandom_range(0, 7);
        p_cmd[a][c] = $urandom_range(0, 13);
      end
      p_cfg[a] = $urandom_range(0, 255); p_rep[a] = 0; p_br[a] = 0;
      p_tgt[a] = 0; p_cnt[a] = 0; p_halt[a] = 0;
    end
    // 0: once; 1: x3; 2: x1, loop back to 1 twice more; 3: x2; 4: halt
    p_rep[1] = 2;
    p_br[2] = 1; p_tgt[2] = 1; p_cnt[2] = 2;
    p_rep[3] = 1;
    p_halt[4] = 1;
    // expected trace
    pc = 0; loop = 0;
    forever begin
      for (int r = 0; r <= p_rep[pc]; r++) trace.push_back(pc);
      if (p_halt[pc]) break;
      if (p_br[pc] && loop < p_cnt[pc]) begin loop++; pc = p_tgt[pc]; end
      else begin if (p_br[pc]) loop = 0; pc++; end
    end

    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < UC_DEPTH; a++) begin
      @(negedge clk);
      ld_en = 1; ld_addr = a; ld_data = pack(a);
    end
    @(negedge clk);
    ld_en = 0;
    for (int run = 0; run < 2; run++) begin
      start = 1;
      @(negedge clk);
      start = 0;
      n = 0; issued = 0; stalls = 0; cyc = 0;
      while (busy && cyc < 500) begin
        stall = ($urandom_range(0, 3) == 0);
        #1;
        checks++;
        if (n >= trace.size()) begin
          failures++; $display("FAIL issue beyond the program"); break;
        end
        begin
          int a;
          bit ok;
          a = trace[n];
          ok = dp_valid && int'(dp_cfg) == p_cfg[a];
          for (int c = 0; c < NC; c++)
            ok &= (lane_valid[c] == p_en[a][c]) && (int'(lane_cmd[c]) == p_cmd[a][c])
                  && (int'(lane_vid[c]) == p_vid[a][c]);
          if (!ok) begin
            failures++;
            $display("FAIL run %0d issue %0d: outputs differ from instruction %0d", run, n, a);
          end
        end
        @(posedge clk);
        if (!stall) begin n++; issued++; end else stalls++;
        @(negedge clk);
        cyc++;
      end
      stall = 0;
      checks++;
      if (issued != trace.size() || cyc != trace.size() + stalls) begin
        failures++;
        $display("FAIL run %0d issued %0d of %0d in %0d cycles with %0d stalls",
                 run, issued, trace.size(), cyc, stalls);
      end
      repeat (3) @(negedge clk);
    end
    checks++;
    if (dones != 2) begin failures++; $display("FAIL done pulses: %0d", dones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && done) dones++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
