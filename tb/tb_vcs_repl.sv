// tb_vcs_repl: runs the same random sequence of read hits and refills
// through a FIFO, an LRU and an LFU replacement unit side by side. For each
// refill it asks for a victim and checks it against reference models: FIFO
// takes lines in written order; LRU and LFU take an empty line first (lowest
// index), else the line with the smallest history value, modelled here with
// the history rules of each policy. Also checks when the victim becomes
// ready (1 cycle for FIFO, NLINES/PAR cycles for LRU/LFU) and that it
// holds through the refill of the chosen line.
module tb_vcs_repl;
  import vcs_pkg::*;
  localparam int NLINES = 8;
  localparam int HR_W   = 8;
  localparam int PAR    = 2;
  localparam int IW     = $clog2(NLINES);

  logic clk = 0, rst_n = 0, find = 0;
  logic [NLINES-1:0] acc = '0, fill = '0, valid = '0;
  logic [2:0]        vr;
  logic [IW-1:0]     vi [3];

  vcs_repl #(.POLICY(POL_FIFO), .NLINES(NLINES), .HR_W(HR_W), .PAR(PAR)) u_fifo (
    .clk, .rst_n, .acc, .fill, .valid, .find, .victim_ready(vr[0]), .victim_idx(vi[0]));
  vcs_repl #(.POLICY(POL_LRU), .NLINES(NLINES), .HR_W(HR_W), .PAR(PAR)) u_lru (
    .clk, .rst_n, .acc, .fill, .valid, .find, .victim_ready(vr[1]), .victim_idx(vi[1]));
  vcs_repl #(.POLICY(POL_LFU), .NLINES(NLINES), .HR_W(HR_W), .PAR(PAR)) u_lfu (
    .clk, .rst_n, .acc, .fill, .valid, .find, .victim_ready(vr[2]), .victim_idx(vi[2]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int lru [NLINES], lfu [NLINES];
  int fifo_ptr = 0;
  int evictions = 0;

  function automatic int pick(int h [NLINES]);
    int best;
    best = 0;
    for (int l = 1; l < NLINES; l++)
      if ({valid[l], 8'(h[l])} < {valid[best], 8'(h[best])}) best = l;
    return best;
  endfunction

  task automatic hit_line(int l);
    @(negedge clk);
    acc = NLINES'(1) << l;
    @(negedge clk);
    acc = '0;
    if (lru[l] != 255)
      for (int i = 0; i < NLINES; i++) lru[i] = (i == l) ? 255 : (lru[i] > 0 ? lru[i] - 1 : 0);
    if (lfu[l] == 255)
      for (int i = 0; i < NLINES; i++) lfu[i] = (i == l) ? 128 : lfu[i] / 2;
    else lfu[l]++;
  endtask

  task automatic refill(int policy);
    int exp_v, cyc, v;
    int tbl [NLINES];
    if (policy == 0) exp_v = fifo_ptr;
    else if (policy == 1) exp_v = pick(lru);
    else exp_v = pick(lfu);
    @(negedge clk);
    find = 1;
    @(negedge clk);
    find = 0;
    cyc = 1;
    while (!vr[policy] && cyc < 50) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != ((policy == 0) ? 1 : NLINES / PAR)) begin
      failures++;
      $display("FAIL policy %0d victim after %0d cycles", policy, cyc);
    end
    v = int'(vi[policy]);
    checks++;
    if (v != exp_v) begin
      failures++;
      $display("FAIL policy %0d victim %0d expected %0d", policy, v, exp_v);
    end
    if (valid[v]) evictions++;
    // refill the chosen line in all three units (the FIFO pointer and
    // the history of the others all see it)
    fill = NLINES'(1) << v;
    @(negedge clk);
    fill = '0;
    // the victim must stay put after the refill, until the next find
    checks++;
    if (int'(vi[policy]) != v || !vr[policy]) begin
      failures++;
      $display("FAIL policy %0d victim changed to %0d after refill of %0d", policy, vi[policy], v);
    end
    valid[v] = 1'b1;
    fifo_ptr = (fifo_ptr + 1) % NLINES;
    if (lru[v] != 255)
      for (int i = 0; i < NLINES; i++) lru[i] = (i == v) ? 255 : (lru[i] > 0 ? lru[i] - 1 : 0);
    lfu[v] = 0;
  endtask

  initial begin
    for (int i = 0; i < NLINES; i++) begin lru[i] = 0; lfu[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int k;
      k = $urandom_range(0, 6);
      for (int h = 0; h < k; h++) begin
        int l;
        l = $urandom_range(0, NLINES - 1);
        if (valid[l]) hit_line(l);
      end
      refill(n % 3);
    end
    checks++;
    if (evictions == 0) begin failures++; $display("FAIL no eviction of a valid line"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
