// tb_vcs_assoc_mem: fills the tag memory with random distinct tags in
// random order and checks combinational hits, the hit index and one-hot
// vector, and misses for tags never written, against a reference array.
module tb_vcs_assoc_mem;
  localparam int NLINES = 32;
  localparam int TAG_W  = 18;
  localparam int IW     = $clog2(NLINES);

  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [TAG_W-1:0]  lookup_tag = '0, wr_tag = '0;
  logic [IW-1:0]     wr_idx = '0;
  logic              hit;
  logic [NLINES-1:0] hit_vec, valid;
  logic [IW-1:0]     hit_idx;

  vcs_assoc_mem #(.NLINES(NLINES), .TAG_W(TAG_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [TAG_W-1:0] ref_tag [NLINES];
  bit               ref_v   [NLINES];

  task automatic look(logic [TAG_W-1:0] t);
    int exp_idx;
    exp_idx = -1;
    for (int l = 0; l < NLINES; l++) if (ref_v[l] && ref_tag[l] == t) exp_idx = l;
    lookup_tag = t;
    #1;
    checks++;
    if (hit !== (exp_idx >= 0)) begin
      failures++;
      $display("FAIL tag %h hit %0b exp %0b", t, hit, exp_idx >= 0);
    end else if (exp_idx >= 0) begin
      checks++;
      if (int'(hit_idx) != exp_idx || hit_vec != (NLINES'(1) << exp_idx)) begin
        failures++;
        $display("FAIL tag %h idx %0d exp %0d", t, hit_idx, exp_idx);
      end
    end
  endtask

  initial begin
    for (int l = 0; l < NLINES; l++) begin ref_v[l] = 0; ref_tag[l] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (valid != '0) begin failures++; $display("FAIL valid after reset"); end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      // Write a tag that is not stored elsewhere (tags are unique per line).
      wr_idx = $urandom_range(0, NLINES - 1);
      wr_tag = TAG_W'($urandom_range(0, 63));
      for (int l = 0; l < NLINES; l++)
        if (l != int'(wr_idx) && ref_v[l] && ref_tag[l] == wr_tag) wr_tag = TAG_W'(64 + n);
      wr_en = 1;
      @(posedge clk);
      #1;
      wr_en = 0;
      ref_v[wr_idx]   = 1;
      ref_tag[wr_idx] = wr_tag;
      look(wr_tag);
      look(TAG_W'($urandom_range(0, 127)));
      look(TAG_W'(n + 64));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
