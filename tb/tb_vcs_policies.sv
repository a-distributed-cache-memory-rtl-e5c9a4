// tb_vcs_policies: runs the whole memory system three times side by side at
// a reduced size (vcs_sys_bench), once with each replacement policy: FIFO,
// LRU and LFU (LFU with 4-bit history registers so that the halving step
// occurs). Each run checks every operand set against a reference model and
// requires misses, evictions, stalls and contended memory grants. Passes
// when all three do.
module tb_vcs_policies;
  import vcs_pkg::*;

  logic [2:0] fin;
  int         ch [3], fl [3];
  int         lfu_halvings = 0;

  vcs_sys_bench #(.POLICY(POL_FIFO))           b_fifo (.finished(fin[0]), .checks(ch[0]), .failures(fl[0]));
  vcs_sys_bench #(.POLICY(POL_LRU))            b_lru  (.finished(fin[1]), .checks(ch[1]), .failures(fl[1]));
  vcs_sys_bench #(.POLICY(POL_LFU), .HR_W(4))  b_lfu  (.finished(fin[2]), .checks(ch[2]), .failures(fl[2]));

  // halving events of the LFU history registers in lane 0
  always @(posedge b_lfu.clk)
    if (b_lfu.rst_n && b_lfu.dut.g_lane[0].u_cache.u_repl.g_hist.g_lfu.u_hr.div2) lfu_halvings++;

  initial begin
    int checks, failures;
    wait (fin == 3'b111);
    checks   = ch[0] + ch[1] + ch[2] + 1;
    failures = fl[0] + fl[1] + fl[2];
    if (lfu_halvings == 0) begin
      failures++;
      $display("FAIL LFU halving never happened");
    end
    $display("LFU halvings in lane 0: %0d", lfu_halvings);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    $display("TB_RESULT checks=%0d failures=%0d", ch[0] + ch[1] + ch[2], fl[0] + fl[1] + fl[2] + 1);
    $finish;
  end
endmodule
