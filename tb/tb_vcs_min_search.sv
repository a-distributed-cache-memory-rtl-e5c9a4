// tb_vcs_min_search: random key sets (with many equal keys) for the default
// 32 lines, 2 keys per cycle. Checks the index of the smallest key (lowest
// index on ties) and that done arrives exactly 16 cycles after start.
module tb_vcs_min_search;
  localparam int NLINES = 32;
  localparam int KEY_W  = 9;
  localparam int PAR    = 2;
  localparam int STEPS  = (NLINES + PAR - 1) / PAR;

  logic clk = 0, rst_n = 0, start = 0;
  logic [NLINES-1:0][KEY_W-1:0] keys = '0;
  logic busy, done;
  logic [$clog2(NLINES)-1:0] min_idx;

  vcs_min_search #(.NLINES(NLINES), .KEY_W(KEY_W), .PAR(PAR)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    int exp_idx, cyc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      for (int l = 0; l < NLINES; l++)
        keys[l] = (n % 3 == 0) ? KEY_W'($urandom_range(0, 7)) : KEY_W'($urandom_range(0, 511));
      exp_idx = 0;
      for (int l = 1; l < NLINES; l++) if (keys[l] < keys[exp_idx]) exp_idx = l;
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done && cyc < 100) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != STEPS) begin
        failures++;
        $display("FAIL n=%0d search took %0d cycles, expected %0d", n, cyc, STEPS);
      end
      checks++;
      if (int'(min_idx) != exp_idx) begin
        failures++;
        $display("FAIL n=%0d min_idx %0d exp %0d", n, min_idx, exp_idx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
