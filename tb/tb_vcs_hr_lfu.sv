// tb_vcs_hr_lfu: drives random read hits (skewed towards a few lines, so
// registers reach their maximum and the halving step happens) and random
// refills, and compares every history register each cycle with a reference
// model of the LFU rule. Uses 4-bit registers so the maximum is reached
// often.
module tb_vcs_hr_lfu;
  localparam int NLINES = 8;
  localparam int HR_W   = 4;
  localparam int MAXV   = (1 << HR_W) - 1;

  logic clk = 0, rst_n = 0;
  logic [NLINES-1:0]           acc = '0, clr = '0;
  logic [NLINES-1:0][HR_W-1:0] hr;

  vcs_hr_lfu #(.NLINES(NLINES), .HR_W(HR_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int model [NLINES];
  int halvings = 0, clears = 0;

  initial begin
    int l, c;
    for (int i = 0; i < NLINES; i++) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      l   = ($urandom_range(0, 1) == 0) ? $urandom_range(0, 1) : $urandom_range(0, NLINES - 1);
      acc = ($urandom_range(0, 4) == 0) ? '0 : NLINES'(1) << l;
      c   = $urandom_range(0, NLINES - 1);
      clr = ($urandom_range(0, 19) == 0 && c != l) ? NLINES'(1) << c : '0;
      @(posedge clk);
      #1;
      if (acc != '0 && model[l] == MAXV) begin
        halvings++;
        for (int i = 0; i < NLINES; i++)
          model[i] = (i == l) ? (1 << (HR_W - 1)) : model[i] / 2;
      end else if (acc != '0) begin
        model[l]++;
      end
      if (clr != '0) begin model[c] = 0; clears++; end
      for (int i = 0; i < NLINES; i++) begin
        checks++;
        if (int'(hr[i]) != model[i]) begin
          failures++;
          $display("FAIL n=%0d hr[%0d]=%0d exp %0d", n, i, hr[i], model[i]);
        end
      end
    end
    checks++;
    if (halvings == 0 || clears == 0) begin
      failures++;
      $display("FAIL halving (%0d) or clear (%0d) never seen", halvings, clears);
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
