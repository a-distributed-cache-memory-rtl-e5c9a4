// tb_vcs_hr_lru: drives random line accesses, with runs of repeated
// accesses to one line, and compares every history register each cycle
// with a reference model of the LRU rule: the accessed line goes to all
// ones and the others decrement (not below zero), unless the accessed line
// is already all ones. Also checks that the line picked as oldest by the
// registers is the least recently used one while fewer than 255 accesses
// separate them.
module tb_vcs_hr_lru;
  localparam int NLINES = 8;
  localparam int HR_W   = 8;

  logic clk = 0, rst_n = 0;
  logic [NLINES-1:0]           acc = '0;
  logic [NLINES-1:0][HR_W-1:0] hr;

  vcs_hr_lru #(.NLINES(NLINES), .HR_W(HR_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int model [NLINES];
  int last_use [NLINES];
  int skipped = 0;

  initial begin
    int l, t;
    for (int i = 0; i < NLINES; i++) begin model[i] = 0; last_use[i] = -1000 - i; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    l = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 3) != 0) l = $urandom_range(0, NLINES - 1);  // else repeat
      acc = ($urandom_range(0, 5) == 0) ? '0 : NLINES'(1) << l;
      @(posedge clk);
      #1;
      if (acc != '0) begin
        if (model[l] != 255) begin
          for (int i = 0; i < NLINES; i++)
            if (i == l) model[i] = 255;
            else if (model[i] > 0) model[i]--;
        end else skipped++;
        last_use[l] = n;
      end
      for (int i = 0; i < NLINES; i++) begin
        checks++;
        if (int'(hr[i]) != model[i]) begin
          failures++;
          $display("FAIL n=%0d hr[%0d]=%0d exp %0d", n, i, hr[i], model[i]);
        end
      end
      // oldest by registers == least recently used (all lines used once)
      if (n > 100) begin
        int mi, lu;
        mi = 0; lu = 0;
        for (int i = 1; i < NLINES; i++) begin
          if (hr[i] < hr[mi]) mi = i;
          if (last_use[i] < last_use[lu]) lu = i;
        end
        checks++;
        if (hr[mi] != hr[lu]) begin
          failures++;
          $display("FAIL n=%0d oldest by HR %0d, least recently used %0d", n, mi, lu);
        end
      end
    end
    checks++;
    if (skipped == 0) begin failures++; $display("FAIL repeated access never seen"); end
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
