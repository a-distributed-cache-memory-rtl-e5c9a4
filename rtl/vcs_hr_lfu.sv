// vcs_hr_lfu: history registers for the LFU replacement policy.
//
// The registers form a histogram of how often each cache line is read. A
// read hit on line i increments HR_i while it is below its maximum (all
// ones). A hit on a line whose register is at the maximum instead halves
// every register (the shared "divide by 2" step), and the hit line gets
// 2^(HR_W-1), which is its halved maximum plus the count of this read. A
// refilled line starts again from zero (clr).
//
// Interface: acc (one-hot, read hit) and clr (one-hot, line refilled) are
// applied on the next clock edge; hr gives all registers. Reset clears them.
//
// Follows the source design: increment below the maximum, halve all at the
// maximum, the 2^(N-1) constant. Own choices: what the hit line receives
// when all are halved (2^(HR_W-1)) and clearing a register on refill.
module vcs_hr_lfu #(
  parameter int NLINES = 32,
  parameter int HR_W   = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [NLINES-1:0]            acc,
  input  logic [NLINES-1:0]            clr,
  output logic [NLINES-1:0][HR_W-1:0]  hr
);

  localparam logic [HR_W-1:0] HR_MAX  = '1;
  localparam logic [HR_W-1:0] HR_HALF = HR_W'(1) << (HR_W - 1);

  logic [NLINES-1:0] at_max;  // per line: hit while at maximum
  logic              div2;    // halve all registers

  always_comb begin
    for (int l = 0; l < NLINES; l++) at_max[l] = acc[l] && (hr[l] == HR_MAX);
    div2 = |at_max;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hr <= '0;
    end else begin
      for (int l = 0; l < NLINES; l++) begin
        if (clr[l])        hr[l] <= '0;
        else if (div2)     hr[l] <= at_max[l] ? HR_HALF : (hr[l] >> 1);
        else if (acc[l])   hr[l] <= hr[l] + 1'b1;
      end
    end
  end

  a_acc_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(acc));

endmodule
