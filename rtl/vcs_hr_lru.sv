// vcs_hr_lru: history registers for the LRU replacement policy.
//
// Each cache line i has an HR_W-bit history register HR_i that measures how
// recently the line was used: all ones is "just used", lower is older. When
// line i is read (a hit) or refilled, HR_i is set to all ones and every other
// register is decremented by one. This update happens only when HR_i is not
// already all ones, so that repeated reads from the same line do not age the
// other lines. The enable of all registers is the OR, over all lines, of
// "accessed and not all ones". A register already at zero stays at zero.
//
// Interface: acc is one-hot over lines (all zero = no access) and is applied
// on the next clock edge; hr gives all registers, hr[i] for line i.
// Reset clears all registers.
//
// Follows the source design: set to the maximum, decrement the others, and
// the "is not all ones" condition on the shared enable. Own choice: the
// decrement saturates at zero instead of wrapping.
module vcs_hr_lru #(
  parameter int NLINES = 32,
  parameter int HR_W   = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [NLINES-1:0]            acc,
  output logic [NLINES-1:0][HR_W-1:0]  hr
);

  localparam logic [HR_W-1:0] HR_MAX = '1;

  logic [NLINES-1:0] upd;  // per line: accessed and not at maximum
  logic              en;   // enable of all registers

  always_comb begin
    for (int l = 0; l < NLINES; l++) upd[l] = acc[l] && (hr[l] != HR_MAX);
    en = |upd;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hr <= '0;
    end else if (en) begin
      for (int l = 0; l < NLINES; l++) begin
        if (upd[l])          hr[l] <= HR_MAX;
        else if (hr[l] != 0) hr[l] <= hr[l] - 1'b1;
      end
    end
  end

  a_acc_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(acc));

endmodule
