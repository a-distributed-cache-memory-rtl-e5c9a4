// vcs_min_search: sequential search for the smallest of NLINES keys.
//
// The victim of a replacement is the line whose history key is lowest. The
// search does not have to finish in one cycle, because the victim is needed
// only when the missing data comes back from main memory, many cycles later.
// It therefore compares PAR keys per clock cycle against a running minimum
// and needs ceil(NLINES/PAR) cycles. On equal keys the lowest line index
// wins.
//
// Interface: a start pulse begins a search over the keys as they are during
// the search (they must not change meanwhile); the first PAR keys are
// compared in the start cycle itself. busy is high while it runs; done
// pulses for one cycle with min_idx valid, and min_idx holds until the next
// start. A search takes STEPS = ceil(NLINES/PAR) cycles: with NLINES=32 and
// PAR=2, done is high 16 cycles after the start cycle.
//
// Follows the source design: a sequential minimum within the memory read
// latency. Own choices: PAR keys per cycle and the tie rule.
module vcs_min_search #(
  parameter int NLINES = 32,
  parameter int KEY_W  = 9,
  parameter int PAR    = 2
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [NLINES-1:0][KEY_W-1:0] keys,
  output logic                         busy,
  output logic                         done,
  output logic [$clog2(NLINES)-1:0]    min_idx
);

  localparam int STEPS = (NLINES + PAR - 1) / PAR;
  localparam int IW    = $clog2(NLINES);
  localparam int SW    = $clog2(STEPS + 1);

  logic [SW-1:0]    step_q;
  logic [KEY_W-1:0] best_q;
  logic [IW-1:0]    idx_q;

  logic [KEY_W-1:0] best_n;
  logic [IW-1:0]    idx_n;
  logic [SW-1:0]    step;   // step compared in this cycle

  always_comb begin
    step   = start ? '0 : step_q;
    best_n = best_q;
    idx_n  = idx_q;
    for (int p = 0; p < PAR; p++) begin
      int l;
      l = int'(step) * PAR + p;
      if (l < NLINES) begin
        if ((start && p == 0) || keys[l] < best_n) begin
          best_n = keys[l];
          idx_n  = IW'(l);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      step_q  <= '0;
      best_q  <= '0;
      idx_q   <= '0;
      min_idx <= '0;
    end else begin
      done <= 1'b0;
      if (start || busy) begin
        best_q <= best_n;
        idx_q  <= idx_n;
        if (int'(step) == STEPS - 1) begin
          busy    <= 1'b0;
          done    <= 1'b1;
          min_idx <= idx_n;
          step_q  <= '0;
        end else begin
          busy    <= 1'b1;
          step_q  <= step + 1'b1;
        end
      end
    end
  end

endmodule
