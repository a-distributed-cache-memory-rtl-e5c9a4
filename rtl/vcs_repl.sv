// vcs_repl: replacement policy unit of one cache (FIFO, LRU or LFU).
//
// On a miss the cache asks (find) which line to overwrite. The answer must be
// known only when the refill data starts to arrive from main memory.
//  - FIFO: the victim is the oldest written line. A write pointer steps
//    through the lines in order, advancing on every refill; find copies it
//    into the victim register, so the answer is ready one cycle after find
//    and stays stable while the refill advances the pointer.
//  - LRU / LFU: per-line history registers (vcs_hr_lru / vcs_hr_lfu) and a
//    sequential minimum search (vcs_min_search) over the key {valid, HR}, so
//    an empty line is always taken before a valid one and otherwise the line
//    with the lowest history value is replaced. The answer is ready
//    ceil(NLINES/PAR) cycles after find.
//
// Interface: acc is the one-hot read-hit vector, fill the one-hot vector of a
// line whose refill completes, valid the valid bits of the tag memory. After
// a find pulse, victim_ready rises with victim_idx and stays high until the
// next find.
//
// Follows the source design: the three policies, the FIFO of written lines,
// the shared history registers, the minimum search. Own choices: the valid
// bit in the search key, the round-robin pointer as the FIFO, and treating a
// refill like a read hit for LRU.
module vcs_repl
  import vcs_pkg::*;
#(
  parameter policy_e POLICY = POL_LRU,
  parameter int      NLINES = 32,
  parameter int      HR_W   = 8,
  parameter int      PAR    = 2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [NLINES-1:0]         acc,
  input  logic [NLINES-1:0]         fill,
  input  logic [NLINES-1:0]         valid,
  input  logic                      find,
  output logic                      victim_ready,
  output logic [$clog2(NLINES)-1:0] victim_idx
);

  localparam int IW = $clog2(NLINES);

  if (POLICY == POL_FIFO) begin : g_fifo
    logic [IW-1:0] wp_q;   // oldest written line
    logic [IW-1:0] vic_q;  // victim, held until the next find
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        wp_q         <= '0;
        vic_q        <= '0;
        victim_ready <= 1'b0;
      end else begin
        if (|fill) wp_q <= (int'(wp_q) == NLINES - 1) ? '0 : wp_q + 1'b1;
        if (find) begin
          vic_q        <= wp_q;
          victim_ready <= 1'b1;
        end
      end
    end
    assign victim_idx = vic_q;
  end else begin : g_hist
    logic [NLINES-1:0][HR_W-1:0] hr;
    logic [NLINES-1:0][HR_W:0]   keys;
    logic                        busy, done;
    logic                        ready_q;

    if (POLICY == POL_LRU) begin : g_lru
      vcs_hr_lru #(.NLINES(NLINES), .HR_W(HR_W)) u_hr (
        .clk, .rst_n, .acc(acc | fill), .hr
      );
    end else begin : g_lfu
      vcs_hr_lfu #(.NLINES(NLINES), .HR_W(HR_W)) u_hr (
        .clk, .rst_n, .acc, .clr(fill), .hr
      );
    end

    always_comb
      for (int l = 0; l < NLINES; l++) keys[l] = {valid[l], hr[l]};

    vcs_min_search #(.NLINES(NLINES), .KEY_W(HR_W + 1), .PAR(PAR)) u_min (
      .clk, .rst_n, .start(find), .keys, .busy, .done, .min_idx(victim_idx)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)    ready_q <= 1'b0;
      else if (find) ready_q <= 1'b0;
      else if (done) ready_q <= 1'b1;
    end
    assign victim_ready = ready_q || done;
  end

endmodule
