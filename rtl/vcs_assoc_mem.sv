// vcs_assoc_mem: associative (tag) memory of one cache.
//
// One entry per cache line holds the tag (line number in main memory) of the
// data in that line and a valid bit. All entries are compared with the
// looked-up tag in parallel, so a lookup is combinational and a hit is known
// in the same cycle; a write takes one clock edge. Built from registers and
// comparators (distributed logic), not block RAM, so that both hit detection
// and the tag update fit in one clock period.
//
// Interface: lookup_tag -> hit, hit_vec (one-hot over lines), hit_idx.
// wr_en/wr_idx/wr_tag store a tag and set the entry valid on the next edge.
// valid shows the valid bits. Reset clears all valid bits.
//
// Follows the source design: distributed associative memory with one-cycle
// read and write. Own choices: the fully parallel tag comparison and the
// per-entry valid bit.
module vcs_assoc_mem #(
  parameter int NLINES = 32,
  parameter int TAG_W  = 18
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [TAG_W-1:0]          lookup_tag,
  output logic                      hit,
  output logic [NLINES-1:0]         hit_vec,
  output logic [$clog2(NLINES)-1:0] hit_idx,
  input  logic                      wr_en,
  input  logic [$clog2(NLINES)-1:0] wr_idx,
  input  logic [TAG_W-1:0]          wr_tag,
  output logic [NLINES-1:0]         valid
);

  logic [TAG_W-1:0] tag_q [NLINES];

  always_comb begin
    hit_idx = '0;
    for (int l = 0; l < NLINES; l++) begin
      hit_vec[l] = valid[l] && (tag_q[l] == lookup_tag);
    end
    for (int l = NLINES - 1; l >= 0; l--) begin
      if (hit_vec[l]) hit_idx = $clog2(NLINES)'(l);
    end
    hit = |hit_vec;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
    end else if (wr_en) begin
      valid[wr_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) tag_q[wr_idx] <= wr_tag;
  end

endmodule
