// vcs_line_ram: data memory of one cache, written as a block RAM.
//
// Holds NLINES lines of LINE_WORDS 32-bit words. The write port takes one
// 128-bit beat from main memory per cycle (four words); the read port
// delivers one 32-bit word with a registered output, one cycle after the
// address. The array is kept 128 bits wide and the read selects the word
// from the registered row, which matches the asymmetric-port block RAMs of
// FPGAs. Contents are not reset.
//
// Interface: wr_en/wr_row write one 128-bit row (row = line * LINE_WORDS/4
// + beat). rd_en/rd_addr (word address = line * LINE_WORDS + word) gives
// rd_data on the next cycle.
//
// Follows the source design: block-RAM data storage, 128-bit memory beats,
// one-cycle read. Own choice: the asymmetric 128-bit write / 32-bit read
// organisation.
module vcs_line_ram
  import vcs_pkg::*;
#(
  parameter int NLINES     = 32,
  parameter int LINE_WORDS = 512
) (
  input  logic                                      clk,
  input  logic                                      wr_en,
  input  logic [$clog2(NLINES*LINE_WORDS/BEAT_WORDS)-1:0] wr_row,
  input  beat_t                                     wr_data,
  input  logic                                      rd_en,
  input  logic [$clog2(NLINES*LINE_WORDS)-1:0]      rd_addr,
  output data_t                                     rd_data
);

  localparam int ROWS = NLINES * LINE_WORDS / BEAT_WORDS;
  localparam int SW   = $clog2(BEAT_WORDS);

  beat_t          mem [ROWS];
  beat_t          row_q;
  logic [SW-1:0]  sel_q;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_row] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      row_q <= mem[rd_addr[$bits(rd_addr)-1:SW]];
      sel_q <= rd_addr[SW-1:0];
    end
  end

  assign rd_data = row_q[sel_q*DATA_W +: DATA_W];

endmodule
