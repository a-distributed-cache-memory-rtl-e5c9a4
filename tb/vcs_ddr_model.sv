// vcs_ddr_model: behavioural model of the external DRAM behind its memory
// interface, for simulation only (not synthesizable).
//
// It accepts one 32-byte block read command every other cycle (cmd_ready
// toggles) and returns each block LAT cycles after the command as two
// consecutive 128-bit beats, in command order. Word contents come from
// vcs_tb_pkg::mem_word(). Read latency LAT defaults to 22 cycles.
module vcs_ddr_model
  import vcs_pkg::*;
  import vcs_tb_pkg::*;
#(
  parameter int LAT = 22
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      cmd_valid,
  output logic      cmd_ready,
  input  blk_addr_t cmd_blk,
  output logic      rd_valid,
  output beat_t     rd_data
);

  localparam int QD = 256;

  blk_addr_t   q_blk [QD];
  longint      q_due [QD];
  int          wp, rp, half;
  longint      cyc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_ready <= 1'b0;
      rd_valid  <= 1'b0;
      rd_data   <= '0;
      wp <= 0; rp <= 0; half <= 0; cyc <= 0;
    end else begin
      cyc       <= cyc + 1;
      cmd_ready <= !cmd_ready;
      if (cmd_valid && cmd_ready) begin
        q_blk[wp % QD] <= cmd_blk;
        q_due[wp % QD] <= cyc + LAT - 1;
        wp <= wp + 1;
      end
      rd_valid <= 1'b0;
      if (rp != wp && q_due[rp % QD] <= cyc) begin
        rd_valid <= 1'b1;
        rd_data  <= mem_beat(q_blk[rp % QD], half);
        if (half == 1) begin
          half <= 0;
          rp   <= rp + 1;
        end else begin
          half <= 1;
        end
      end
    end
  end

endmodule
