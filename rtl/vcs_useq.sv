// vcs_useq: microcode sequencer that drives the address generators.
//
// A program of microinstructions is loaded into a small memory and run from
// address 0 on a start pulse. Every microinstruction carries, for each cache
// lane, an enable, a vector id and a 4-bit iteration command for that lane's
// address generator, plus a configuration word for the datapath. Sequencing
// is kept minimal:
//   rep     - the instruction is issued rep+1 times in a row (an inner loop
//             such as "A[i++]" over a whole row is one instruction);
//   br      - after the last repetition, jump to br_tgt while the loop
//             counter is below br_cnt, else fall through and clear the
//             counter (one outer loop level);
//   halt    - the program ends after this instruction.
// One instruction is issued per cycle; while stall is high (a cache is
// refilling a line) nothing advances and the outputs are held.
//
// Instruction layout, most significant first (see uinstr_t):
//   lane[NC-1] .. lane[0] = {en, vid[VID_W], cmd[4]}, dp_cfg[DPC_W],
//   rep[REP_W], br, br_tgt[PC_W], br_cnt[REP_W], halt.
//
// Interface: ld_en/ld_addr/ld_data write one instruction; start begins a run
// (ignored while running); busy is high during a run; done pulses once after
// the halt instruction has issued. lane_valid/lane_cmd/lane_vid and
// dp_valid/dp_cfg are the current instruction's fields while running.
//
// Follows the source design: a simple microcode sequencer sending vector
// ids and iteration commands to the address generators and a configuration
// to the datapath. Own choices: the instruction format, repeat and branch
// fields, the program memory and its load port.
module vcs_useq
  import vcs_pkg::*;
#(
  parameter int NC       = 4,
  parameter int UC_DEPTH = 64,
  parameter int DPC_W    = 8,
  parameter int REP_W    = 8
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                ld_en,
  input  logic [$clog2(UC_DEPTH)-1:0]         ld_addr,
  input  logic [NC*(1+$clog2(MAX_VEC)+4)+DPC_W+2*REP_W+$clog2(UC_DEPTH)+2-1:0] ld_data,
  input  logic                                start,
  input  logic                                stall,
  output logic                                busy,
  output logic                                done,
  output logic [NC-1:0]                       lane_valid,
  output cmd_e [NC-1:0]                       lane_cmd,
  output logic [NC-1:0][$clog2(MAX_VEC)-1:0]  lane_vid,
  output logic                                dp_valid,
  output logic [DPC_W-1:0]                    dp_cfg
);

  localparam int VID_W = $clog2(MAX_VEC);
  localparam int PC_W  = $clog2(UC_DEPTH);

  typedef struct packed {
    logic             en;
    logic [VID_W-1:0] vid;
    cmd_e             cmd;
  } lane_t;

  typedef struct packed {
    lane_t [NC-1:0]   lane;
    logic [DPC_W-1:0] dp_cfg;
    logic [REP_W-1:0] rep;
    logic             br;
    logic [PC_W-1:0]  br_tgt;
    logic [REP_W-1:0] br_cnt;
    logic             halt;
  } uinstr_t;

  uinstr_t          prog [UC_DEPTH];
  uinstr_t          ui;
  logic [PC_W-1:0]  pc_q;
  logic [REP_W-1:0] rep_q;
  logic [REP_W-1:0] loop_q;
  logic             last_rep;

  always_ff @(posedge clk) begin
    if (ld_en) prog[ld_addr] <= uinstr_t'(ld_data);
  end

  assign ui       = prog[pc_q];
  assign last_rep = (rep_q == ui.rep);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      pc_q   <= '0;
      rep_q  <= '0;
      loop_q <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy   <= 1'b1;
          pc_q   <= '0;
          rep_q  <= '0;
          loop_q <= '0;
        end
      end else if (!stall) begin
        if (!last_rep) begin
          rep_q <= rep_q + 1'b1;
        end else begin
          rep_q <= '0;
          if (ui.halt) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else if (ui.br && loop_q < ui.br_cnt) begin
            loop_q <= loop_q + 1'b1;
            pc_q   <= ui.br_tgt;
          end else begin
            if (ui.br) loop_q <= '0;
            pc_q <= pc_q + 1'b1;
          end
        end
      end
    end
  end

  always_comb begin
    for (int c = 0; c < NC; c++) begin
      lane_valid[c] = busy && ui.lane[c].en;
      lane_cmd[c]   = ui.lane[c].cmd;
      lane_vid[c]   = ui.lane[c].vid;
    end
    dp_valid = busy;
    dp_cfg   = ui.dp_cfg;
  end

endmodule
