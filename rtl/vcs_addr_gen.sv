// vcs_addr_gen: vector address generator attached to one cache.
//
// Instead of absolute indexes, the sequencer sends a 4-bit iteration command
// relative to the previous reference of a vector (for example A[i++, j, k]).
// For every vector it serves, the generator keeps four registers: ADDR, the
// address of the last element accessed, and START_I, START_J, START_K, the
// address of the first element of the current row along i, j and k
// (A[0,j,k], A[i,0,k], A[i,j,0]). A command moves exactly one index, so it
// becomes one addition of a constant (or a load of a START_x register plus a
// constant) for ADDR; the same difference is then added to the two START_x
// registers of the other dimensions, while the moved dimension's register is
// unchanged. A[0,0,0] loads all four with START. All constants (START,
// NI, NI*NJ and the last-element offsets) come from the synthesis-time
// vector table VECS.
//
// Interface: cmd_valid/cmd/vid is taken on a clock edge when stall is low.
// The address of the element it selects appears on addr one cycle later,
// with addr_valid and addr_vid, and is held while stall is high.
// After reset every vector points at its element A[0,0,0].
//
// Follows the source design: the command table, the four registers per
// vector and the use of synthesis-time constants. Own choices: command
// encoding (vcs_pkg), one register set per vector selected by vid, the
// last-element offsets NI*(NJ-1) and NI*NJ*(NK-1), and the stall input.
module vcs_addr_gen
  import vcs_pkg::*;
#(
  parameter int       NVEC = 2,
  parameter vec_tab_t VECS = default_vec_tab(0)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    stall,
  input  logic                    cmd_valid,
  input  cmd_e                    cmd,
  input  logic [$clog2(MAX_VEC)-1:0] vid,
  output logic                    addr_valid,
  output addr_t                   addr,
  output logic [$clog2(MAX_VEC)-1:0] addr_vid
);

  typedef enum logic [1:0] {DIM_NONE, DIM_I, DIM_J, DIM_K} dim_e;

  localparam int VSW = (NVEC > 1) ? $clog2(NVEC) : 1;

  addr_t a_q  [NVEC];
  addr_t si_q [NVEC];
  addr_t sj_q [NVEC];
  addr_t sk_q [NVEC];

  vec_desc_t d;
  addr_t     cur, nxt, delta;
  dim_e      dim;
  logic      origin;
  logic      sel_ok;
  logic [VSW-1:0] vs;   // register-set index

  assign vs = VSW'(vid);

  assign sel_ok = int'(vid) < NVEC;

  always_comb begin
    d      = VECS[vid];
    cur    = sel_ok ? a_q[vs] : '0;
    nxt    = cur;
    dim    = DIM_NONE;
    origin = 1'b0;
    if (sel_ok) begin
      unique case (cmd)
        CMD_I_INC:   begin nxt = cur + addr_t'(1);           dim = DIM_I; end
        CMD_I_DEC:   begin nxt = cur - addr_t'(1);           dim = DIM_I; end
        CMD_J_INC:   begin nxt = cur + stride_j(d);          dim = DIM_J; end
        CMD_J_DEC:   begin nxt = cur - stride_j(d);          dim = DIM_J; end
        CMD_K_INC:   begin nxt = cur + stride_k(d);          dim = DIM_K; end
        CMD_K_DEC:   begin nxt = cur - stride_k(d);          dim = DIM_K; end
        CMD_ORIGIN:  begin nxt = d.start;                    origin = 1'b1; end
        CMD_I_FIRST: begin nxt = si_q[vs];                  dim = DIM_I; end
        CMD_J_FIRST: begin nxt = sj_q[vs];                  dim = DIM_J; end
        CMD_K_FIRST: begin nxt = sk_q[vs];                  dim = DIM_K; end
        CMD_I_LAST:  begin nxt = si_q[vs] + last_off_i(d);  dim = DIM_I; end
        CMD_J_LAST:  begin nxt = sj_q[vs] + last_off_j(d);  dim = DIM_J; end
        CMD_K_LAST:  begin nxt = sk_q[vs] + last_off_k(d);  dim = DIM_K; end
        default:     begin nxt = cur;                        dim = DIM_NONE; end
      endcase
    end
    delta = nxt - cur;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NVEC; v++) begin
        a_q[v]  <= VECS[v].start;
        si_q[v] <= VECS[v].start;
        sj_q[v] <= VECS[v].start;
        sk_q[v] <= VECS[v].start;
      end
      addr_valid <= 1'b0;
      addr       <= '0;
      addr_vid   <= '0;
    end else if (!stall) begin
      addr_valid <= cmd_valid && sel_ok;
      if (cmd_valid && sel_ok) begin
        addr     <= nxt;
        addr_vid <= vid;
        a_q[vs] <= nxt;
        if (origin) begin
          si_q[vs] <= d.start;
          sj_q[vs] <= d.start;
          sk_q[vs] <= d.start;
        end else begin
          if (dim == DIM_J || dim == DIM_K) si_q[vs] <= si_q[vs] + delta;
          if (dim == DIM_I || dim == DIM_K) sj_q[vs] <= sj_q[vs] + delta;
          if (dim == DIM_I || dim == DIM_J) sk_q[vs] <= sk_q[vs] + delta;
        end
      end
    end
  end

  initial begin
    assert (NVEC >= 1 && NVEC <= MAX_VEC)
      else $error("vcs_addr_gen: NVEC must be 1..%0d", MAX_VEC);
  end

endmodule
