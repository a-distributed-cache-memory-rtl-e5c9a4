// tb_vcs_addr_gen: random iteration commands on two vectors, with random
// stalls. A reference model keeps the (i, j, k) indexes of each vector,
// applies each command to them and computes the expected address as
// START + i + NI*j + NI*NJ*k. The address must appear one cycle after the
// command and hold while stall is high.
module tb_vcs_addr_gen;
  import vcs_pkg::*;

  localparam int NVEC = 2;

  function automatic vec_tab_t tab();
    vec_tab_t t;
    t    = '0;
    t[0] = mk_vec(addr_t'(1000), 5, 4, 3);
    t[1] = mk_vec(addr_t'(20000), 7, 3, 6);
    return t;
  endfunction
  localparam vec_tab_t VECS = tab();

  logic  clk = 0, rst_n = 0, stall = 0, cmd_valid = 0;
  cmd_e  cmd = CMD_SAME;
  logic [$clog2(MAX_VEC)-1:0] vid = '0;
  logic  addr_valid;
  addr_t addr;
  logic [$clog2(MAX_VEC)-1:0] addr_vid;

  vcs_addr_gen #(.NVEC(NVEC), .VECS(VECS)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int ix [NVEC], jx [NVEC], kx [NVEC];
  int cmd_seen [16];

  function automatic addr_t ref_addr(int v);
    longint a;
    a = longint'(VECS[v].start) + ix[v] + longint'(VECS[v].ni) * jx[v]
      + longint'(VECS[v].ni) * VECS[v].nj * kx[v];
    return addr_t'(a);
  endfunction

  task automatic apply(int v, cmd_e c);
    case (c)
      CMD_I_INC:   ix[v]++;
      CMD_I_DEC:   ix[v]--;
      CMD_J_INC:   jx[v]++;
      CMD_J_DEC:   jx[v]--;
      CMD_K_INC:   kx[v]++;
      CMD_K_DEC:   kx[v]--;
      CMD_ORIGIN:  begin ix[v] = 0; jx[v] = 0; kx[v] = 0; end
      CMD_I_FIRST: ix[v] = 0;
      CMD_J_FIRST: jx[v] = 0;
      CMD_K_FIRST: kx[v] = 0;
      CMD_I_LAST:  ix[v] = VECS[v].ni - 1;
      CMD_J_LAST:  jx[v] = VECS[v].nj - 1;
      CMD_K_LAST:  kx[v] = VECS[v].nk - 1;
      default: ;
    endcase
  endtask

  initial begin
    addr_t exp_addr;
    int    exp_vid;
    logic  exp_valid;
    for (int v = 0; v < NVEC; v++) begin ix[v] = 0; jx[v] = 0; kx[v] = 0; end
    exp_valid = 0; exp_addr = '0; exp_vid = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      stall     = ($urandom_range(0, 9) == 0);
      cmd_valid = ($urandom_range(0, 7) != 0);
      vid       = $urandom_range(0, NVEC - 1);
      cmd       = cmd_e'($urandom_range(0, 13));
      @(posedge clk);
      #1;
      if (!stall) begin
        exp_valid = cmd_valid;
        if (cmd_valid) begin
          apply(int'(vid), cmd);
          exp_addr = ref_addr(int'(vid));
          exp_vid  = int'(vid);
          cmd_seen[int'(cmd)]++;
        end
      end
      checks++;
      if (addr_valid !== exp_valid) begin
        failures++;
        $display("FAIL n=%0d valid %0b exp %0b", n, addr_valid, exp_valid);
      end
      if (exp_valid) begin
        checks++;
        if (addr !== exp_addr || int'(addr_vid) != exp_vid) begin
          failures++;
          $display("FAIL n=%0d addr %0d exp %0d (vid %0d)", n, addr, exp_addr, exp_vid);
        end
      end
    end
    for (int c = 0; c < 14; c++) begin
      checks++;
      if (cmd_seen[c] == 0) begin
        failures++;
        $display("FAIL command %0d never exercised", c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
