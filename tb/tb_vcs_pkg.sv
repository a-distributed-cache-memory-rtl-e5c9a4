// tb_vcs_pkg: checks the vector configuration arithmetic of vcs_pkg
// (strides, last-element offsets, element addresses and the example table)
// against values worked out here by hand and by plain integer arithmetic.
module tb_vcs_pkg;
  import vcs_pkg::*;

  int checks = 0, failures = 0;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    vec_desc_t    d;
    sys_vec_tab_t t;
    vec_tab_t     vt;
    longint       m;
    m = longint'(1) << ADDR_W;

    d = mk_vec(addr_t'(1000), 5, 4, 3);
    chk("stride_j", stride_j(d), 5);
    chk("stride_k", stride_k(d), 20);
    chk("last_i", last_off_i(d), 4);
    chk("last_j", last_off_j(d), 15);
    chk("last_k", last_off_k(d), 40);
    chk("elem 0", elem_addr(d, 0, 0, 0), 1000);
    chk("elem 4,3,2", elem_addr(d, 4, 3, 2), 1000 + 4 + 15 + 40);
    chk("elem -1", elem_addr(d, -1, 0, 0), 999);

    for (int n = 0; n < 200; n++) begin
      int ni, nj, nk, i, j, k;
      longint st, e;
      ni = 1 + $urandom_range(0, 99);
      nj = 1 + $urandom_range(0, 99);
      nk = 1 + $urandom_range(0, 99);
      i  = $urandom_range(0, ni - 1);
      j  = $urandom_range(0, nj - 1);
      k  = $urandom_range(0, nk - 1);
      st = $urandom_range(0, 32'h7FF_FFFF);
      d  = mk_vec(addr_t'(st), ni, nj, nk);
      e  = (st + i + longint'(ni) * j + longint'(ni) * nj * k) % m;
      chk("elem rand", elem_addr(d, i, j, k), e);
      chk("last_k rand", last_off_k(d), longint'(ni) * nj * (nk - 1));
    end

    t = default_sys_tab();
    chk("tab start", t[2][3].start, (2 * MAX_VEC + 3) * 65536);
    chk("tab ni", t[1][0].ni, 32);
    chk("tab nk", t[7][7].nk, 16);
    vt = default_vec_tab(3);
    chk("vec tab", vt[1].start, (3 * MAX_VEC + 1) * 65536);
    chk("cmd width", $bits(cmd_e), 4);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
