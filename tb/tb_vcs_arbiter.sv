// tb_vcs_arbiter: three line-refill clients share the behavioural DRAM
// model (22-cycle latency, one 32-byte command every other cycle) through
// the arbiter. Clients raise requests for random lines at random times,
// several at once. Checks: every beat a client receives is the next beat of
// its own line; each line arrives complete; while several wait, the one
// with the highest priority level is served first (levels 1, 3, 1: cache 1,
// then cache 0 before cache 2); commands go out in block order for the granted
// line; the conflict event fires when a grant is made with others waiting.
module tb_vcs_arbiter;
  import vcs_pkg::*;
  import vcs_tb_pkg::*;

  localparam int NC = 3;
  localparam int LINE_WORDS = 16;
  localparam int BEATS = LINE_WORDS / 4;
  localparam int BLKS = LINE_WORDS / 8;
  localparam int LINE_W = ADDR_W - $clog2(LINE_WORDS);

  logic clk = 0, rst_n = 0;
  logic [NC-1:0] req = '0;
  logic [NC-1:0][LINE_W-1:0] line = '0;
  logic [NC-1:0] beat_valid;
  beat_t beat_data;
  logic mem_cmd_valid, mem_cmd_ready, mem_rd_valid;
  blk_addr_t mem_cmd_blk;
  beat_t mem_rd_data;
  logic ev_conflict;

  localparam logic [NC-1:0][3:0] PRIO = {4'd1, 4'd3, 4'd1};
  vcs_arbiter #(.NC(NC), .LINE_WORDS(LINE_WORDS), .PRIO(PRIO)) dut (.*);

  vcs_ddr_model #(.LAT(22)) u_mem (
    .clk, .rst_n, .cmd_valid(mem_cmd_valid), .cmd_ready(mem_cmd_ready),
    .cmd_blk(mem_cmd_blk), .rd_valid(mem_rd_valid), .rd_data(mem_rd_data));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int served [NC];
  int conflicts = 0, prio_cases = 0;
  int cur_owner = -1;
  int cmd_idx = 0;

  // clients
  for (genvar c = 0; c < NC; c++) begin : g_cli
    initial begin
      @(posedge rst_n);
      forever begin
        int b;
        repeat ($urandom_range(0, 60)) @(negedge clk);
        line[c] = LINE_W'($urandom_range(0, 100000));
        req[c]  = 1;
        b = 0;
        while (b < BEATS) begin
          @(posedge clk);
          if (beat_valid[c]) begin
            checks++;
            if (beat_data !== mem_beat(blk_addr_t'({line[c], {$clog2(BLKS){1'b0}}}) + blk_addr_t'(b / 2), b % 2)) begin
              failures++;
              $display("FAIL client %0d beat %0d wrong data", c, b);
            end
            b++;
          end
        end
        @(negedge clk);
        req[c] = 0;
        served[c]++;
      end
    end
  end

  // grant order and command addresses
  always @(posedge clk) begin
    if (rst_n) begin
      if (ev_conflict) conflicts++;
      if (!dut.busy_q && req != '0) begin
        int first;
        first = -1;
        for (int c = 0; c < NC; c++)
          if (req[c] && (first < 0 || PRIO[c] > PRIO[first])) first = c;
        if ((req & (req - 1'b1)) != '0) prio_cases++;
        cur_owner = first;
        cmd_idx = 0;
        #1;
        checks++;
        if (int'(dut.own_q) != first) begin
          failures++;
          $display("FAIL grant to %0d, expected %0d (req %b)", dut.own_q, first, req);
        end
      end else if (mem_cmd_valid && mem_cmd_ready) begin
        checks++;
        if (mem_cmd_blk !== blk_addr_t'({line[cur_owner], {$clog2(BLKS){1'b0}}}) + blk_addr_t'(cmd_idx)) begin
          failures++;
          $display("FAIL command block %0d for owner %0d index %0d", mem_cmd_blk, cur_owner, cmd_idx);
        end
        cmd_idx++;
      end
    end
  end

  initial begin
    for (int c = 0; c < NC; c++) served[c] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (8000) @(posedge clk);
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (served[c] < 5) begin failures++; $display("FAIL client %0d served %0d lines", c, served[c]); end
    end
    checks++;
    if (conflicts == 0 || conflicts != prio_cases) begin
      failures++;
      $display("FAIL conflict events %0d, contended grants %0d", conflicts, prio_cases);
    end
    $display("served %0d %0d %0d, contended grants %0d", served[0], served[1], served[2], prio_cases);
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
