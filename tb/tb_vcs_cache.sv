// tb_vcs_cache: one LRU cache (4 lines of 16 words) in front of a simple
// line server that answers a refill request after 22 cycles with the line's
// beats back to back. Random reads over 6 lines (more than fit) are checked
// against a true-LRU reference cache: hit or miss as predicted, the data
// word (a fixed function of its address), a hit answered exactly one cycle
// after the request, and the refill request naming the right line.
module tb_vcs_cache;
  import vcs_pkg::*;
  import vcs_tb_pkg::*;

  localparam int NLINES = 4;
  localparam int LINE_WORDS = 16;
  localparam int BEATS = LINE_WORDS / 4;
  localparam int LAT = 22;
  localparam int LINE_W = ADDR_W - $clog2(LINE_WORDS);

  logic clk = 0, rst_n = 0;
  logic req_valid = 0;
  addr_t req_addr = '0;
  logic ready, rd_valid;
  data_t rd_data;
  logic mem_req;
  logic [LINE_W-1:0] mem_line;
  logic mem_beat_valid = 0;
  beat_t mem_beat_data = '0;
  logic ev_hit, ev_miss;

  vcs_cache #(.POLICY(POL_LRU), .NLINES(NLINES), .LINE_WORDS(LINE_WORDS), .HR_W(8), .PAR(2)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int hits = 0, misses = 0, evictions = 0, hit_ev = 0, miss_ev = 0;

  always @(posedge clk) begin
    if (ev_hit) hit_ev++;
    if (ev_miss) miss_ev++;
  end

  // line server
  initial begin
    forever begin
      @(negedge clk);
      if (mem_req) begin
        logic [LINE_W-1:0] ln;
        ln = mem_line;
        repeat (LAT) @(negedge clk);
        for (int b = 0; b < BEATS; b++) begin
          mem_beat_valid = 1;
          mem_beat_data  = mem_beat(blk_addr_t'({ln, 1'b0}) + blk_addr_t'(b / 2), b % 2);
          @(negedge clk);
        end
        mem_beat_valid = 0;
      end
    end
  end

  // reference: true LRU over line numbers
  int ref_line [NLINES];
  int ref_used [NLINES];

  initial begin
    int pool [6];
    for (int i = 0; i < 6; i++) pool[i] = 1000 + 37 * i * i;
    for (int i = 0; i < NLINES; i++) begin ref_line[i] = -1; ref_used[i] = -1000 + i; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      int ln, off, slot, cyc;
      bit exp_hit;
      addr_t a;
      ln  = pool[$urandom_range(0, 5)];
      off = $urandom_range(0, LINE_WORDS - 1);
      a   = addr_t'(ln * LINE_WORDS + off);
      slot = -1;
      for (int i = 0; i < NLINES; i++) if (ref_line[i] == ln) slot = i;
      exp_hit = (slot >= 0);
      if (!exp_hit) begin
        slot = 0;
        for (int i = 0; i < NLINES; i++) begin
          if (ref_line[i] < 0 && ref_line[slot] >= 0) slot = i;
          else if ((ref_line[i] < 0) == (ref_line[slot] < 0) && ref_used[i] < ref_used[slot]
                   && ref_line[slot] >= 0) slot = i;
        end
        if (ref_line[slot] >= 0) evictions++;
        ref_line[slot] = ln;
      end
      ref_used[slot] = n;

      @(negedge clk);
      while (!ready) @(negedge clk);
      req_valid = 1;
      req_addr  = a;
      @(negedge clk);
      req_valid = 0;
      cyc = 1;
      if (exp_hit) hits++; else misses++;
      checks++;
      if (exp_hit != rd_valid) begin
        failures++;
        $display("FAIL n=%0d line %0d: hit expected %0b, data valid after 1 cycle %0b",
                 n, ln, exp_hit, rd_valid);
      end
      if (!exp_hit) begin
        checks++;
        if (!mem_req || int'(mem_line) != ln) begin
          failures++;
          $display("FAIL n=%0d refill request %0b line %0d exp %0d", n, mem_req, mem_line, ln);
        end
      end
      while (!rd_valid && cyc < 200) begin @(negedge clk); cyc++; end
      checks++;
      if (!rd_valid || rd_data !== mem_word(a)) begin
        failures++;
        $display("FAIL n=%0d addr %0d data %h exp %h", n, a, rd_data, mem_word(a));
      end
      if (!exp_hit) begin
        // request seen 1 cycle after accept, LAT wait, BEATS beats, replay read
        checks++;
        if (cyc != LAT + BEATS + 2) begin
          failures++;
          $display("FAIL n=%0d miss took %0d cycles, expected %0d", n, cyc, LAT + BEATS + 2);
        end
      end
    end
    checks++;
    if (hits == 0 || evictions == 0 || hit_ev != hits || miss_ev != misses) begin
      failures++;
      $display("FAIL hits %0d/%0d misses %0d/%0d evictions %0d", hits, hit_ev, misses, miss_ev, evictions);
    end
    $display("hits %0d misses %0d evictions %0d", hits, misses, evictions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
