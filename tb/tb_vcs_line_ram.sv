// tb_vcs_line_ram: writes random 128-bit rows, then reads random words with
// interleaved writes and checks each word one cycle after its address
// against a reference copy of the memory.
module tb_vcs_line_ram;
  import vcs_pkg::*;
  localparam int NLINES = 4;
  localparam int LINE_WORDS = 16;
  localparam int ROWS = NLINES * LINE_WORDS / 4;

  logic clk = 0, wr_en = 0, rd_en = 0;
  logic [$clog2(ROWS)-1:0] wr_row = '0;
  beat_t wr_data = '0;
  logic [$clog2(NLINES*LINE_WORDS)-1:0] rd_addr = '0;
  data_t rd_data;

  vcs_line_ram #(.NLINES(NLINES), .LINE_WORDS(LINE_WORDS)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  data_t ref_mem [NLINES*LINE_WORDS];

  initial begin
    data_t exp_w;
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      wr_en = 1; wr_row = r;
      wr_data = {$urandom, $urandom, $urandom, $urandom};
      for (int w = 0; w < 4; w++) ref_mem[r*4+w] = wr_data[w*32 +: 32];
    end
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      wr_en   = ($urandom_range(0, 3) == 0);
      wr_row  = $urandom_range(0, ROWS - 1);
      wr_data = {$urandom, $urandom, $urandom, $urandom};
      rd_en   = 1;
      rd_addr = $urandom_range(0, NLINES * LINE_WORDS - 1);
      exp_w   = ref_mem[rd_addr];   // read before this cycle's write
      if (wr_en) for (int w = 0; w < 4; w++) ref_mem[wr_row*4+w] = wr_data[w*32 +: 32];
      @(negedge clk);
      wr_en = 0; rd_en = 0;
      checks++;
      if (rd_data !== exp_w) begin
        failures++;
        $display("FAIL n=%0d addr %0d got %h exp %h", n, rd_addr, rd_data, exp_w);
      end
      // the word holds while rd_en is low
      @(negedge clk);
      checks++;
      if (rd_data !== exp_w) begin failures++; $display("FAIL n=%0d not held", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
