// Self-checking test of page_buffer: random word writes, word reads and
// whole-page loads against a reference array kept by the testbench. Checks
// that a read returns the word in the same cycle, that a load replaces all
// eight words in one cycle, that a load beats a simultaneous word write,
// and that page_out always shows the whole page.
module tb_page_buffer;
  localparam int WORDS = 8;
  localparam int DW    = 32;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                     en, we, load;
  logic [2:0]               off;
  logic [DW-1:0]            wdata, rdata;
  logic [WORDS-1:0][DW-1:0] page_in, page_out;
  logic [DW-1:0]            ref_mem [WORDS];
  int checks = 0, failures = 0;

  page_buffer #(.WORDS(WORDS), .DW(DW)) dut (.*);

  task automatic check(input logic [DW-1:0] got, input logic [DW-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; we = 0; load = 0; off = 0; wdata = 0; page_in = '0;
    // first load defines the content
    for (int w = 0; w < WORDS; w++) begin
      page_in[w] = $urandom;
      ref_mem[w] = page_in[w];
    end
    load = 1;
    @(posedge clk); #1;
    load = 0;
    for (int w = 0; w < WORDS; w++) check(page_out[w], ref_mem[w], "page_out after load");
    for (int i = 0; i < 3000; i++) begin
      int kind;
      kind = $urandom_range(0, 9);
      en = 0; we = 0; load = 0;
      off = 3'($urandom_range(0, WORDS - 1));
      wdata = $urandom;
      for (int w = 0; w < WORDS; w++) page_in[w] = $urandom;
      if (kind < 4) begin            // read
        en = 1;
        #1 check(rdata, ref_mem[off], "word read");
      end else if (kind < 8) begin   // write
        en = 1; we = 1;
        ref_mem[off] = wdata;
      end else if (kind == 8) begin  // page load
        load = 1;
        for (int w = 0; w < WORDS; w++) ref_mem[w] = page_in[w];
      end else begin                 // load and write together: load wins
        load = 1; en = 1; we = 1;
        for (int w = 0; w < WORDS; w++) ref_mem[w] = page_in[w];
      end
      @(posedge clk); #1;
      for (int w = 0; w < WORDS; w++) check(page_out[w], ref_mem[w], "page_out");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
