// Self-checking test of the NVM model: reads of untouched pages return the
// initial-content formula (recomputed here), written pages read back,
// and `done` arrives exactly RD_LAT / WR_LAT cycles after the request.
// Runs the model at its full 160 KB size.
module tb_nvm_sttram;
  localparam int PAGES = 5120, WORDS = 8, DW = 32, RD_LAT = 2, WR_LAT = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  logic req, we, done;
  logic [12:0] page;
  logic [WORDS-1:0][DW-1:0] wdata, rdata;
  logic [WORDS-1:0][DW-1:0] written [int];
  int checks = 0, failures = 0;

  nvm_sttram #(.PAGES(PAGES), .WORDS(WORDS), .DW(DW), .RD_LAT(RD_LAT), .WR_LAT(WR_LAT)) dut (.*);

  function automatic logic [DW-1:0] init_word(int a);
    logic [31:0] x;
    x = a;
    return (x * 32'h9E3779B1) ^ 32'h5A5A0000 ^ x;
  endfunction

  task automatic access(input logic w, input int p, output int lat);
    req = 1; we = w; page = 13'(p);
    lat = 0;
    do begin
      @(posedge clk); #1;
      lat++;
    end while (!done && lat < 50);
    req = 0;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, p;
    rst_n = 0; req = 0; we = 0; page = 0; wdata = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      p = (i < 8) ? (i == 0 ? 0 : PAGES - i) : $urandom_range(0, PAGES - 1);
      if ($urandom_range(0, 2) == 0) begin
        for (int w = 0; w < WORDS; w++) wdata[w] = $urandom;
        access(1, p, lat);
        written[p] = wdata;
        check(lat == WR_LAT, $sformatf("write latency %0d", lat));
      end else begin
        access(0, p, lat);
        check(lat == RD_LAT, $sformatf("read latency %0d", lat));
        for (int w = 0; w < WORDS; w++)
          check(rdata[w] == (written.exists(p) ? written[p][w] : init_word(p * WORDS + w)),
                $sformatf("page %0d word %0d", p, w));
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
