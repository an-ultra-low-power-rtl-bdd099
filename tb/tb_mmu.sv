// Self-checking test of the MMU at its default size, with the NVM model and
// page buffers modelled in the testbench. Eight emulated cores issue random
// instruction reads and data reads/writes over more pages than the buffers
// hold, so pages are loaded, evicted and written back all the time. Every
// access the MMU reports as a hit is performed on the buffer it selects and
// checked against a full shadow copy of memory kept by the testbench, so a
// wrong translation, a lost write-back or a stale page shows up as a data
// mismatch. Also checked: data miss latency with a clean victim (RD_LAT + 3)
// and with a dirty one (RD_LAT + WR_LAT + 4), that every request is eventually
// served, and that a flush leaves every written word in the NVM and no
// buffer valid.
module tb_mmu;
  localparam int NC = 8, NI = 8, ND = 16, W = 8, DW = 32;
  localparam int IAW = 15, DAW = 14, I_PAGES = 3072, NVM_PAGES = 5120;
  localparam int RD_LAT = 2, WR_LAT = 4;
  typedef logic [W-1:0][DW-1:0] page_t;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic            i_req [NC], d_req [NC], i_hit [NC], d_hit [NC];
  logic [IAW-1:0]  i_addr [NC];
  logic [DAW-1:0]  d_addr [NC];
  logic [2:0]      i_sel [NC];
  logic [3:0]      d_sel [NC];
  logic [NC-1:0]   miss_stall;
  logic [ND-1:0]   dpb_wr, dpb_load;
  logic [NI-1:0]   ipb_load;
  page_t           dpb_page [ND];
  logic            nvm_req, nvm_we, nvm_done;
  logic [12:0]     nvm_page;
  page_t           nvm_wdata, nvm_rdata;
  logic            flush_req, flush_done, busy, ev_fill, ev_wb, ev_evict;

  mmu #(.N_CORES(NC), .N_IPB(NI), .N_DPB(ND), .WORDS(W), .DW(DW), .IAW(IAW), .DAW(DAW),
        .I_PAGES(I_PAGES), .NVM_PAGES(NVM_PAGES)) dut (.*);
  nvm_sttram #(.PAGES(NVM_PAGES), .WORDS(W), .DW(DW), .RD_LAT(RD_LAT), .WR_LAT(WR_LAT)) u_nvm (
    .clk, .rst_n, .req(nvm_req), .we(nvm_we), .page(nvm_page), .wdata(nvm_wdata),
    .done(nvm_done), .rdata(nvm_rdata));

  // testbench page buffers
  page_t ibuf [NI];
  logic         wr_en [ND];
  logic [2:0]   wr_off [ND];
  logic [DW-1:0] wr_data [ND];
  page_t dbuf [ND];
  assign dpb_page = dbuf;
  always_ff @(posedge clk) begin
    for (int b = 0; b < NI; b++) if (ipb_load[b]) ibuf[b] <= nvm_rdata;
    for (int b = 0; b < ND; b++)
      if (dpb_load[b]) dbuf[b] <= nvm_rdata;
      else if (wr_en[b]) dbuf[b][wr_off[b]] <= wr_data[b];
  end
  always_comb for (int b = 0; b < ND; b++) dpb_wr[b] = wr_en[b];

  function automatic logic [DW-1:0] init_word(int a);
    logic [31:0] x;
    x = a;
    return (x * 32'h9E3779B1) ^ 32'h5A5A0000 ^ x;
  endfunction

  logic [DW-1:0] dshadow [1 << DAW];
  int checks = 0, failures = 0, n_fill = 0, n_wb = 0, n_evict = 0, n_stall = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    n_fill  += int'(ev_fill);
    n_wb    += int'(ev_wb);
    n_evict += int'(ev_evict);
    n_stall += $countones(miss_stall);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-core pending request
  bit            pend [NC];
  bit            is_d [NC], we [NC];
  logic [DW-1:0] wval [NC];
  int            age  [NC];

  function automatic int ipage_pick();
    int k;
    k = $urandom_range(0, 23);
    return (k == 23) ? I_PAGES - 1 : k * 37;
  endfunction
  function automatic int dpage_pick();
    int k;
    k = $urandom_range(0, 39);
    return (k == 39) ? 2047 : k * 13;
  endfunction

  task automatic new_req(int c, bit allow_i);
    pend[c] = 1; age[c] = 0;
    is_d[c] = !allow_i || $urandom_range(0, 1);
    we[c]   = is_d[c] && $urandom_range(0, 1);
    wval[c] = $urandom;
    i_req[c] = !is_d[c];
    d_req[c] = is_d[c];
    i_addr[c] = IAW'(ipage_pick() * W + $urandom_range(0, W - 1));
    d_addr[c] = DAW'(dpage_pick() * W + $urandom_range(0, W - 1));
  endtask

  // one cycle of core activity: serve hits, check data
  task automatic step();
    for (int b = 0; b < ND; b++) wr_en[b] = 0;
    #2;
    for (int c = 0; c < NC; c++) if (pend[c]) begin
      check(miss_stall[c] == ((i_req[c] && !i_hit[c]) || (d_req[c] && !d_hit[c])), "miss_stall");
      if (!is_d[c] && i_hit[c]) begin
        check(ibuf[i_sel[c]][i_addr[c][2:0]] == init_word(int'(i_addr[c])),
              $sformatf("ifetch core %0d addr %0d", c, i_addr[c]));
        pend[c] = 0;
      end else if (is_d[c] && d_hit[c] && !wr_en[d_sel[c]]) begin
        if (we[c]) begin
          wr_en[d_sel[c]] = 1; wr_off[d_sel[c]] = d_addr[c][2:0]; wr_data[d_sel[c]] = wval[c];
          dshadow[d_addr[c]] = wval[c];
        end else begin
          check(dbuf[d_sel[c]][d_addr[c][2:0]] == dshadow[d_addr[c]],
                $sformatf("dread core %0d addr %0d", c, d_addr[c]));
        end
        pend[c] = 0;
      end else begin
        age[c]++;
        if (age[c] == 400) check(0, $sformatf("core %0d starved", c));
      end
    end
    @(posedge clk); #1;
    for (int c = 0; c < NC; c++) if (!pend[c]) begin i_req[c] = 0; d_req[c] = 0; end
  endtask

  // single request from core 0, returns cycles until served
  task automatic timed(input bit d, input bit w, input int addr, output int lat);
    pend[0] = 1; age[0] = 0; is_d[0] = d; we[0] = w; wval[0] = $urandom;
    i_req[0] = !d; d_req[0] = d; i_addr[0] = IAW'(addr); d_addr[0] = DAW'(addr);
    lat = 0;
    while (pend[0] && lat < 100) begin step(); lat++; end
  endtask

  initial begin
    int lat;
    rst_n = 0; flush_req = 0;
    for (int a = 0; a < (1 << DAW); a++) dshadow[a] = init_word(I_PAGES * W + a);
    for (int c = 0; c < NC; c++) begin
      pend[c] = 0; i_req[c] = 0; d_req[c] = 0; i_addr[c] = 0; d_addr[c] = 0;
    end
    for (int b = 0; b < ND; b++) begin wr_en[b] = 0; wr_off[b] = 0; wr_data[b] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // latency of a miss into an empty buffer, then a hit
    timed(1, 0, 5, lat);
    check(lat == RD_LAT + 4, $sformatf("clean miss served after %0d cycles", lat)); // +1: the serving cycle
    timed(1, 1, 6, lat);
    check(lat == 1, $sformatf("hit served after %0d cycles", lat));
    // fill all sixteen data buffers with dirty pages, then miss once more
    for (int p = 1; p < ND; p++) timed(1, 1, p * W, lat);
    timed(1, 0, 100 * W, lat);
    check(lat == RD_LAT + WR_LAT + 5, $sformatf("dirty miss served after %0d cycles", lat));
    // random traffic from all cores
    for (int cyc = 0; cyc < 6000; cyc++) begin
      for (int c = 0; c < NC; c++) if (!pend[c] && $urandom_range(0, 2) != 0) new_req(c, 1);
      step();
    end
    // drain, then flush
    for (int k = 0; k < 2000; k++) begin
      bit any;
      any = 0;
      for (int c = 0; c < NC; c++) any |= pend[c];
      if (!any) break;
      step();
    end
    flush_req = 1;
    lat = 0;
    while (!flush_done && lat < 5000) begin @(posedge clk); #1; lat++; end
    flush_req = 0;
    check(flush_done, "flush finished");
    @(posedge clk); #1;
    for (int a = 0; a < (1 << DAW); a++)
      check(u_nvm.mem[I_PAGES + a / W][a % W] == dshadow[a], $sformatf("NVM after flush, data word %0d", a));
    for (int c = 0; c < NC; c++) begin
      i_addr[c] = 0; d_addr[c] = DAW'(c * 8);
    end
    #1;
    for (int c = 0; c < NC; c++) check(!i_hit[c] && !d_hit[c], "buffers invalid after flush");
    check(n_fill > 100 && n_wb > 20 && n_evict > 50, $sformatf("activity fills=%0d wbs=%0d evicts=%0d", n_fill, n_wb, n_evict));
    $display("fills=%0d writebacks=%0d evictions=%0d stall-cycles=%0d", n_fill, n_wb, n_evict, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
