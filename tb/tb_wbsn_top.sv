// End-to-end test of the whole platform at its default size (8 cores,
// 8 I-PBs, 16 D-PBs, 8-word pages, 160 KB NVM). Eight emulated cores run a
// small program through the real core-side ports:
//   1. barrier, then all cores fetch the same 64 instructions in lock-step
//      (SIMD: identical fetches are merged by the PM crossbar);
//   2. all cores run one shared page of code from different words (bank
//      conflicts in the PM crossbar), then each core fetches code of its own (32 pages in all for 8 I-PBs, so
//      instruction pages are evicted);
//   3. each core writes 40 words of its own data (40 pages for 16 D-PBs, so
//      dirty pages are written back), reads them back, and all cores write
//      and read one shared page (bank conflicts and merged reads);
//   4. core 0 produces a block of results and notifies cores 1-7, which
//      wait for the notification and then read the block;
//   5. every core sleeps: the platform flushes and power-gates, the test
//      checks the NVM holds every written word, then wakes the platform;
//   6. all cores read all their data again, now reloaded from the NVM;
//   7. one core alone checks that accesses to a resident page complete in
//      the cycle they are issued (single-cycle interconnect).
// Every fetched or read word is compared with values computed here: the
// NVM's initial-content formula for code, a shadow copy for data. Each
// mechanism (instruction and data misses, evictions, write-backs, conflicts
// in both crossbars, merged reads, miss stalls, barriers, notifications,
// flush, deep sleep, wake-up) is counted and must happen at least once.
module tb_wbsn_top;
  import wbsn_pkg::*;
  localparam int NC = 8, IAW = 15, DAW = 14, I_PAGES = 3072;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic          i_req [NC], i_gnt [NC], d_req [NC], d_we [NC], d_gnt [NC];
  logic [IAW-1:0] i_addr [NC];
  logic [DAW-1:0] d_addr [NC];
  logic [31:0]   i_rdata [NC], d_wdata [NC], d_rdata [NC];
  logic          sync_req [NC];
  sync_op_e      sync_op  [NC];
  logic [NC-1:0] sync_arg [NC];
  logic [NC-1:0] core_run;
  logic          wake_i, pwr_gate_o;

  wbsn_top dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] dshadow [1 << DAW];

  function automatic logic [31:0] init_word(int a);
    logic [31:0] x;
    x = a;
    return (x * 32'h9E3779B1) ^ 32'h5A5A0000 ^ x;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 12) $display("FAIL %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_ifill, n_dfill, n_evict, n_wb, n_pm_conf, n_dm_conf, n_pm_merge, n_dm_merge;
  int n_done = 0;
  int n_stall, n_barrier, n_notify, n_flush, n_deep, n_wake, n_cycles;
  always @(posedge clk) if (rst_n) begin
    n_cycles++;
    n_ifill   += $countones(dut.ipb_load);
    n_dfill   += $countones(dut.dpb_load);
    n_evict   += int'(dut.ev_evict);
    n_wb      += int'(dut.ev_wb);
    n_stall   += $countones(dut.miss_stall);
    n_barrier += int'(dut.ev_barrier);
    n_notify  += int'(dut.ev_notify_wait);
    n_flush   += int'(dut.flush_done);
    n_deep    += int'(dut.pstate == PS_FLUSH && dut.flush_done);
    n_wake    += int'(dut.pstate == PS_WAKE);
    for (int b = 0; b < 8; b++) begin
      n_pm_conf  += int'(dut.ip_conflict[b]);
      n_pm_merge += int'(dut.ip_merged[b]);
    end
    for (int b = 0; b < 16; b++) begin
      n_dm_conf  += int'(dut.dp_conflict[b]);
      n_dm_merge += int'(dut.dp_merged[b]);
    end
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- core-side bus tasks ----------------
  // Drive after the rising edge, sample before the next one, hold until granted.
  task automatic ifetch(input int c, input int a);
    i_req[c] = 1; i_addr[c] = IAW'(a);
    forever begin
      @(negedge clk);
      if (i_gnt[c]) begin
        check(i_rdata[c] == init_word(a), $sformatf("core %0d fetch %0d", c, a));
        break;
      end
    end
    @(posedge clk); #1 i_req[c] = 0;
  endtask

  int last_wait [NC];   // cycles a data access waited for its grant
  task automatic daccess(input int c, input bit w, input int a, input logic [31:0] v);
    d_req[c] = 1; d_we[c] = w; d_addr[c] = DAW'(a); d_wdata[c] = v;
    last_wait[c] = -1;
    forever begin
      @(negedge clk);
      last_wait[c]++;
      if (d_gnt[c]) begin
        if (w) dshadow[a] = v;
        else check(d_rdata[c] == dshadow[a], $sformatf("core %0d read %0d got %h exp %h", c, a, d_rdata[c], dshadow[a]));
        break;
      end
    end
    @(posedge clk); #1 d_req[c] = 0; d_we[c] = 0;
  endtask

  task automatic sync(input int c, input sync_op_e op, input logic [NC-1:0] arg);
    sync_req[c] = 1; sync_op[c] = op; sync_arg[c] = arg;
    do @(negedge clk); while (!core_run[c]);   // taken in a running cycle
    @(posedge clk); #1 sync_req[c] = 0;
    do @(negedge clk); while (!core_run[c]);   // parked until released
    @(posedge clk); #1;
  endtask

  function automatic int own_data(int c, int j);
    return c * 512 + (j / 8) * 64 + (j % 8);   // 5 pages per core
  endfunction

  // ---------------- the program each core runs ----------------
  task automatic core_prog(input int c);
    // 1. SIMD section
    sync(c, SYNC_BARRIER, 8'hFF);
    for (int a = 0; a < 64; a++) ifetch(c, a);
    // a shared routine entered at different words: same I-PB, bank conflicts
    for (int k = 0; k < 8; k++) ifetch(c, 512 + (c + k) % 8);
    // 2. own code, last core runs at the very top of the code space
    for (int k = 0; k < 32; k++)
      ifetch(c, (c == NC - 1) ? (I_PAGES * 8 - 32 + k) : (1024 + c * 1024 + k));
    // 3. own data, then shared page
    for (int j = 0; j < 40; j++) daccess(c, 1, own_data(c, j), {8'(c), 8'hDA, 16'(j)});
    for (int j = 0; j < 40; j++) daccess(c, 0, own_data(c, j), '0);
    sync(c, SYNC_BARRIER, 8'hFF);
    daccess(c, 1, 16000 + c, {8'(c), 24'h5A4ED});
    sync(c, SYNC_BARRIER, 8'hFF);
    for (int k = 0; k < 8; k++) daccess(c, 0, 16000 + k, '0);
    for (int k = 0; k < 4; k++) daccess(c, 0, 16000, '0);
    // 4. producer / consumers
    if (c == 0) begin
      for (int k = 0; k < 8; k++) daccess(c, 1, 8000 + k, 32'hC0DE_0000 + k);
      sync(c, SYNC_NOTIFY, 8'hFE);
    end else begin
      sync(c, SYNC_WAIT, '0);
      for (int k = 0; k < 8; k++) daccess(c, 0, 8000 + k, '0);
    end
    // 5. deep-sleep sensing
    sync(c, SYNC_SLEEP, '0);
    // 6. after wake-up: everything comes back from the NVM
    for (int j = 0; j < 40; j++) daccess(c, 0, own_data(c, j), '0);
    for (int k = 0; k < 8; k++) daccess(c, 0, 16000 + k, '0);
    ifetch(c, 0);
    n_done++;
  endtask

  initial begin
    n_ifill = 0; n_dfill = 0; n_evict = 0; n_wb = 0; n_pm_conf = 0; n_dm_conf = 0;
    n_pm_merge = 0; n_dm_merge = 0; n_stall = 0; n_barrier = 0; n_notify = 0;
    n_flush = 0; n_deep = 0; n_wake = 0; n_cycles = 0;
    rst_n = 0; wake_i = 0;
    for (int a = 0; a < (1 << DAW); a++) dshadow[a] = init_word(I_PAGES * 8 + a);
    for (int c = 0; c < NC; c++) begin
      i_req[c] = 0; i_addr[c] = 0; d_req[c] = 0; d_we[c] = 0; d_addr[c] = 0; d_wdata[c] = 0;
      sync_req[c] = 0; sync_op[c] = SYNC_BARRIER; sync_arg[c] = '0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    fork
      for (int c = 0; c < NC; c++) begin
        fork
          automatic int cc = c;
          core_prog(cc);
        join_none
      end
      begin
        // sensing side: wait for power gating, check the NVM, wake up
        wait (pwr_gate_o);
        repeat (50) @(posedge clk);
        check(pwr_gate_o && core_run == '0, "platform stays gated while sensing");
        for (int a = 0; a < (1 << DAW); a++)
          if (dut.u_nvm.mem[I_PAGES + a / 8][a % 8] != dshadow[a]) begin
            check(0, $sformatf("NVM word %0d not flushed", a));
            break;
          end
        check(1, "NVM holds all data at deep sleep");
        #1 wake_i = 1;
        @(posedge clk); #1 wake_i = 0;
      end
    join_none
    wait (n_done == NC);
    // single-cycle access: with the page resident and no other core active,
    // a read and a write are each granted in the cycle they are issued
    @(posedge clk); #1;
    daccess(0, 0, own_data(0, 5), '0);
    daccess(0, 0, own_data(0, 6), '0);
    check(last_wait[0] == 0, $sformatf("resident read waited %0d cycles", last_wait[0]));
    daccess(0, 1, own_data(0, 7), 32'h600D_0007);
    check(last_wait[0] == 0, $sformatf("resident write waited %0d cycles", last_wait[0]));
    daccess(0, 0, own_data(0, 7), '0);
    check(last_wait[0] == 0, "read-back of the write in one cycle");
    $display("cycles=%0d ifills=%0d dfills=%0d evictions=%0d writebacks=%0d stall-cycles=%0d",
             n_cycles, n_ifill, n_dfill, n_evict, n_wb, n_stall);
    $display("pm: conflicts=%0d merged=%0d  dm: conflicts=%0d merged=%0d",
             n_pm_conf, n_pm_merge, n_dm_conf, n_dm_merge);
    $display("barriers=%0d notify-wakes=%0d flushes=%0d deep-sleeps=%0d wakes=%0d",
             n_barrier, n_notify, n_flush, n_deep, n_wake);
    check(n_ifill > 0,    "instruction page misses happened");
    check(n_dfill > 0,    "data page misses happened");
    check(n_evict > 0,    "evictions happened");
    check(n_wb > 0,       "dirty write-backs happened");
    check(n_stall > 0,    "miss stalls happened");
    check(n_pm_conf > 0,  "PM crossbar conflicts happened");
    check(n_dm_conf > 0,  "DM crossbar conflicts happened");
    check(n_pm_merge > 0, "merged instruction fetches happened");
    check(n_dm_merge > 0, "merged data reads happened");
    check(n_barrier > 0,  "barriers happened");
    check(n_notify > 0,   "notification wake-ups happened");
    check(n_flush == 1 && n_deep == 1 && n_wake == 1, "one flush, deep sleep and wake-up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
