// Duty-cycle test of the whole platform at its default size: several
// sensing periods in a row, each one a short processing burst followed by
// deep sleep, the way the platform is meant to run.
//
// In every period the sensing side (modelled here) deposits eight new
// samples per channel straight into the non-volatile store while the
// digital domain is power gated, then raises wake_i. Each of the eight
// cores owns one channel. It rejoins the others at a barrier, runs a shared
// 16-instruction loop in lock-step, reads its eight new samples, applies a
// three-tap moving sum using two history samples it keeps in data memory,
// writes the eight results and its new history, and sleeps. Because the
// samples land in a fresh page each period and the page buffers are wiped by
// every power-down, every period starts with instruction and data misses
// and ends with a flush.
//
// Checked: every sample the cores read, every result (in the NVM after the
// last flush, against sums computed here), one flush / deep sleep / wake-up
// per period. Reported: the share of cycles spent active, in page
// transfers and in deep sleep, the same kind of figures the published
// evaluation gives for its benchmarks (those are not expected to match: the
// processing here is a toy kernel, not an ECG application).
module tb_wbsn_duty;
  import wbsn_pkg::*;
  localparam int NC = 8, IAW = 15, DAW = 14, I_PAGES = 3072;
  localparam int PERIODS = 6, SLEEP_CYC = 3000;

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

  int checks = 0, failures = 0, n_done = 0;
  logic [31:0] dshadow [1 << DAW];
  logic [31:0] expect_y [NC][PERIODS][8];

  function automatic logic [31:0] init_word(int a);
    logic [31:0] x;
    x = a;
    return (x * 32'h9E3779B1) ^ 32'h5A5A0000 ^ x;
  endfunction
  function automatic int in_addr(int c, int t, int k);  return c * 1024 + t * 8 + k;        endfunction
  function automatic int out_addr(int c, int t, int k); return 8192 + c * 512 + t * 8 + k;  endfunction
  function automatic int hist_addr(int c, int k);       return 12000 + c * 8 + k;           endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 12) $display("FAIL %s", what); end
  endtask

  // cycle accounting
  int n_active, n_xfer, n_deep, n_total, n_flush, n_wake;
  always @(posedge clk) if (rst_n) begin
    n_total++;
    n_active += int'(dut.pstate != PS_DEEP);
    n_xfer   += int'(dut.pstate != PS_DEEP && dut.mmu_busy);
    n_deep   += int'(dut.pstate == PS_DEEP);
    n_flush  += int'(dut.flush_done);
    n_wake   += int'(dut.pstate == PS_WAKE);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  task automatic dread(input int c, input int a, output logic [31:0] v);
    d_req[c] = 1; d_we[c] = 0; d_addr[c] = DAW'(a);
    forever begin
      @(negedge clk);
      if (d_gnt[c]) begin
        v = d_rdata[c];
        check(v == dshadow[a], $sformatf("core %0d read %0d", c, a));
        break;
      end
    end
    @(posedge clk); #1 d_req[c] = 0;
  endtask

  task automatic dwrite(input int c, input int a, input logic [31:0] v);
    d_req[c] = 1; d_we[c] = 1; d_addr[c] = DAW'(a); d_wdata[c] = v;
    forever begin
      @(negedge clk);
      if (d_gnt[c]) begin dshadow[a] = v; break; end
    end
    @(posedge clk); #1 d_req[c] = 0; d_we[c] = 0;
  endtask

  // issue a command; unless `last`, also wait until the core is released
  task automatic sync(input int c, input sync_op_e op, input logic [NC-1:0] arg, input bit last = 0);
    sync_req[c] = 1; sync_op[c] = op; sync_arg[c] = arg;
    do @(negedge clk); while (!core_run[c]);
    @(posedge clk); #1 sync_req[c] = 0;
    if (!last) begin
      do @(negedge clk); while (!core_run[c]);
      @(posedge clk); #1;
    end
  endtask

  // the per-channel program, one period per iteration
  task automatic core_prog(input int c);
    logic [31:0] x [8];
    logic [31:0] h0, h1;
    for (int t = 0; t < PERIODS; t++) begin
      sync(c, SYNC_BARRIER, 8'hFF);
      for (int a = 0; a < 16; a++) ifetch(c, a);
      for (int k = 0; k < 8; k++) dread(c, in_addr(c, t, k), x[k]);
      dread(c, hist_addr(c, 0), h0);
      dread(c, hist_addr(c, 1), h1);
      for (int k = 0; k < 8; k++) begin
        dwrite(c, out_addr(c, t, k), x[k] + h1 + h0);
        h0 = h1;
        h1 = x[k];
      end
      dwrite(c, hist_addr(c, 0), h0);
      dwrite(c, hist_addr(c, 1), h1);
      sync(c, SYNC_SLEEP, '0, t == PERIODS - 1);
    end
    n_done++;
  endtask

  // sensing side: new samples go straight into the non-volatile store
  logic [31:0] ref_h0 [NC], ref_h1 [NC];
  task automatic deposit(input int t);
    for (int c = 0; c < NC; c++)
      for (int k = 0; k < 8; k++) begin
        logic [31:0] s;
        s = $urandom_range(0, 4095);
        dut.u_nvm.mem[I_PAGES + in_addr(c, t, k) / 8][k] = s;
        dshadow[in_addr(c, t, k)] = s;
        expect_y[c][t][k] = s + ref_h1[c] + ref_h0[c];
        ref_h0[c] = ref_h1[c];
        ref_h1[c] = s;
      end
  endtask

  initial begin
    n_active = 0; n_xfer = 0; n_deep = 0; n_total = 0; n_flush = 0; n_wake = 0;
    rst_n = 0; wake_i = 0;
    for (int a = 0; a < (1 << DAW); a++) dshadow[a] = init_word(I_PAGES * 8 + a);
    for (int c = 0; c < NC; c++) begin
      i_req[c] = 0; i_addr[c] = 0; d_req[c] = 0; d_we[c] = 0; d_addr[c] = 0; d_wdata[c] = 0;
      sync_req[c] = 0; sync_op[c] = SYNC_BARRIER; sync_arg[c] = '0;
      ref_h0[c] = dshadow[hist_addr(c, 0)];
      ref_h1[c] = dshadow[hist_addr(c, 1)];
    end
    repeat (2) @(posedge clk);
    deposit(0);
    #1 rst_n = 1;
    for (int c = 0; c < NC; c++) begin
      fork
        automatic int cc = c;
        core_prog(cc);
      join_none
    end
    for (int t = 1; t <= PERIODS; t++) begin
      wait (pwr_gate_o);
      @(posedge clk); #1;
      if (t < PERIODS) deposit(t);
      if (t == PERIODS) break;
      repeat (SLEEP_CYC) @(posedge clk);
      #1 wake_i = 1;
      @(posedge clk); #1 wake_i = 0;
      wait (!pwr_gate_o);
    end
    wait (n_done == NC);
    check(pwr_gate_o, "platform asleep at the end");
    for (int c = 0; c < NC; c++)
      for (int t = 0; t < PERIODS; t++)
        for (int k = 0; k < 8; k++)
          check(dut.u_nvm.mem[I_PAGES + out_addr(c, t, k) / 8][k] == expect_y[c][t][k],
                $sformatf("channel %0d period %0d result %0d", c, t, k));
    check(n_flush == PERIODS && n_wake == PERIODS - 1,
          $sformatf("%0d flushes, %0d wake-ups", n_flush, n_wake));
    $display("cycles=%0d active=%0d (%0d%%) page-transfer=%0d (%0d%% of active) deep-sleep=%0d (%0d%%)",
             n_total, n_active, 100 * n_active / n_total, n_xfer, 100 * n_xfer / n_active,
             n_deep, 100 * n_deep / n_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
