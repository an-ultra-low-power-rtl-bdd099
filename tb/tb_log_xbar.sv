// Self-checking test of log_xbar at its default size (8 masters, 16 banks).
// The testbench keeps its own banks and its own round-robin pointer per
// bank, predicts which masters each cycle should be granted (one winner
// per bank, plus every master reading the same word as a winning read),
// and checks grants, read data in the grant cycle, written words, and the
// conflict/merged flags. Traffic is random, with phases that concentrate
// requests on few banks and offsets to force conflicts and broadcasts.
module tb_log_xbar;
  localparam int NM = 8, NS = 16, OW = 3, DW = 32;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic          m_req [NM], m_we [NM], m_gnt [NM];
  logic [3:0]    m_sel [NM];
  logic [OW-1:0] m_off [NM];
  logic [DW-1:0] m_wdata [NM], m_rdata [NM];
  logic          s_en [NS], s_we [NS], conflict [NS], merged [NS];
  logic [OW-1:0] s_off [NS];
  logic [DW-1:0] s_wdata [NS], s_rdata [NS];

  logic [DW-1:0] bank [NS][8];
  int            rr [NS];
  int checks = 0, failures = 0, n_conflict = 0, n_merged = 0;

  log_xbar #(.N_M(NM), .N_S(NS), .OFF_W(OW), .DW(DW), .BCAST(1'b1)) dut (.*);

  // banks: combinational read, write at the edge
  always_comb for (int s = 0; s < NS; s++) s_rdata[s] = bank[s][s_off[s]];
  always_ff @(posedge clk) for (int s = 0; s < NS; s++) if (s_en[s] && s_we[s]) bank[s][s_off[s]] <= s_wdata[s];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_g [NM];
    logic [DW-1:0] exp_rd [NM];
    logic [DW-1:0] nbank [NS][8];
    rst_n = 0;
    for (int s = 0; s < NS; s++) begin
      rr[s] = 0;
      for (int w = 0; w < 8; w++) bank[s][w] = $urandom;
    end
    for (int m = 0; m < NM; m++) begin
      m_req[m] = 0; m_we[m] = 0; m_sel[m] = 0; m_off[m] = 0; m_wdata[m] = 0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int nb, no;
      nb = (cyc % 1000 < 300) ? 2 : NS;     // focused phase: two banks
      no = (cyc % 500 < 200) ? 1 : 8;       // focused offsets: broadcasts
      for (int m = 0; m < NM; m++) begin
        m_req[m]   = $urandom_range(0, 3) != 0;
        m_we[m]    = $urandom_range(0, 3) == 0;
        m_sel[m]   = 4'($urandom_range(0, nb - 1));
        m_off[m]   = 3'($urandom_range(0, no - 1));
        m_wdata[m] = $urandom;
      end
      #1;
      // reference arbitration
      nbank = bank;
      for (int m = 0; m < NM; m++) exp_g[m] = 0;
      for (int s = 0; s < NS; s++) begin
        int w;
        bit any;
        w = -1; any = 0;
        for (int k = 0; k < NM; k++) begin
          int m;
          m = (rr[s] + k) % NM;
          if (w < 0 && m_req[m] && m_sel[m] == s) w = m;
        end
        if (w >= 0) begin
          int ng, nr;
          ng = 0; nr = 0;
          exp_g[w] = 1;
          if (!m_we[w]) begin
            for (int m = 0; m < NM; m++)
              if (m_req[m] && m_sel[m] == s && !m_we[m] && m_off[m] == m_off[w]) exp_g[m] = 1;
          end else begin
            nbank[s][m_off[w]] = m_wdata[w];
          end
          for (int m = 0; m < NM; m++) if (m_req[m] && m_sel[m] == s) begin nr++; if (exp_g[m]) ng++; end
          check(conflict[s] == (ng < nr), $sformatf("cyc %0d conflict flag bank %0d", cyc, s));
          check(merged[s] == (ng > 1), $sformatf("cyc %0d merged flag bank %0d", cyc, s));
          if (ng < nr) n_conflict++;
          if (ng > 1) n_merged++;
          rr[s] = (w + 1) % NM;
        end
      end
      for (int m = 0; m < NM; m++) begin
        check(m_gnt[m] == exp_g[m], $sformatf("cyc %0d grant m%0d got %0d exp %0d", cyc, m, m_gnt[m], exp_g[m]));
        if (exp_g[m] && !m_we[m])
          check(m_rdata[m] == bank[m_sel[m]][m_off[m]], $sformatf("cyc %0d rdata m%0d", cyc, m));
      end
      @(posedge clk); #1;
      for (int s = 0; s < NS; s++) for (int w = 0; w < 8; w++)
        check(bank[s][w] == nbank[s][w], $sformatf("cyc %0d bank %0d word %0d", cyc, s, w));
    end
    check(n_conflict > 0, "no conflict seen");
    check(n_merged > 0, "no broadcast seen");
    $display("conflicts=%0d broadcasts=%0d", n_conflict, n_merged);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
