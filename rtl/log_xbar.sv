// Logarithmic interconnect: a single-cycle crossbar from N_M cores to N_S
// memory banks (page buffers).
//
// Every master presents a request with a bank index (`m_sel`), a word offset
// inside the bank, a write enable and write data. In the same cycle each
// bank picks one of the masters that address it, round-robin starting after
// the master it served last, and drives the bank's word port with that
// master's access. The grant and, for a read, the bank's read data return to
// the master combinationally in that cycle; a write lands at the clock edge.
// Masters that lose arbitration see `m_gnt` low and simply hold their
// request. With BCAST set, every other master that reads the same word of the
// same bank as the winning read is granted too and gets the same data: cores
// running the same code in lock-step (SIMD) then cost one bank access
// instead of eight.
//
// The single-cycle access and the arbitration on conflicts follow the
// platform description; the round-robin policy and the read broadcast are
// this design's choices. `conflict[s]` flags a cycle in which bank s turned a
// master away, `merged[s]` one in which it served several masters at once.
module log_xbar #(
  parameter int unsigned N_M   = 8,
  parameter int unsigned N_S   = 16,
  parameter int unsigned OFF_W = 3,
  parameter int unsigned DW    = 32,
  parameter bit          BCAST = 1'b1,
  localparam int unsigned SW   = (N_S > 1) ? $clog2(N_S) : 1,
  localparam int unsigned MW   = (N_M > 1) ? $clog2(N_M) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // master side
  input  logic             m_req   [N_M],
  input  logic             m_we    [N_M],
  input  logic [SW-1:0]    m_sel   [N_M],
  input  logic [OFF_W-1:0] m_off   [N_M],
  input  logic [DW-1:0]    m_wdata [N_M],
  output logic             m_gnt   [N_M],
  output logic [DW-1:0]    m_rdata [N_M],
  // bank side
  output logic             s_en    [N_S],
  output logic             s_we    [N_S],
  output logic [OFF_W-1:0] s_off   [N_S],
  output logic [DW-1:0]    s_wdata [N_S],
  input  logic [DW-1:0]    s_rdata [N_S],
  // activity flags
  output logic             conflict[N_S],
  output logic             merged  [N_S]
);

  logic [MW-1:0]  rr_ptr [N_S];   // first master to consider next time
  logic [MW-1:0]  win    [N_S];
  logic [N_M-1:0] reqv   [N_S];
  logic [N_M-1:0] gntv   [N_S];

  always_comb begin
    for (int s = 0; s < int'(N_S); s++) begin
      reqv[s] = '0;
      gntv[s] = '0;
      win[s]  = rr_ptr[s];
      for (int m = 0; m < int'(N_M); m++)
        reqv[s][m] = m_req[m] && (int'(m_sel[m]) == s);
      // round-robin: scan masters from rr_ptr upward, wrapping; keep the first
      for (int k = int'(N_M) - 1; k >= 0; k--) begin
        logic [MW-1:0] idx;
        idx = MW'((int'(rr_ptr[s]) + k) % N_M);
        if (reqv[s][idx]) win[s] = idx;
      end
      if (reqv[s] != '0) begin
        gntv[s][win[s]] = 1'b1;
        if (BCAST && !m_we[win[s]])
          for (int m = 0; m < int'(N_M); m++)
            if (reqv[s][m] && !m_we[m] && m_off[m] == m_off[win[s]])
              gntv[s][m] = 1'b1;
      end
      s_en[s]     = reqv[s] != '0;
      s_we[s]     = s_en[s] && m_we[win[s]];
      s_off[s]    = m_off[win[s]];
      s_wdata[s]  = m_wdata[win[s]];
      conflict[s] = (reqv[s] & ~gntv[s]) != '0;
      merged[s]   = $countones(gntv[s]) > 1;
    end
    for (int m = 0; m < int'(N_M); m++) begin
      m_gnt[m]   = 1'b0;
      m_rdata[m] = s_rdata[m_sel[m]];
      for (int s = 0; s < int'(N_S); s++)
        if (gntv[s][m]) m_gnt[m] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(N_S); s++) rr_ptr[s] <= '0;
    end else begin
      for (int s = 0; s < int'(N_S); s++)
        if (s_en[s]) rr_ptr[s] <= MW'((int'(win[s]) + 1) % N_M);
    end
  end

  // Bus rules: a grant needs a request, and a bank never takes two writes.
  always_comb begin
    for (int m = 0; m < int'(N_M); m++)
      assert (!m_gnt[m] || m_req[m]) else $error("grant without request, master %0d", m);
    for (int s = 0; s < int'(N_S); s++)
      assert (!(s_we[s] && $countones(gntv[s]) != 1)) else $error("bank %0d: write shared", s);
  end

endmodule
