// Eight-core bio-signal processing platform with a two-level memory: a
// 160 KB non-volatile store (STT-RAM) holding all code and data, and tiny
// volatile page buffers in front of it that the cores actually access.
//
// Structure:
//   cores --(addr)--> MMU (tag CAM) --(buffer index)--> PM crossbar --> 8 I-PBs
//                                                   \-> DM crossbar --> 16 D-PBs
//   MMU <--page-wide--> NVM;  synchronizer <-- MMU miss stalls, core commands
// The cores themselves are outside this module: each has an instruction
// port (i_*), a data port (d_*), a synchronizer command port (sync_*) and a
// run enable (core_run). Addresses are word addresses: 15 bits cover the
// 96 KB code space and 14 bits the 64 KB data space, both in 32-bit words.
//
// Timing seen by a core: a request whose page is in a buffer and that wins
// its bank is granted in the same cycle (`*_gnt`), with read data
// combinationally on `*_rdata` and write data stored at the clock edge. A
// request that loses arbitration or misses is simply not granted; the core
// holds it. A miss also clears `core_run` until the MMU has brought the page
// in (RD_LAT + 2 cycles, more if a dirty page is written back first). When
// all cores have issued SYNC_SLEEP the platform flushes dirty pages and
// raises `pwr_gate_o`; `wake_i` brings it back.
//
// Core count, buffer counts, page size and memory sizes follow the platform
// description; the word width, the NVM latencies and the synchronizer
// command port are this design's choices.
module wbsn_top
  import wbsn_pkg::*;
#(
  parameter int unsigned N_CORES    = 8,
  parameter int unsigned N_IPB      = 8,
  parameter int unsigned N_DPB      = 16,
  parameter int unsigned PB_WORDS   = 8,
  parameter int unsigned WORD_W     = 32,
  parameter int unsigned IMEM_KB    = 96,
  parameter int unsigned DMEM_KB    = 64,
  parameter int unsigned NVM_RD_LAT = 2,
  parameter int unsigned NVM_WR_LAT = 4,
  localparam int unsigned IWORDS    = IMEM_KB * 1024 / (WORD_W / 8),
  localparam int unsigned DWORDS    = DMEM_KB * 1024 / (WORD_W / 8),
  localparam int unsigned IAW       = $clog2(IWORDS),
  localparam int unsigned DAW       = $clog2(DWORDS),
  localparam int unsigned I_PAGES   = IWORDS / PB_WORDS,
  localparam int unsigned NVM_PAGES = (IWORDS + DWORDS) / PB_WORDS,
  localparam int unsigned OW        = $clog2(PB_WORDS),
  localparam int unsigned ISW       = (N_IPB > 1) ? $clog2(N_IPB) : 1,
  localparam int unsigned DSW       = (N_DPB > 1) ? $clog2(N_DPB) : 1,
  localparam int unsigned NPW       = $clog2(NVM_PAGES)
) (
  input  logic               clk,
  input  logic               rst_n,
  // instruction ports
  input  logic               i_req   [N_CORES],
  input  logic [IAW-1:0]     i_addr  [N_CORES],
  output logic               i_gnt   [N_CORES],
  output logic [WORD_W-1:0]  i_rdata [N_CORES],
  // data ports
  input  logic               d_req   [N_CORES],
  input  logic               d_we    [N_CORES],
  input  logic [DAW-1:0]     d_addr  [N_CORES],
  input  logic [WORD_W-1:0]  d_wdata [N_CORES],
  output logic               d_gnt   [N_CORES],
  output logic [WORD_W-1:0]  d_rdata [N_CORES],
  // synchronizer ports
  input  logic               sync_req [N_CORES],
  input  sync_op_e           sync_op  [N_CORES],
  input  logic [N_CORES-1:0] sync_arg [N_CORES],
  output logic [N_CORES-1:0] core_run,
  // deep-sleep sensing
  input  logic               wake_i,
  output logic               pwr_gate_o
);

  typedef logic [PB_WORDS-1:0][WORD_W-1:0] page_t;

  // ---------------- MMU ----------------
  logic               i_hit [N_CORES];
  logic [ISW-1:0]     i_sel [N_CORES];
  logic               d_hit [N_CORES];
  logic [DSW-1:0]     d_sel [N_CORES];
  logic [N_CORES-1:0] miss_stall;
  logic [N_DPB-1:0]   dpb_wr;
  page_t              dpb_page [N_DPB];
  page_t              ipb_page [N_IPB];
  logic [N_IPB-1:0]   ipb_load;
  logic [N_DPB-1:0]   dpb_load;
  logic               nvm_req, nvm_we, nvm_done;
  logic [NPW-1:0]     nvm_page;
  page_t              nvm_wdata, nvm_rdata;
  logic               flush_req, flush_done, mmu_busy;
  logic               ev_fill, ev_wb, ev_evict;

  mmu #(
    .N_CORES(N_CORES), .N_IPB(N_IPB), .N_DPB(N_DPB), .WORDS(PB_WORDS),
    .DW(WORD_W), .IAW(IAW), .DAW(DAW), .I_PAGES(I_PAGES), .NVM_PAGES(NVM_PAGES)
  ) u_mmu (
    .clk, .rst_n,
    .i_req, .i_addr, .d_req, .d_addr,
    .i_hit, .i_sel, .d_hit, .d_sel, .miss_stall,
    .dpb_wr, .dpb_page, .ipb_load, .dpb_load,
    .nvm_req, .nvm_we, .nvm_page, .nvm_wdata, .nvm_done,
    .flush_req, .flush_done,
    .busy(mmu_busy), .ev_fill, .ev_wb, .ev_evict
  );

  // ---------------- NVM ----------------
  nvm_sttram #(
    .PAGES(NVM_PAGES), .WORDS(PB_WORDS), .DW(WORD_W),
    .RD_LAT(NVM_RD_LAT), .WR_LAT(NVM_WR_LAT)
  ) u_nvm (
    .clk, .rst_n,
    .req(nvm_req), .we(nvm_we), .page(nvm_page), .wdata(nvm_wdata),
    .done(nvm_done), .rdata(nvm_rdata)
  );

  // ---------------- PM crossbar + I-PBs ----------------
  logic               pm_req   [N_CORES];
  logic               pm_we    [N_CORES];
  logic [OW-1:0]      pm_off   [N_CORES];
  logic               dm_req   [N_CORES];
  logic [OW-1:0]      dm_off   [N_CORES];
  logic               ip_en    [N_IPB];
  logic               ip_we    [N_IPB];
  logic [OW-1:0]      ip_off   [N_IPB];
  logic [WORD_W-1:0]  ip_wdata [N_IPB];
  logic [WORD_W-1:0]  ip_rdata [N_IPB];
  logic               ip_conflict [N_IPB];
  logic               ip_merged   [N_IPB];
  logic               dp_en    [N_DPB];
  logic               dp_we    [N_DPB];
  logic [OW-1:0]      dp_off   [N_DPB];
  logic [WORD_W-1:0]  dp_wdata [N_DPB];
  logic [WORD_W-1:0]  dp_rdata [N_DPB];
  logic               dp_conflict [N_DPB];
  logic               dp_merged   [N_DPB];

  always_comb begin
    for (int c = 0; c < int'(N_CORES); c++) begin
      pm_req[c] = i_req[c] && i_hit[c];
      pm_we[c]  = 1'b0;                       // code is read-only
      pm_off[c] = i_addr[c][OW-1:0];
      dm_req[c] = d_req[c] && d_hit[c];
      dm_off[c] = d_addr[c][OW-1:0];
    end
  end

  log_xbar #(
    .N_M(N_CORES), .N_S(N_IPB), .OFF_W(OW), .DW(WORD_W), .BCAST(1'b1)
  ) u_pm_xbar (
    .clk, .rst_n,
    .m_req(pm_req), .m_we(pm_we), .m_sel(i_sel), .m_off(pm_off),
    .m_wdata(d_wdata), .m_gnt(i_gnt), .m_rdata(i_rdata),
    .s_en(ip_en), .s_we(ip_we), .s_off(ip_off), .s_wdata(ip_wdata),
    .s_rdata(ip_rdata), .conflict(ip_conflict), .merged(ip_merged)
  );

  for (genvar b = 0; b < int'(N_IPB); b++) begin : g_ipb
    page_buffer #(.WORDS(PB_WORDS), .DW(WORD_W)) u_ipb (
      .clk,
      .en(ip_en[b]), .we(ip_we[b]), .off(ip_off[b]), .wdata(ip_wdata[b]),
      .rdata(ip_rdata[b]),
      .load(ipb_load[b]), .page_in(nvm_rdata), .page_out(ipb_page[b])
    );
  end

  // ---------------- DM crossbar + D-PBs ----------------
  log_xbar #(
    .N_M(N_CORES), .N_S(N_DPB), .OFF_W(OW), .DW(WORD_W), .BCAST(1'b1)
  ) u_dm_xbar (
    .clk, .rst_n,
    .m_req(dm_req), .m_we(d_we), .m_sel(d_sel), .m_off(dm_off),
    .m_wdata(d_wdata), .m_gnt(d_gnt), .m_rdata(d_rdata),
    .s_en(dp_en), .s_we(dp_we), .s_off(dp_off), .s_wdata(dp_wdata),
    .s_rdata(dp_rdata), .conflict(dp_conflict), .merged(dp_merged)
  );

  for (genvar b = 0; b < int'(N_DPB); b++) begin : g_dpb
    page_buffer #(.WORDS(PB_WORDS), .DW(WORD_W)) u_dpb (
      .clk,
      .en(dp_en[b]), .we(dp_we[b]), .off(dp_off[b]), .wdata(dp_wdata[b]),
      .rdata(dp_rdata[b]),
      .load(dpb_load[b]), .page_in(nvm_rdata), .page_out(dpb_page[b])
    );
    assign dpb_wr[b] = dp_en[b] && dp_we[b];
  end

  // ---------------- synchronizer ----------------
  logic       ev_barrier, ev_notify_wait;
  pwr_state_e pstate;

  synchronizer #(.N_CORES(N_CORES)) u_sync (
    .clk, .rst_n,
    .sync_req, .sync_op, .sync_arg,
    .miss_stall, .mmu_busy, .core_run,
    .flush_req, .flush_done, .wake_i,
    .pwr_gate(pwr_gate_o), .pstate,
    .ev_barrier, .ev_notify_wait
  );

endmodule
