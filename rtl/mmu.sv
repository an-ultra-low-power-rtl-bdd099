// Memory management unit: the content-addressable directory of the page
// buffers and the engine that moves pages between them and the NVM.
//
// Lookup (combinational, every cycle, for every core): the page number of
// each instruction and data request is compared with the tags of all
// instruction page buffers (I-PBs) or data page buffers (D-PBs). A match
// gives the buffer index the crossbar routes the request to (`i_sel`,
// `d_sel`) with `i_hit`/`d_hit` high. A request that matches nothing raises
// the core's `miss_stall`, which the synchronizer turns into a stall.
//
// Transfers (one at a time, since there is one NVM): when idle the MMU takes
// the next core with a missing request in round-robin order (its
// instruction miss before its data miss) and picks a victim buffer: an invalid
// one if there is one, otherwise the next one in round-robin order that no
// core is using this cycle. The victim is invalidated at once, so nobody
// touches it during the transfer. A data victim that was written since it
// was loaded (dirty) is first written back as a whole page from its
// `page_out` port; then the missing page is read from the NVM and stored in
// the victim in one cycle (`ipb_load`/`dpb_load`, data on the NVM read bus)
// and its tag becomes valid. Instruction pages are read-only and are never
// written back. Counted from the first cycle a request misses, it hits
// RD_LAT + 2 cycles later for an instruction page, RD_LAT + 3 for a data
// page, and RD_LAT + WR_LAT + 4 when a dirty data page is written back
// first (if no other transfer is in the way).
//
// Flush: before the platform is power gated, `flush_req` makes the MMU write
// every dirty data page back and then invalidate every buffer, because the
// buffers are volatile. `flush_done` pulses for one cycle at the end.
//
// The CAM translation, the load-on-miss with eviction and the stall signal
// follow the platform description. The service order, the replacement
// policy, write-back only of dirty pages and the flush are this design's
// choices. NVM layout: instruction pages 0 .. I_PAGES-1, then data pages.
module mmu #(
  parameter int unsigned N_CORES   = 8,
  parameter int unsigned N_IPB     = 8,
  parameter int unsigned N_DPB     = 16,
  parameter int unsigned WORDS     = 8,
  parameter int unsigned DW        = 32,
  parameter int unsigned IAW       = 15,    // instruction word address bits
  parameter int unsigned DAW       = 14,    // data word address bits
  parameter int unsigned I_PAGES   = 3072,  // 96 KB of 8-word, 32-bit pages
  parameter int unsigned NVM_PAGES = 5120,  // 160 KB
  localparam int unsigned OW  = $clog2(WORDS),
  localparam int unsigned IPW = IAW - OW,
  localparam int unsigned DPW = DAW - OW,
  localparam int unsigned TW  = (IPW > DPW) ? IPW : DPW,
  localparam int unsigned NPW = $clog2(NVM_PAGES),
  localparam int unsigned ISW = (N_IPB > 1) ? $clog2(N_IPB) : 1,
  localparam int unsigned DSW = (N_DPB > 1) ? $clog2(N_DPB) : 1,
  localparam int unsigned BW  = (ISW > DSW) ? ISW : DSW
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // requests from the cores
  input  logic                     i_req  [N_CORES],
  input  logic [IAW-1:0]           i_addr [N_CORES],
  input  logic                     d_req  [N_CORES],
  input  logic [DAW-1:0]           d_addr [N_CORES],
  // translation results
  output logic                     i_hit  [N_CORES],
  output logic [ISW-1:0]           i_sel  [N_CORES],
  output logic                     d_hit  [N_CORES],
  output logic [DSW-1:0]           d_sel  [N_CORES],
  output logic [N_CORES-1:0]       miss_stall,
  // page buffer side
  input  logic [N_DPB-1:0]         dpb_wr,               // word written this cycle
  input  logic [WORDS-1:0][DW-1:0] dpb_page [N_DPB],     // whole-page readout
  output logic [N_IPB-1:0]         ipb_load,
  output logic [N_DPB-1:0]         dpb_load,
  // NVM side (page-wide; read data goes straight to every buffer's page_in)
  output logic                     nvm_req,
  output logic                     nvm_we,
  output logic [NPW-1:0]           nvm_page,
  output logic [WORDS-1:0][DW-1:0] nvm_wdata,
  input  logic                     nvm_done,
  // deep-sleep flush handshake with the synchronizer
  input  logic                     flush_req,
  output logic                     flush_done,
  // status and events
  output logic                     busy,
  output logic                     ev_fill,     // a page was loaded
  output logic                     ev_wb,       // a dirty page was written back
  output logic                     ev_evict     // a valid page was replaced
);

  typedef enum logic [2:0] {
    ST_IDLE, ST_EVICT, ST_WB, ST_RD, ST_FLUSH, ST_FLUSH_END
  } state_e;

  state_e          state;
  logic            i_valid [N_IPB];
  logic [IPW-1:0]  i_tag   [N_IPB];
  logic            d_valid [N_DPB];
  logic            d_dirty [N_DPB];
  logic [DPW-1:0]  d_tag   [N_DPB];
  logic [ISW-1:0]  i_rr;
  logic [DSW-1:0]  d_rr;

  logic            x_is_d;     // transfer targets a D-PB
  logic            x_flush;    // write-back belongs to a flush
  logic [BW-1:0]   x_buf;      // victim buffer
  logic [TW-1:0]   x_tag;      // page being brought in
  logic [DPW-1:0]  x_old;      // page being written back
  logic [DSW:0]    fl_idx;

  // ---------------- CAM lookup ----------------
  logic [N_CORES-1:0] i_miss, d_miss;
  logic [N_IPB-1:0]   i_use;
  logic [N_DPB-1:0]   d_use;

  always_comb begin
    i_use = '0;
    d_use = '0;
    for (int c = 0; c < int'(N_CORES); c++) begin
      i_hit[c] = 1'b0;
      i_sel[c] = '0;
      d_hit[c] = 1'b0;
      d_sel[c] = '0;
      for (int b = 0; b < int'(N_IPB); b++)
        if (i_valid[b] && i_tag[b] == i_addr[c][IAW-1:OW]) begin
          i_hit[c] = 1'b1;
          i_sel[c] = ISW'(b);
        end
      for (int b = 0; b < int'(N_DPB); b++)
        if (d_valid[b] && d_tag[b] == d_addr[c][DAW-1:OW]) begin
          d_hit[c] = 1'b1;
          d_sel[c] = DSW'(b);
        end
      i_miss[c] = i_req[c] && !i_hit[c];
      d_miss[c] = d_req[c] && !d_hit[c];
      if (i_req[c] && i_hit[c]) i_use[i_sel[c]] = 1'b1;
      if (d_req[c] && d_hit[c]) d_use[d_sel[c]] = 1'b1;
    end
    miss_stall = i_miss | d_miss;
  end

  // ---------------- victim choice ----------------
  logic [ISW-1:0] i_vict;
  logic [DSW-1:0] d_vict;
  logic           i_vict_valid, d_vict_valid;

  always_comb begin
    // last match of a downward scan = first in scan order
    i_vict = i_rr;
    for (int k = int'(N_IPB) - 1; k >= 0; k--)
      if (!i_use[(int'(i_rr) + k) % N_IPB]) i_vict = ISW'((int'(i_rr) + k) % N_IPB);
    for (int b = int'(N_IPB) - 1; b >= 0; b--)
      if (!i_valid[b]) i_vict = ISW'(b);
    d_vict = d_rr;
    for (int k = int'(N_DPB) - 1; k >= 0; k--)
      if (!d_use[(int'(d_rr) + k) % N_DPB]) d_vict = DSW'((int'(d_rr) + k) % N_DPB);
    for (int b = int'(N_DPB) - 1; b >= 0; b--)
      if (!d_valid[b]) d_vict = DSW'(b);
    i_vict_valid = i_valid[i_vict];
    d_vict_valid = d_valid[d_vict];
  end

  // missing core to serve: round-robin from m_rr, instruction miss first
  localparam int unsigned CW = (N_CORES > 1) ? $clog2(N_CORES) : 1;
  logic [CW-1:0] m_rr, m_core;
  logic [TW-1:0] i_mpage, d_mpage;
  logic          m_any;
  always_comb begin
    m_core = m_rr;
    for (int k = int'(N_CORES) - 1; k >= 0; k--)
      if (miss_stall[(int'(m_rr) + k) % N_CORES]) m_core = CW'((int'(m_rr) + k) % N_CORES);
    m_any   = miss_stall != '0;
    i_mpage = TW'(i_addr[m_core][IAW-1:OW]);
    d_mpage = TW'(d_addr[m_core][DAW-1:OW]);
  end

  // ---------------- NVM port ----------------
  always_comb begin
    nvm_req   = (state == ST_WB) || (state == ST_RD);
    nvm_we    = (state == ST_WB);
    nvm_page  = (state == ST_WB) ? NPW'(I_PAGES + int'(x_old))
              : x_is_d           ? NPW'(I_PAGES + int'(x_tag))
              :                    NPW'(x_tag);
    nvm_wdata = dpb_page[x_buf[DSW-1:0]];
    ipb_load  = '0;
    dpb_load  = '0;
    if (state == ST_RD && nvm_done) begin
      if (x_is_d) dpb_load[x_buf[DSW-1:0]] = 1'b1;
      else        ipb_load[x_buf[ISW-1:0]] = 1'b1;
    end
    busy    = state != ST_IDLE;
    ev_fill = state == ST_RD && nvm_done;
    ev_wb   = state == ST_WB && nvm_done;
  end

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_IDLE;
      m_rr       <= '0;
      i_rr       <= '0;
      d_rr       <= '0;
      x_is_d     <= 1'b0;
      x_flush    <= 1'b0;
      x_buf      <= '0;
      x_tag      <= '0;
      x_old      <= '0;
      fl_idx     <= '0;
      flush_done <= 1'b0;
      ev_evict   <= 1'b0;
      for (int b = 0; b < int'(N_IPB); b++) begin
        i_valid[b] <= 1'b0;
        i_tag[b]   <= '0;
      end
      for (int b = 0; b < int'(N_DPB); b++) begin
        d_valid[b] <= 1'b0;
        d_dirty[b] <= 1'b0;
        d_tag[b]   <= '0;
      end
    end else begin
      flush_done <= 1'b0;
      ev_evict   <= 1'b0;
      for (int b = 0; b < int'(N_DPB); b++)
        if (dpb_wr[b]) d_dirty[b] <= 1'b1;

      unique case (state)
        ST_IDLE: begin
          if (flush_req && !flush_done) begin
            fl_idx <= '0;
            state  <= ST_FLUSH;
          end else if (m_any && i_miss[m_core]) begin
            m_rr             <= CW'((int'(m_core) + 1) % N_CORES);
            x_is_d           <= 1'b0;
            x_flush          <= 1'b0;
            x_buf            <= BW'(i_vict);
            x_tag            <= i_mpage;
            ev_evict         <= i_vict_valid;
            i_valid[i_vict]  <= 1'b0;
            i_rr             <= ISW'((int'(i_vict) + 1) % N_IPB);
            state            <= ST_RD;
          end else if (m_any) begin
            m_rr             <= CW'((int'(m_core) + 1) % N_CORES);
            x_is_d           <= 1'b1;
            x_flush          <= 1'b0;
            x_buf            <= BW'(d_vict);
            x_tag            <= d_mpage;
            x_old            <= d_tag[d_vict];
            ev_evict         <= d_vict_valid;
            d_valid[d_vict]  <= 1'b0;
            d_rr             <= DSW'((int'(d_vict) + 1) % N_DPB);
            state            <= ST_EVICT;
          end
        end
        ST_EVICT: begin
          // dirty already includes a write made in the selection cycle
          state <= d_dirty[x_buf[DSW-1:0]] ? ST_WB : ST_RD;
        end
        ST_WB: begin
          if (nvm_done) begin
            d_dirty[x_buf[DSW-1:0]] <= 1'b0;
            if (x_flush) begin
              fl_idx <= fl_idx + 1'b1;
              state  <= ST_FLUSH;
            end else begin
              state  <= ST_RD;
            end
          end
        end
        ST_RD: begin
          if (nvm_done) begin
            if (x_is_d) begin
              d_valid[x_buf[DSW-1:0]] <= 1'b1;
              d_tag[x_buf[DSW-1:0]]   <= DPW'(x_tag);
              d_dirty[x_buf[DSW-1:0]] <= 1'b0;
            end else begin
              i_valid[x_buf[ISW-1:0]] <= 1'b1;
              i_tag[x_buf[ISW-1:0]]   <= IPW'(x_tag);
            end
            state <= ST_IDLE;
          end
        end
        ST_FLUSH: begin
          if (int'(fl_idx) >= int'(N_DPB)) begin
            state <= ST_FLUSH_END;
          end else if (d_valid[fl_idx[DSW-1:0]] && d_dirty[fl_idx[DSW-1:0]]) begin
            x_is_d  <= 1'b1;
            x_flush <= 1'b1;
            x_buf   <= BW'(fl_idx[DSW-1:0]);
            x_old   <= d_tag[fl_idx[DSW-1:0]];
            state   <= ST_WB;
          end else begin
            fl_idx <= fl_idx + 1'b1;
          end
        end
        ST_FLUSH_END: begin
          for (int b = 0; b < int'(N_IPB); b++) i_valid[b] <= 1'b0;
          for (int b = 0; b < int'(N_DPB); b++) begin
            d_valid[b] <= 1'b0;
            d_dirty[b] <= 1'b0;
          end
          flush_done <= 1'b1;
          state      <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // Only one NVM transfer at a time, and a loaded buffer is never in use.
  a_one_load: assert property (@(posedge clk) disable iff (!rst_n)
    !(ipb_load != '0 && dpb_load != '0)) else $error("two page loads at once");
  a_no_wr_on_load: assert property (@(posedge clk) disable iff (!rst_n)
    (dpb_load & dpb_wr) == '0) else $error("word write into a buffer being loaded");

endmodule
