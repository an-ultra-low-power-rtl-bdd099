// Behavioural model of the unified non-volatile store (low-voltage STT-RAM),
// not synthesizable logic: the real part is a process-specific macro.
//
// The store holds PAGES pages of WORDS words (default 5120 pages of eight
// 32-bit words = 160 KB, 96 KB of code followed by 64 KB of data). It is
// accessed one whole page at a time, which is what the page buffers need.
// Handshake: the requester holds `req` with `we`, `page` and `wdata` stable
// until `done` pulses for one cycle. If `req` is first seen in cycle 0, `done`
// is high in cycle RD_LAT (read) or WR_LAT (write); both must be at least 2.
// A read's page
// is on `rdata` in the `done` cycle (and stays there until the next read); a
// write takes WR_LAT cycles and the page is stored when `done` pulses. The
// next request is taken in the cycle after `done`. The latencies are assumed
// (the description only calls the STT-RAM low-latency). Content is
// non-volatile: it survives the power gating of the rest of the platform and
// starts from wbsn_pkg::nvm_init_word so simulations can predict it.
module nvm_sttram #(
  parameter int unsigned PAGES  = 5120,
  parameter int unsigned WORDS  = 8,
  parameter int unsigned DW     = 32,
  parameter int unsigned RD_LAT = 2,
  parameter int unsigned WR_LAT = 4,
  localparam int unsigned PW    = (PAGES > 1) ? $clog2(PAGES) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     req,
  input  logic                     we,
  input  logic [PW-1:0]            page,
  input  logic [WORDS-1:0][DW-1:0] wdata,
  output logic                     done,
  output logic [WORDS-1:0][DW-1:0] rdata
);

  logic [WORDS-1:0][DW-1:0] mem [PAGES];

  initial begin
    for (int p = 0; p < int'(PAGES); p++)
      for (int w = 0; w < int'(WORDS); w++)
        mem[p][w] = DW'(wbsn_pkg::nvm_init_word(p * WORDS + w));
  end

  initial begin
    assert (RD_LAT >= 2 && WR_LAT >= 2) else $error("NVM latencies must be at least 2");
  end

  logic        busy;
  int unsigned cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      cnt   <= 0;
      done  <= 1'b0;
      rdata <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (req && !done) begin
          busy <= 1'b1;
          cnt  <= (we ? WR_LAT : RD_LAT) - 2;
        end
      end else if (cnt != 0) begin
        cnt <= cnt - 1;
      end else begin
        busy <= 1'b0;
        done <= 1'b1;
        if (we) mem[page] <= wdata;
        else    rdata     <= mem[page];
      end
    end
  end

endmodule
