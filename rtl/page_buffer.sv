// Page buffer: one tiny volatile bank (I-PB or D-PB) caching one page of the
// non-volatile store.
//
// The bank holds WORDS words. It has two ways in and out:
//   * a word port, driven by the crossbar: `en`/`we`/`off`/`wdata` write one
//     word at the clock edge, and `rdata` returns the word at `off`
//     combinationally, so a granted read completes in the same cycle;
//   * a page port, driven by the MMU: `load` stores all of `page_in` in one
//     cycle, and `page_out` shows the whole page at all times, so a page can
//     be written back to the NVM without a word-by-word readout.
// The whole-page port and the eight-word size follow the platform
// description, where every bit cell has a direct input line. The cells are
// written here as edge-triggered storage so the RTL holds no latches; a
// full-custom latch array would replace this file in silicon. If `load` and
// a word write come in the same cycle the load wins (the MMU never issues
// both). There is no reset: the content is meaningless until the first load,
// and the MMU tracks validity.
module page_buffer #(
  parameter int unsigned WORDS = 8,
  parameter int unsigned DW    = 32,
  localparam int unsigned OW   = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                     clk,
  // word port (crossbar side)
  input  logic                     en,
  input  logic                     we,
  input  logic [OW-1:0]            off,
  input  logic [DW-1:0]            wdata,
  output logic [DW-1:0]            rdata,
  // page port (NVM / MMU side)
  input  logic                     load,
  input  logic [WORDS-1:0][DW-1:0] page_in,
  output logic [WORDS-1:0][DW-1:0] page_out
);

  logic [WORDS-1:0][DW-1:0] cells;

  always_ff @(posedge clk) begin
    if (load)
      cells <= page_in;
    else if (en && we)
      cells[off] <= wdata;
  end

  assign rdata    = cells[off];
  assign page_out = cells;

endmodule
