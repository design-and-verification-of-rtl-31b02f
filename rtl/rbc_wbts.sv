// rbc_wbts: written-bits store, timestamp tag store and advance counter
// (WB+TS with WAC).
//
// For every word address it keeps an NFRAMES-bit written-bits word (bit f is
// set when frame f holds a version of that word) and the timestamp tag, the
// rollback index current when the word was last written. WAC is a modulo
// counter that steps through all addresses during an advance.
// Events (one per clock):
//   READ   wb/ts show the entry at wordaddr (the outputs show it whenever
//          rdwac is low, so READ only names the intent),
//   WRITE  entry at wordaddr takes wb_in/ts_in at the clock edge,
//   RESET  all written bits and tags are cleared at the clock edge,
//   CLRWAC WAC <= 0,  UPWAC WAC <= WAC+1 mod WORDS,
//   rdwac  (a separate select input) wb/ts show the entry at WAC;
//          waciszero is set when WAC is 0.
// Reads are combinational, writes take effect at the clock edge. The event
// set and what each does follow the design. Making the read at WAC a select
// of its own, so that it can be combined with UPWAC in one clock, and
// clearing WAC on RESET too, are this design's choices.
module rbc_wbts
  import rbc_pkg::*;
#(
  parameter int unsigned NFRAMES   = 32,
  parameter int unsigned WORDS     = 1024,
  parameter int unsigned RBH_DEPTH = 1024,
  parameter int unsigned ADDR_W    = $clog2(WORDS),
  parameter int unsigned TS_W      = $clog2(RBH_DEPTH)
) (
  input  logic               clk,
  input  wbts_ev_e           ev,
  input  logic               rdwac,
  input  logic [ADDR_W-1:0]  wordaddr,
  input  logic [NFRAMES-1:0] wb_in,
  input  logic [TS_W-1:0]    ts_in,
  output logic [NFRAMES-1:0] wb,
  output logic [TS_W-1:0]    ts,
  output logic [ADDR_W-1:0]  wac,
  output logic               waciszero
);
  logic [NFRAMES-1:0] wbs [WORDS];
  logic [TS_W-1:0]    tss [WORDS];

  logic [ADDR_W-1:0] rd_addr;
  assign rd_addr   = rdwac ? wac : wordaddr;
  assign wb        = wbs[rd_addr];
  assign ts        = tss[rd_addr];
  assign waciszero = (wac == '0);

  always_ff @(posedge clk) begin
    unique case (ev)
      WBTS_RESET: begin
        for (int unsigned a = 0; a < WORDS; a++) begin
          wbs[a] <= '0;
          tss[a] <= '0;
        end
      end
      WBTS_WRITE: begin
        wbs[wordaddr] <= wb_in;
        tss[wordaddr] <= ts_in;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    unique case (ev)
      WBTS_RESET, WBTS_CLRWAC: wac <= '0;
      WBTS_UPWAC:              wac <= (int'(wac) == int'(WORDS) - 1) ? '0 : wac + 1'b1;
      default: ;
    endcase
  end
endmodule
