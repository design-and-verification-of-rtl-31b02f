// rbc_rbh: rollback history stack (RBH).
//
// Entry i is an NFRAMES-bit mask: a zero at bit f means frame f has been
// discarded by some rollback since the i-th rollback, so written bits tagged
// with timestamp i must be ANDed with entry i before use. Entry CRBI, the
// top, is always all ones.
// Events (one per clock):
//   READ/NOP  q shows entry idx (combinational, for every event),
//   UPDATE    every entry 0..top is ANDed with mask, which records the frames
//             a rollback (or the simulated rollback of a mark) discards, and
//             entry top+1 is set to all ones: the push of the new top entry,
//             in the same clock,
//   SETALL    entry idx is set to all ones (used after reset for entry 0).
// The design scans the stack from the top and stops at the first entry the
// mask leaves unchanged, since deeper entries already hold the bits. Here
// all entries up to the top are ANDed in the same clock, which gives the
// same contents in one cycle. The depth is bounded by RBH_DEPTH (this
// design's choice: the design lets the stack grow without bound).
module rbc_rbh
  import rbc_pkg::*;
#(
  parameter int unsigned NFRAMES   = 32,
  parameter int unsigned RBH_DEPTH = 1024,
  parameter int unsigned TS_W      = $clog2(RBH_DEPTH)
) (
  input  logic               clk,
  input  rbh_ev_e            ev,
  input  logic [TS_W-1:0]    idx,   // read / setall index
  input  logic [TS_W-1:0]    top,   // current rollback index (CRBI)
  input  logic [NFRAMES-1:0] mask,  // rollback destination mask
  output logic [NFRAMES-1:0] q
);
  logic [NFRAMES-1:0] rbh [RBH_DEPTH];

  assign q = rbh[idx];

  always_ff @(posedge clk) begin
    unique case (ev)
      RBH_UPDATE: begin
        for (int unsigned i = 0; i < RBH_DEPTH; i++)
          if (TS_W'(i) <= top) rbh[i] <= rbh[i] & mask;
        if (int'(top) < int'(RBH_DEPTH) - 1) rbh[top + 1'b1] <= '1;
      end
      RBH_SETALL: rbh[idx] <= '1;
      default: ;
    endcase
  end
endmodule
