// rbc_crbi: current rollback index counter (CRBI).
//
// Counts the rollback history entries pushed since reset: every rollback,
// and every mark (which the design treats as a one-frame simulated rollback),
// increments it. Its value is stored as the timestamp tag of every written
// bits word and selects the top entry of the rollback history stack.
// Events: clr (to 0), up (+1, saturating at DEPTH-1 with full raised), nop.
// The design lets the history grow without bound; the bounded depth and the
// full flag are this design's choices. Synchronous, one event per clock.
module rbc_crbi
  import rbc_pkg::*;
#(
  parameter int unsigned RBH_DEPTH = 1024,
  parameter int unsigned TS_W      = $clog2(RBH_DEPTH)
) (
  input  logic            clk,
  input  crbi_ev_e        ev,
  output logic [TS_W-1:0] crbi,
  output logic            full   // crbi is at the last history entry
);
  assign full = (crbi == TS_W'(RBH_DEPTH - 1));

  always_ff @(posedge clk) begin
    unique case (ev)
      CRBI_CLR: crbi <= '0;
      CRBI_UP:  if (!full) crbi <= crbi + 1'b1;
      default:  ;
    endcase
  end
endmodule
