// rbc_latch: clocked holding register with load/hold control (WBLATCH and
// DLATCH).
//
// On a clock edge with load set, q takes d; otherwise q holds. It is cleared
// by the synchronous active-high reset rst. WBLATCH carries the new written
// bits word from the first to the second cycle of a write; DLATCH holds the
// word read from the RAM for the host and for the archive copy of an advance.
// The design names the load and hold controls; making it an edge-triggered
// register with a reset is this design's choice.
module rbc_latch #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst)       q <= '0;
    else if (load) q <= d;
  end
endmodule
