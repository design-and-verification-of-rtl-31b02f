// rbc_cpencode: circular priority encoder (CPENCODE).
//
// Finds the first set bit of din while scanning circularly downwards from the
// CMF position (decc, one-hot) to the OMF position (deco, one-hot), both
// included: position c has the highest priority, then c-1, ..., wrapping from
// 0 to NFRAMES-1, and ending at o. Bits outside that circular range are
// ignored. Outputs: the one-hot result cpout, its frame number num, and
// allzero when no bit in the range is set (num is then NFRAMES, the archive
// frame).
//
// The design describes this as a ring of cells with propagate and kill
// chains closed into a loop. This version avoids the combinational loop: it
// turns the one-hot pointers into numbers and scans the rotated word, which
// gives the same function. Purely combinational.
module rbc_cpencode #(
  parameter int unsigned NFRAMES = 32,
  parameter int unsigned FRAME_W = $clog2(NFRAMES + 1)
) (
  input  logic [NFRAMES-1:0] din,
  input  logic [NFRAMES-1:0] decc,
  input  logic [NFRAMES-1:0] deco,
  output logic [NFRAMES-1:0] cpout,
  output logic [FRAME_W-1:0] num,
  output logic               allzero
);
  localparam int unsigned IDX_W = $clog2(NFRAMES);

  logic [IDX_W-1:0] c_idx, o_idx;
  logic [IDX_W:0]   span;   // number of positions after c that are in range

  // One-hot to number (OR of the indices of set bits).
  always_comb begin
    c_idx = '0;
    o_idx = '0;
    for (int unsigned f = 0; f < NFRAMES; f++) begin
      if (decc[f]) c_idx |= IDX_W'(f);
      if (deco[f]) o_idx |= IDX_W'(f);
    end
    span = (c_idx >= o_idx) ? (IDX_W+1)'(c_idx - o_idx)
                            : (IDX_W+1)'(int'(c_idx) + int'(NFRAMES) - int'(o_idx));
  end

  always_comb begin
    logic [IDX_W-1:0] pos;
    logic found;
    found   = 1'b0;
    cpout   = '0;
    num     = FRAME_W'(NFRAMES);
    for (int unsigned k = 0; k < NFRAMES; k++) begin
      pos = IDX_W'((int'(c_idx) >= int'(k)) ? int'(c_idx) - int'(k)
                                            : int'(c_idx) + int'(NFRAMES) - int'(k));
      if (!found && (k <= int'(span)) && din[pos]) begin
        found      = 1'b1;
        cpout[pos] = 1'b1;
        num        = FRAME_W'(pos);
      end
    end
    allzero = !found;
  end
endmodule
