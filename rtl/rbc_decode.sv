// rbc_decode: frame number to one-hot decoder (DECODE).
//
// Output bit f is set when the input frame number equals f. A frame number
// of NFRAMES or more (the archive frame) decodes to all zeros. This is the
// "dec" function of the design: d zeros, a one, then zeros. Purely
// combinational.
module rbc_decode #(
  parameter int unsigned NFRAMES = 32,
  parameter int unsigned FRAME_W = $clog2(NFRAMES + 1)
) (
  input  logic [FRAME_W-1:0] frame,
  output logic [NFRAMES-1:0] onehot
);
  always_comb begin
    for (int unsigned f = 0; f < NFRAMES; f++)
      onehot[f] = (int'(frame) == int'(f));
  end
endmodule
