// rbc_frame_ptr: mark frame pointer register (CMF and OMF).
//
// Holds a frame number 0..NFRAMES-1, or NFRAMES for the archive frame.
// Events: clear (to 0), up and down (modulo NFRAMES, the circular buffer of
// frames), load (takes din, used when a rollback loads the encoded
// destination frame or the archive frame into CMF) and nop. The clear, up,
// down and nop events follow the design; load is the path from the effective
// address multiplexer back into CMF. Synchronous, one event per clock.
module rbc_frame_ptr
  import rbc_pkg::*;
#(
  parameter int unsigned NFRAMES = 32,
  parameter int unsigned FRAME_W = $clog2(NFRAMES + 1)
) (
  input  logic               clk,
  input  fp_ev_e             ev,
  input  logic [FRAME_W-1:0] din,
  output logic [FRAME_W-1:0] q
);
  always_ff @(posedge clk) begin
    unique case (ev)
      FP_CLEAR: q <= '0;
      FP_UP:    q <= (int'(q) >= int'(NFRAMES) - 1) ? '0 : q + 1'b1;
      FP_DOWN:  q <= (q == '0) ? FRAME_W'(NFRAMES - 1) : q - 1'b1;
      FP_LOAD:  q <= din;
      default:  ;
    endcase
  end
endmodule
