// rbc_ram: the version-controlled main memory (RAM).
//
// NFRAMES+1 frames of WORDS words of DATA_W bits: frames 0..NFRAMES-1 are the
// mark frames, frame NFRAMES is the archive frame. The address is the frame
// number concatenated above the word address, as the design forms it; the
// memory is written as a two-dimensional array so that only the frames that
// exist take space. Events: READ (rdata shows the addressed word; the read
// is combinational and the chip latches it in DLATCH), WRITE (the addressed
// word takes wdata at the clock edge), NOP. Contents are not initialised.
module rbc_ram
  import rbc_pkg::*;
#(
  parameter int unsigned NFRAMES = 32,
  parameter int unsigned WORDS   = 1024,
  parameter int unsigned DATA_W  = 32,
  parameter int unsigned FRAME_W = $clog2(NFRAMES + 1),
  parameter int unsigned ADDR_W  = $clog2(WORDS)
) (
  input  logic                      clk,
  input  ram_ev_e                   ev,
  input  logic [FRAME_W+ADDR_W-1:0] addr,   // {frame, wordaddr}
  input  logic [DATA_W-1:0]         wdata,
  output logic [DATA_W-1:0]         rdata
);
  logic [DATA_W-1:0] mem [NFRAMES+1][WORDS];

  logic [FRAME_W-1:0] frame;
  logic [ADDR_W-1:0]  word;
  logic [FRAME_W-1:0] frame_c;
  assign frame   = addr[FRAME_W+ADDR_W-1:ADDR_W];
  assign word    = addr[ADDR_W-1:0];
  // Frame numbers above the archive frame do not exist; they map onto it.
  assign frame_c = (int'(frame) > int'(NFRAMES)) ? FRAME_W'(NFRAMES) : frame;

  assign rdata = mem[frame_c][word];

  always_ff @(posedge clk) begin
    if (ev == RAM_WRITE) mem[frame_c][word] <= wdata;
  end
endmodule
