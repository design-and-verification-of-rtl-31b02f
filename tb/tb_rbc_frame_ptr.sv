// tb_rbc_frame_ptr: checks the frame pointer register (8 frames, archive
// frame 8): clear, up and down modulo 8, load (archive frame included), hold.
module tb_rbc_frame_ptr;
  import rbc_pkg::*;
  int checks = 0, failures = 0;
  logic clk;
  fp_ev_e ev;
  logic [3:0] din, q;
  int model;

  rbc_frame_ptr #(.NFRAMES(8)) u_dut (.clk, .ev, .din, .q);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r;
    @(negedge clk); ev = FP_CLEAR; din = '0; @(posedge clk); #1; model = 0;
    repeat (1000) begin
      @(negedge clk);
      r = $urandom_range(0, 9);
      ev = (r == 0) ? FP_CLEAR : (r < 4) ? FP_UP : (r < 7) ? FP_DOWN : (r < 8) ? FP_LOAD : FP_NOP;
      din = 4'($urandom_range(0, 8));
      @(posedge clk); #1;
      case (ev)
        FP_CLEAR: model = 0;
        FP_UP:    model = (model >= 7) ? 0 : model + 1;
        FP_DOWN:  model = (model == 0) ? 7 : model - 1;
        FP_LOAD:  model = int'(din);
        default: ;
      endcase
      checks++;
      if (int'(q) != model) begin failures++; $display("FAIL q=%0d want %0d", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
