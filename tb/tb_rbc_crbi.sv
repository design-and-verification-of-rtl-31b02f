// tb_rbc_crbi: checks clear, count-up, hold and the saturation at the last
// history entry (full flag) of the rollback index counter, depth 16.
module tb_rbc_crbi;
  import rbc_pkg::*;
  int checks = 0, failures = 0;
  logic clk;
  crbi_ev_e ev;
  logic [3:0] crbi;
  logic full;
  int model;

  rbc_crbi #(.RBH_DEPTH(16)) u_dut (.clk, .ev, .crbi, .full);

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
    @(negedge clk); ev = CRBI_CLR; @(posedge clk); #1; model = 0;
    repeat (600) begin
      @(negedge clk);
      r = $urandom_range(0, 19);
      ev = (r == 0) ? CRBI_CLR : (r < 14) ? CRBI_UP : CRBI_NOP;
      @(posedge clk); #1;
      if (ev == CRBI_CLR) model = 0;
      else if (ev == CRBI_UP && model < 15) model++;
      checks++;
      if (int'(crbi) != model || full != (model == 15)) begin
        failures++; $display("FAIL crbi=%0d full=%0b want %0d", crbi, full, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
