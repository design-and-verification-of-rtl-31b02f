// tb_rbc_latch: checks load, hold and reset of the holding register.
module tb_rbc_latch;
  int checks = 0, failures = 0;
  logic clk, rst, load;
  logic [31:0] d, q, model;

  rbc_latch u_dut (.clk, .rst, .load, .d, .q);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; load = 1'b0; d = '0;
    @(posedge clk); #1;
    checks++; if (q !== '0) begin failures++; $display("FAIL reset"); end
    rst = 1'b0; model = '0;
    repeat (500) begin
      @(negedge clk);
      load = 1'($urandom); d = $urandom;
      @(posedge clk); #1;
      if (load) model = d;
      checks++;
      if (q !== model) begin failures++; $display("FAIL q=%h want %h", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
