// tb_rbc_decode: checks the frame decoder for every frame number, the
// archive frame (decodes to zero) included.
module tb_rbc_decode;
  int checks = 0, failures = 0;
  logic [5:0]  frame;
  logic [31:0] onehot;

  rbc_decode u_dut (.frame, .onehot);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 64; f++) begin
      frame = 6'(f);
      #1;
      checks++;
      if (onehot !== ((f < 32) ? (32'(1) << f) : 32'b0)) begin
        failures++;
        $display("FAIL frame %0d gives %h", f, onehot);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
