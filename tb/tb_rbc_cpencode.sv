// tb_rbc_cpencode: checks the circular priority encoder.
// Directed: the four-frame example of the encoder (CMF 2, OMF 0, only bit 1
// set gives bit 1). Random: for NFRAMES = 8 and 32, every CMF/OMF pair with
// random words, against a plain scan from CMF downwards to OMF.
module tb_rbc_cpencode;
  int checks = 0, failures = 0;

  logic [3:0]  din4, c4, o4, out4;  logic [2:0] num4; logic az4;
  logic [7:0]  din8, c8, o8, out8;  logic [3:0] num8; logic az8;
  logic [31:0] din32, c32, o32, out32; logic [5:0] num32; logic az32;

  rbc_cpencode #(.NFRAMES(4))  u4  (.din(din4),  .decc(c4),  .deco(o4),  .cpout(out4),  .num(num4),  .allzero(az4));
  rbc_cpencode #(.NFRAMES(8))  u8  (.din(din8),  .decc(c8),  .deco(o8),  .cpout(out8),  .num(num8),  .allzero(az8));
  rbc_cpencode                 u32 (.din(din32), .decc(c32), .deco(o32), .cpout(out32), .num(num32), .allzero(az32));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // Reference: walk from c down to o (circular), first set bit wins.
  function automatic int ref_enc(logic [31:0] d, int c, int o, int n);
    int p;
    p = c;
    for (int k = 0; k < n; k++) begin
      if (d[p]) return p;
      if (p == o) break;
      p = (p == 0) ? n - 1 : p - 1;
    end
    return n;
  endfunction

  initial begin
    int want;
    din4 = 4'b0010; c4 = 4'b0100; o4 = 4'b0001;
    #1;
    check(out4 == 4'b0010 && num4 == 3'd1 && !az4, "four-frame example");
    din4 = 4'b1000; #1;   // bit 3 lies outside the range 2,1,0
    check(out4 == 4'b0000 && az4 && num4 == 3'd4, "bit outside range ignored");

    for (int c = 0; c < 8; c++)
      for (int o = 0; o < 8; o++)
        repeat (20) begin
          din8 = 8'($urandom) & 8'($urandom);
          c8 = 8'(1) << c; o8 = 8'(1) << o;
          #1;
          want = ref_enc({24'b0, din8}, c, o, 8);
          check(int'(num8) == want, $sformatf("n=8 c=%0d o=%0d din=%b num=%0d want=%0d", c, o, din8, num8, want));
          check(az8 == (want == 8), "n=8 allzero");
          check(out8 == ((want == 8) ? 8'b0 : 8'(1) << want), "n=8 one-hot");
        end

    for (int c = 0; c < 32; c++)
      for (int o = 0; o < 32; o++)
        repeat (4) begin
          din32 = $urandom & $urandom & $urandom;
          c32 = 32'(1) << c; o32 = 32'(1) << o;
          #1;
          want = ref_enc(din32, c, o, 32);
          check(int'(num32) == want, $sformatf("n=32 c=%0d o=%0d", c, o));
          check(az32 == (want == 32), "n=32 allzero");
          check(out32 == ((want == 32) ? 32'b0 : 32'(1) << want), "n=32 one-hot");
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
