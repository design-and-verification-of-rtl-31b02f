// tb_rbc_wbts: checks the written-bits / timestamp store and its advance
// counter (8 frames, 16 words, 16 history entries): reset clears all
// entries, writes land at their address, reads at wordaddr or at WAC,
// clrwac/upwac count modulo 16 and waciszero follows WAC.
module tb_rbc_wbts;
  import rbc_pkg::*;
  int checks = 0, failures = 0;
  logic clk;
  wbts_ev_e ev;
  logic rdwac;
  logic [3:0] wordaddr, ts_in, ts, wac;
  logic [7:0] wb_in, wb;
  logic waciszero;
  logic [7:0] mwb [16];
  logic [3:0] mts [16];
  int mwac;

  rbc_wbts #(.NFRAMES(8), .WORDS(16), .RBH_DEPTH(16)) u_dut (
    .clk, .ev, .rdwac, .wordaddr, .wb_in, .ts_in, .wb, .ts, .wac, .waciszero);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    int r, a;
    @(negedge clk); ev = WBTS_RESET; rdwac = 0; @(posedge clk);
    foreach (mwb[i]) begin mwb[i] = '0; mts[i] = '0; end
    mwac = 0;
    repeat (2000) begin
      @(negedge clk);
      r = $urandom_range(0, 19);
      wordaddr = 4'($urandom); wb_in = 8'($urandom); ts_in = 4'($urandom);
      rdwac = 1'($urandom);
      ev = (r == 0) ? WBTS_RESET : (r < 7) ? WBTS_WRITE : (r < 8) ? WBTS_CLRWAC :
           (r < 12) ? WBTS_UPWAC : (r < 16) ? WBTS_READ : WBTS_NOP;
      #1;
      a = rdwac ? mwac : int'(wordaddr);
      check(wb == mwb[a] && ts == mts[a], $sformatf("read at %0d", a));
      check(int'(wac) == mwac && waciszero == (mwac == 0), "wac");
      @(posedge clk);
      case (ev)
        WBTS_RESET:  begin foreach (mwb[i]) begin mwb[i] = '0; mts[i] = '0; end mwac = 0; end
        WBTS_WRITE:  begin mwb[wordaddr] = wb_in; mts[wordaddr] = ts_in; end
        WBTS_CLRWAC: mwac = 0;
        WBTS_UPWAC:  mwac = (mwac + 1) % 16;
        default: ;
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
