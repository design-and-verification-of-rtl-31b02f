// tb_rbc_top: end-to-end random test of the Rollback Chip at reduced sizes.
//
// A reference model keeps every snapshot as a full copy of memory: a mark
// copies the current frame into the next one, a rollback moves the current
// pointer back, an advance moves the oldest pointer forward. A read of the
// chip must return what the current frame of this model holds, for every
// word the model has defined. A second, simpler model keeps one written bit
// per frame and word, cleared on rollback and mark, to predict how many words
// an advance archives and so its exact cycle count. After every operation
// the top entry of the rollback history must be all ones.
// Counted mechanisms: CMF wrap-around, one-step and multi-step rollbacks,
// rollback underflow, mark overflow, advance overflow, advance with archive
// copies, reads served from the archive frame, history-full refusals and
// refusals while a reset is needed. Each must happen at least once.
module tb_rbc_top;
  import rbc_pkg::*;

  localparam int NF = 8;
  localparam int NW = 16;
  localparam int DW = 16;
  localparam int RD = 16;
  localparam int FW = $clog2(NF + 1);
  localparam int AW = $clog2(NW);
  localparam int TW = $clog2(RD);
  localparam int NOPS = 6000;

  logic clk;
  initial clk = 1'b0;
  logic rst = 1'b1;
  logic req_valid = 1'b0;
  logic req_ready;
  rbc_op_e req_op = OP_NOP;
  logic [AW-1:0] req_addr = '0;
  logic [DW-1:0] req_wdata = '0;
  logic [NF-1:0] req_rbdest = '1;
  logic done;
  rbc_err_e err;
  logic [DW-1:0] rdata;
  logic [FW-1:0] cmf, omf;
  logic [TW-1:0] crbi;
  logic need_reset;

  rbc_top #(.NFRAMES(NF), .WORDS(NW), .DATA_W(DW), .RBH_DEPTH(RD)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- reference
  logic [DW-1:0] m   [NF][NW];
  bit            def [NF][NW];
  bit            wbit[NF][NW];
  int c = 0, o = 0, hist = 0;   // hist: history entries in use (CRBI)
  bit dead = 1;

  // coverage counters
  int cov_wrap = 0, cov_rb1 = 0, cov_rbk = 0, cov_under = 0, cov_markovf = 0;
  int cov_advovf = 0, cov_archive = 0, cov_rdarch = 0, cov_full = 0, cov_dead = 0;
  int cov_reads = 0, cov_adv = 0;

  function automatic int md(int x);
    return ((x % NF) + NF) % NF;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Issue one request, wait for done, return the cycles it took.
  task automatic issue(rbc_op_e op, logic [AW-1:0] a, logic [DW-1:0] d,
                       logic [NF-1:0] rbd, output int cycles, output rbc_err_e e,
                       output logic [DW-1:0] q);
    @(negedge clk);
    req_valid = 1'b1; req_op = op; req_addr = a; req_wdata = d; req_rbdest = rbd;
    check(req_ready === 1'b1, "ready when idle");
    @(posedge clk);
    cycles = 1;
    #1;
    req_valid = 1'b0; req_op = OP_NOP;
    req_addr = AW'($urandom); req_wdata = DW'($urandom); req_rbdest = NF'($urandom);
    while (!done) begin
      @(posedge clk); cycles++; #1;
    end
    e = err;
    q = rdata;
  endtask

  task automatic expect_lat(int got, int want, string what);
    check(got == want, $sformatf("%s latency %0d expected %0d", what, got, want));
  endtask

  task automatic check_state();
    check(dut.u_rbh.rbh[dut.crbi] == '1, "top RBH entry is all ones");
    check(int'(crbi) == hist, "CRBI matches history count");
    check(int'(cmf) == c && int'(omf) == o, "CMF/OMF match the model");
  endtask

  initial begin
    int cyc, r, k, span, ucount;
    rbc_err_e e;
    logic [DW-1:0] q, d;
    logic [AW-1:0] a;
    logic [NF-1:0] mask;
    bit arch_read;

    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // A request before the first reset is refused.
    issue(OP_READ, '0, '0, '1, cyc, e, q);
    check(e == ERR_NEED_RST, "read before reset refused");
    if (e == ERR_NEED_RST) cov_dead++;

    for (int n = 0; n < NOPS; n++) begin
      r = $urandom_range(0, 99);
      // A rollback with no frame below CMF underflows: keep that rare.
      if (r >= 80 && r < 93 && c == o && $urandom_range(0, 9) != 0) r = 70;
      // Every other stretch of 200 operations favours marks, to fill the
      // frame buffer up to a mark overflow.
      if ((n / 200) % 2 == 1 && r >= 80 && $urandom_range(0, 3) != 0) r = 70;
      if (dead || r < 2) begin
        issue(OP_RESET, '0, '0, '1, cyc, e, q);
        expect_lat(cyc, 2, "reset");
        check(e == ERR_NONE, "reset accepted");
        c = 0; o = 0; hist = 0; dead = 0;
        foreach (def[i, j]) begin def[i][j] = 0; wbit[i][j] = 0; end
      end else if (r < 40) begin
        a = AW'($urandom); d = DW'($urandom);
        issue(OP_WRITE, a, d, '1, cyc, e, q);
        expect_lat(cyc, 2, "write");
        check(e == ERR_NONE, "write accepted");
        m[c][a] = d; def[c][a] = 1; wbit[c][a] = 1;
      end else if (r < 65) begin
        a = AW'($urandom);
        // Does the chip serve this word from the archive frame?
        arch_read = 1;
        for (int s = 0; s <= md(c - o); s++) if (wbit[md(c - s)][a]) arch_read = 0;
        issue(OP_READ, a, '0, '1, cyc, e, q);
        expect_lat(cyc, 1, "read");
        check(e == ERR_NONE, "read accepted");
        if (def[c][a]) begin
          check(q == m[c][a], $sformatf("read a=%0d got %h expected %h", a, q, m[c][a]));
          cov_reads++;
          if (arch_read) cov_rdarch++;
        end
      end else if (r < 80) begin
        issue(OP_MARK, '0, '0, '1, cyc, e, q);
        expect_lat(cyc, 1, "mark");
        if (md(c + 1) == o) begin
          check(e == ERR_MARK_OVF, "mark overflow refused");
          cov_markovf++;
        end else if (hist == RD - 1) begin
          check(e == ERR_RBH_FULL, "mark refused with full history");
          cov_full++;
        end else begin
          check(e == ERR_NONE, "mark accepted");
          if (c == NF - 1) cov_wrap++;
          for (int j = 0; j < NW; j++) begin
            m[md(c + 1)][j] = m[c][j]; def[md(c + 1)][j] = def[c][j];
            wbit[md(c + 1)][j] = 0;
          end
          c = md(c + 1); hist++;
        end
      end else if (r < 93) begin
        span = md(c - o);           // frames below CMF that can be dropped
        if ($urandom_range(0, 19) == 0) k = span + 1;
        else k = $urandom_range(1, span + 1 > 3 ? 3 : span + 1);
        mask = '1;
        for (int s = 0; s < k; s++) mask[md(c - s)] = 1'b0;
        // Half the time also clear the free frames outside OMF..CMF, as a
        // mask listing only the frames left in the stack does.
        if ($urandom_range(0, 1) == 1)
          for (int f = 0; f < NF; f++) if (md(c - f) > span) mask[f] = 1'b0;
        issue(OP_ROLLBACK, '0, '0, mask, cyc, e, q);
        expect_lat(cyc, 1, "rollback");
        if (hist == RD - 1) begin
          check(e == ERR_RBH_FULL, "rollback refused with full history");
          cov_full++;
        end else if (k == span + 1) begin
          check(e == ERR_RB_UNDER, "rollback underflow reported");
          check(int'(cmf) == NF, "CMF is the archive frame after underflow");
          check(need_reset, "reset needed after underflow");
          cov_under++;
          dead = 1;
          // Everything is refused until reset.
          issue(OP_WRITE, '0, '0, '1, cyc, e, q);
          check(e == ERR_NEED_RST, "write after underflow refused");
          cov_dead++;
          continue;
        end else begin
          check(e == ERR_NONE, "rollback accepted");
          if (k == 1) cov_rb1++; else cov_rbk++;
          for (int s = 0; s < k; s++)
            for (int j = 0; j < NW; j++) wbit[md(c - s)][j] = 0;
          c = md(c - k); hist++;
        end
      end else begin
        ucount = 0;
        for (int j = 0; j < NW; j++) if (wbit[o][j]) ucount++;
        issue(OP_ADVANCE, '0, '0, '1, cyc, e, q);
        if (c == o) begin
          check(e == ERR_ADV_OVF, "advance overflow refused");
          expect_lat(cyc, 1, "refused advance");
          cov_advovf++;
        end else begin
          check(e == ERR_NONE, "advance accepted");
          expect_lat(cyc, NW + ucount + 3, "advance");
          if (ucount > 0) cov_archive++;
          cov_adv++;
          o = md(o + 1);
        end
      end
      check_state();
    end

    check(cov_wrap > 0,    "coverage: CMF wrap-around");
    check(cov_rb1 > 0,     "coverage: one-step rollback");
    check(cov_rbk > 0,     "coverage: multi-step rollback");
    check(cov_under > 0,   "coverage: rollback underflow");
    check(cov_markovf > 0, "coverage: mark overflow");
    check(cov_advovf > 0,  "coverage: advance overflow");
    check(cov_archive > 0, "coverage: advance with archive copies");
    check(cov_rdarch > 0,  "coverage: read from the archive frame");
    check(cov_full > 0,    "coverage: history full");
    check(cov_dead > 0,    "coverage: refused until reset");
    $display("coverage: wrap=%0d rb1=%0d rbk=%0d under=%0d markovf=%0d advovf=%0d adv=%0d archive=%0d reads=%0d rdarch=%0d full=%0d dead=%0d",
             cov_wrap, cov_rb1, cov_rbk, cov_under, cov_markovf, cov_advovf, cov_adv,
             cov_archive, cov_reads, cov_rdarch, cov_full, cov_dead);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
