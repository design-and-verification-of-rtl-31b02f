// tb_rbc_fig3: the eight-frame rollback-history example, run through the
// whole chip (8 frames, 16 words).
//
// One word is written in frames 1, 2, 4, 6 and 7 (written bits 01101011,
// frame 0 leftmost). Then:
//   rollback to frame 5 (mask 11111100): the masked written bits are
//     01101000 and a read returns the frame-4 value;
//   rollback to frame 2 (mask 11100000): a read returns the frame-2 value;
//   two marks (CMF 3, 4): the new frames are empty, still the frame-2 value;
//   rollback to frame 3 (mask 11110000): still the frame-2 value;
//   a write in frame 3 is then the newest version.
// Rollback index, history top entry and CMF are checked after each step,
// and so is a second word that was written only in frame 0.
module tb_rbc_fig3;
  import rbc_pkg::*;

  localparam int NF = 8;
  localparam int NW = 16;
  localparam int DW = 16;
  localparam int RD = 64;
  localparam int FW = $clog2(NF + 1);
  localparam int AW = $clog2(NW);
  localparam int TW = $clog2(RD);

  logic clk;
  logic rst;
  logic req_valid;
  logic req_ready;
  rbc_op_e req_op;
  logic [AW-1:0] req_addr;
  logic [DW-1:0] req_wdata;
  logic [NF-1:0] req_rbdest;
  logic done;
  rbc_err_e err;
  logic [DW-1:0] rdata;
  logic [FW-1:0] cmf, omf;
  logic [TW-1:0] crbi;
  logic need_reset;

  rbc_top #(.NFRAMES(NF), .WORDS(NW), .DATA_W(DW), .RBH_DEPTH(RD)) dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [NF-1:0] fr(string s);   // frame 0 first
    logic [NF-1:0] v;
    for (int f = 0; f < NF; f++) v[f] = (s[f] == "1");
    return v;
  endfunction

  logic [NF-1:0] wband_at_read;

  task automatic issue(rbc_op_e op, logic [AW-1:0] a, logic [DW-1:0] d, logic [NF-1:0] rbd,
                       output logic [DW-1:0] q);
    @(negedge clk);
    req_valid = 1'b1; req_op = op; req_addr = a; req_wdata = d; req_rbdest = rbd;
    #1 wband_at_read = dut.wband;
    @(posedge clk); #1;
    req_valid = 1'b0; req_op = OP_NOP;
    while (!done) begin @(posedge clk); #1; end
    check(err == ERR_NONE, $sformatf("%s accepted", op.name()));
    q = rdata;
  endtask

  localparam logic [AW-1:0] A = 5;     // the word of the example
  localparam logic [AW-1:0] B = 9;     // a word written only in frame 0

  initial begin
    logic [DW-1:0] q;
    logic [DW-1:0] val [NF];
    rst = 1'b1; req_valid = 1'b0; req_op = OP_NOP; req_addr = '0;
    req_wdata = '0; req_rbdest = '1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    issue(OP_RESET, 0, '0, '1, q);
    issue(OP_WRITE, B, 16'hB000, '1, q);
    for (int f = 0; f < NF; f++) val[f] = DW'(16'hA000 + f);
    // frames 0..7: write A in frames 1, 2, 4, 6, 7
    for (int f = 0; f < NF; f++) begin
      if (f > 0) issue(OP_MARK, 0, '0, '1, q);
      if (f inside {1, 2, 4, 6, 7}) issue(OP_WRITE, A, val[f], '1, q);
    end
    check(int'(cmf) == 7, "CMF at frame 7");
    issue(OP_READ, A, '0, '1, q);
    check(q == val[7], "read before rollback: frame 7 value");
    check(wband_at_read == fr("01101011"), "written bits 01101011");

    issue(OP_ROLLBACK, 0, '0, fr("11111100"), q);
    check(int'(cmf) == 5, "rollback to frame 5");
    check(dut.u_rbh.rbh[crbi] == '1, "top entry all ones");
    issue(OP_READ, A, '0, '1, q);
    check(wband_at_read == fr("01101000"), "masked written bits 01101000");
    check(q == val[4], "read after rollback to 5: frame 4 value");

    issue(OP_ROLLBACK, 0, '0, fr("11100000"), q);
    check(int'(cmf) == 2, "rollback to frame 2");
    issue(OP_READ, A, '0, '1, q);
    check(q == val[2], "read after rollback to 2: frame 2 value");

    issue(OP_MARK, 0, '0, '1, q);
    issue(OP_MARK, 0, '0, '1, q);
    check(int'(cmf) == 4, "two marks: CMF 4");
    issue(OP_READ, A, '0, '1, q);
    check(q == val[2], "new frames are empty: frame 2 value");
    check(wband_at_read == fr("01100000"), "stale bits of frames 3, 4 masked");

    issue(OP_ROLLBACK, 0, '0, fr("11110000"), q);
    check(int'(cmf) == 3, "rollback to frame 3");
    issue(OP_READ, A, '0, '1, q);
    check(q == val[2], "read after rollback to 3: frame 2 value");

    issue(OP_WRITE, A, 16'hC003, '1, q);
    issue(OP_READ, A, '0, '1, q);
    check(q == 16'hC003, "write in frame 3 is newest");
    check(wband_at_read == fr("01110000"), "written bits 01110000");

    issue(OP_READ, B, '0, '1, q);
    check(q == 16'hB000, "word written in frame 0 survives");
    // 7 marks + 3 rollbacks + 2 marks + ... each pushed one entry
    check(int'(crbi) == 7 + 3 + 2, "rollback index counts marks and rollbacks");
    check(omf == '0 && !need_reset && req_ready, "OMF 0, no reset needed, idle");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
