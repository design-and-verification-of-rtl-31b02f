// tb_rbc_rbh: checks the rollback history stack with the eight-frame
// example of the design (masks written frame 0 first, leftmost):
// A rollback mask has ones for the frames left in the stack (0..destination).
//   CRBI 10, RBH[10] = 11111111; rollback 7 -> 5 gives RBH[10] = 11111100
//   and a new RBH[11] = 11111111; rollback 5 -> 2 gives RBH[10] = RBH[11] =
//   11100000 and RBH[12] = 11111111; after two marks, rollback 4 -> 3 gives
//   RBH[12] = 11110000, RBH[13] = 11111111 and leaves RBH[11] unchanged.
// The written bits 01101011 tagged 10 then read as 01101000 after the first
// rollback. A random phase compares against a model of the stack.
module tb_rbc_rbh;
  import rbc_pkg::*;
  int checks = 0, failures = 0;
  logic clk;
  rbh_ev_e ev;
  logic [3:0] idx, top;
  logic [7:0] mask, q;
  logic [7:0] model [16];

  rbc_rbh #(.NFRAMES(8), .RBH_DEPTH(16)) u_dut (.clk, .ev, .idx, .top, .mask, .q);

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

  // Masks are written frame 0 first; bit f of the vector is frame f.
  function automatic logic [7:0] fr(string s);
    logic [7:0] v;
    for (int f = 0; f < 8; f++) v[f] = (s[f] == "1");
    return v;
  endfunction

  task automatic read_at(int i, output logic [7:0] v);
    @(negedge clk); ev = RBH_READ; idx = 4'(i); #1; v = q;
  endtask

  task automatic update(int t, logic [7:0] m);
    @(negedge clk); ev = RBH_UPDATE; top = 4'(t); mask = m;
    @(posedge clk);
    for (int i = 0; i <= t; i++) model[i] &= m;
    if (t < 15) model[t + 1] = '1;
  endtask

  initial begin
    logic [7:0] v;
    // entries 0..10 all ones, CRBI = 10
    for (int i = 0; i <= 10; i++) begin
      @(negedge clk); ev = RBH_SETALL; idx = 4'(i); @(posedge clk); model[i] = '1;
    end
    update(10, fr("11111100"));
    read_at(10, v); check(v == fr("11111100"), "RBH[10] after rollback to 5");
    read_at(11, v); check(v == fr("11111111"), "RBH[11] pushed");
    check((fr("01101011") & fr("11111100")) == fr("01101000"), "example masking");
    check((fr("01101011") & v) == fr("01101011"), "new entry masks nothing");
    update(11, fr("11100000"));
    read_at(10, v); check(v == fr("11100000"), "RBH[10] after rollback to 2");
    read_at(11, v); check(v == fr("11100000"), "RBH[11] after rollback to 2");
    read_at(12, v); check(v == fr("11111111"), "RBH[12] pushed");
    update(12, fr("11110000"));
    read_at(13, v); check(v == fr("11111111"), "RBH[13] pushed");
    read_at(12, v); check(v == fr("11110000"), "RBH[12] after rollback to 3");
    read_at(11, v); check(v == fr("11100000"), "RBH[11] unchanged");
    read_at(10, v); check(v == fr("11100000"), "RBH[10] unchanged");

    // random phase against the model
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); ev = RBH_SETALL; idx = 4'(i); @(posedge clk); model[i] = '1;
    end
    repeat (1000) begin
      int t;
      logic [3:0] i;
      t = $urandom_range(0, 15); i = 4'($urandom);
      case ($urandom_range(0, 2))
        0: update(t, 8'($urandom) | 8'($urandom));
        1: begin @(negedge clk); ev = RBH_SETALL; idx = i; @(posedge clk); model[i] = '1; end
        default: ;
      endcase
      read_at(int'(i), v);
      check(v == model[i], $sformatf("random read %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
