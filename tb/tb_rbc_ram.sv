// tb_rbc_ram: checks that every frame of the RAM, the archive frame
// included, keeps its own words (8 frames + archive, 16 words).
module tb_rbc_ram;
  import rbc_pkg::*;
  int checks = 0, failures = 0;
  logic clk;
  ram_ev_e ev;
  logic [7:0] addr;     // {frame[3:0], word[3:0]}
  logic [15:0] wdata, rdata;
  logic [15:0] model [9][16];

  rbc_ram #(.NFRAMES(8), .WORDS(16), .DATA_W(16)) u_dut (.clk, .ev, .addr, .wdata, .rdata);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int f, w;
    // fill every word
    for (f = 0; f < 9; f++)
      for (w = 0; w < 16; w++) begin
        @(negedge clk);
        ev = RAM_WRITE; addr = {4'(f), 4'(w)}; wdata = 16'($urandom);
        model[f][w] = wdata;
        @(posedge clk);
      end
    repeat (2000) begin
      @(negedge clk);
      f = $urandom_range(0, 8); w = $urandom_range(0, 15);
      addr = {4'(f), 4'(w)};
      if ($urandom_range(0, 2) == 0) begin
        ev = RAM_WRITE; wdata = 16'($urandom); model[f][w] = wdata;
      end else begin
        ev = RAM_READ; #1;
        checks++;
        if (rdata !== model[f][w]) begin
          failures++; $display("FAIL f=%0d w=%0d got %h want %h", f, w, rdata, model[f][w]);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
