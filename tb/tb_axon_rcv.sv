// Test of RCV: a line carrying two NRZI-coded cells, each after a preamble
// ending in a single 1, must yield exactly 424 cell bits per cell, equal to
// the sent bits, with dfirst on the first; the preamble and idle bits must
// not be passed on.
//
// The paper asks RCV to remove the line code; NRZI and the preamble are
// this design's.
module tb_axon_rcv;
  import axon_pkg::*;
  localparam int NB = CELL_BYTES * 8;
  logic clk = 0, rst_n = 1, line = 0, dbit, dval, dfirst;
  initial #0.25 rst_n = 0;  // a falling edge applies the asynchronous reset
  always #1 clk = ~clk;
  axon_rcv dut (.clk, .rst_n, .line, .dbit, .dval, .dfirst);
  int checks = 0, failures = 0;
  logic tx [$], got [$];
  int firsts = 0;
  always @(posedge clk) if (rst_n && dval) begin
    got.push_back(dbit);
    if (dfirst) begin
      firsts++;
      checks++;
      if (got.size() % NB != 1) begin failures++; $display("FAIL dfirst position"); end
    end
  end
  task automatic send_bit(logic b);
    @(negedge clk);
    line = line ^ b;
  endtask
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int c = 0; c < 2; c++) begin
      repeat (13) send_bit(0);
      repeat (7) send_bit(0);
      send_bit(1);                        // end of preamble
      for (int n = 0; n < NB; n++) begin
        automatic logic b = 1'($urandom);
        tx.push_back(b);
        send_bit(b);
      end
    end
    repeat (30) send_bit(0);
    checks++;
    if (got.size() != tx.size()) begin failures++; $display("FAIL count %0d vs %0d", got.size(), tx.size()); end
    for (int n = 0; n < tx.size() && n < got.size(); n++) begin
      checks++;
      if (got[n] != tx[n]) begin failures++; $display("FAIL bit %0d", n); end
    end
    checks++;
    if (firsts != 2) begin failures++; $display("FAIL firsts=%0d", firsts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
