// Test of RXA: packets of a loaded bitmap come out lowest first, each once,
// `last` on the final one; a new load replaces the remainder.
//
// The paper gives the bitmap-driven retransmit address; lowest-first order
// is this design's.
module tb_axon_rxa;
  timeunit 1ns; timeprecision 100ps;
  logic clk = 0, rst_n = 1, load = 0, take = 0, has, last;
  initial #0.25 rst_n = 0;  // a falling edge applies the asynchronous reset
  logic [31:0] lbits;
  logic [4:0] idx;
  always #1 clk = ~clk;
  axon_rxa dut (.clk, .rst_n, .load, .lbits, .take, .has, .idx, .last);
  int checks = 0, failures = 0;
  initial begin
    lbits = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 10; t++) begin
      automatic logic [31:0] m = (t == 0) ? 32'hFFFF_FFFF : (t == 1) ? 32'h8000_0001 : $urandom;
      automatic int cnt = $countones(m);
      // load and take together, then take the rest
      lbits = m; load = 1; take = 1;
      for (int k = 0; k < cnt; k++) begin
        automatic int exp = 0;
        for (int b = 31; b >= 0; b--) if (m[b]) exp = b;
        #0.5;
        checks++;
        if (!has || idx != 5'(exp) || last != (k == cnt - 1)) begin
          failures++; $display("FAIL t=%0d k=%0d idx=%0d exp=%0d", t, k, idx, exp);
        end
        @(negedge clk); load = 0;
        m[exp] = 1'b0;
      end
      take = 0;
      checks++;
      if (has) begin failures++; $display("FAIL not empty"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
