// Test of S2P: cell bits (MSB first) become bytes with sop on the first; the
// byte enable pulses every 8 clocks and is re-phased at each cell start;
// between cells it keeps running with empty bytes.
//
// The paper gives the conversion to an omega-bit path (omega = 8 here).
module tb_axon_s2p;
  import axon_pkg::*;
  logic clk = 0, rst_n = 1, dbit = 0, dval = 0, dfirst = 0, ce;
  initial #0.25 rst_n = 0;  // a falling edge applies the asynchronous reset
  always #1 clk = ~clk;
  cbyte_t out;
  axon_s2p dut (.clk, .rst_n, .dbit, .dval, .dfirst, .ce, .out);
  int checks = 0, failures = 0;
  logic [7:0] tx [$], got [$];
  int sops = 0, last_ce = -1, cyc = 0, ce_bad = 0, idle_ce = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && ce) begin
      if (out.v) begin got.push_back(out.d); if (out.sop) sops++; end
      else idle_ce++;
    end
  end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int c = 0; c < 2; c++) begin
      repeat (5 + 3 * c) @(negedge clk);
      for (int k = 0; k < 6; k++) begin
        automatic logic [7:0] b = 8'($urandom);
        tx.push_back(b);
        for (int t = 0; t < 8; t++) begin
          dbit = b[7 - t]; dval = 1; dfirst = (k == 0 && t == 0);
          @(negedge clk);
          // the byte is out (and ce high) right after its last bit
          if (t == 7) begin
            checks++;
            if (!(ce && out.v && out.d == b && out.sop == (k == 0))) begin
              failures++; $display("FAIL cell %0d byte %0d: ce=%0d d=%h", c, k, ce, out.d);
            end
          end
        end
      end
      dval = 0; dfirst = 0; dbit = 0;
      repeat (40) @(negedge clk);
    end
    checks++;
    if (got.size() != 12 || sops != 2) begin failures++; $display("FAIL counts"); end
    checks++;
    if (idle_ce < 8) begin failures++; $display("FAIL idle enables %0d", idle_ce); end
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
