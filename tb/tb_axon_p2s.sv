// Test of P2S: bytes presented every 8 clocks come out MSB first, one bit
// per clock starting the clock after the load; an absent byte sends zeros;
// smark marks the last bit of a cell's first byte.
//
// The paper gives the conversion; MSB-first order is this design's.
module tb_axon_p2s;
  import axon_pkg::*;
  logic clk = 0, rst_n = 1, ce = 0, sbit, smark;
  initial #0.25 rst_n = 0;  // a falling edge applies the asynchronous reset
  always #1 clk = ~clk;
  cbyte_t in;
  axon_p2s dut (.clk, .rst_n, .ce, .in, .sbit, .smark);
  int checks = 0, failures = 0;
  logic [7:0] b [12];
  initial begin
    in = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 12; k++) b[k] = 8'($urandom);
    @(negedge clk);
    in = '{v:1'b1, sop:1'b0, d:b[0]};
    ce = 1;
    for (int k = 0; k < 12; k++) begin
      for (int t = 0; t < 8; t++) begin
        @(negedge clk);
        ce = 0;
        checks++;
        if (sbit != ((k == 5) ? 1'b0 : b[k][7 - t]) || smark != (k == 2 && t == 7)) begin
          failures++; $display("FAIL byte %0d bit %0d", k, t);
        end
        if (t == 7 && k < 11) begin
          in = '{v:(k + 1 != 5), sop:(k + 1 == 2), d:b[k + 1]};
          ce = 1;
        end
      end
    end
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
