// Test of XMT: random serial bits with a cell mark are line coded; decoding
// NRZI here must give the input delayed by 8 bit times, and the framing 1
// must appear one clock (the output register) after the mark.
//
// The paper asks for line coding; NRZI and the preamble are this design's.
module tb_axon_xmt;
  import axon_pkg::*;
  logic clk = 0, rst_n = 1, sbit = 0, smark = 0, line;
  initial #0.25 rst_n = 0;  // a falling edge applies the asynchronous reset
  always #1 clk = ~clk;
  axon_xmt dut (.clk, .rst_n, .sbit, .smark, .line);
  int checks = 0, failures = 0;
  logic bits [200], marks [200];
  logic prev;
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    prev = line;
    for (int t = 0; t < 200; t++) begin
      // marks only where the bit 8 clocks earlier was 0 (an idle byte)
      bits[t]  = (t < 20 || (t >= 100 && t < 120)) ? 1'b0 : 1'($urandom);
      marks[t] = (t == 19) || (t == 119);
    end
    for (int t = 0; t < 200; t++) begin
      sbit = bits[t]; smark = marks[t];
      @(negedge clk);
      // line after this edge = previous line ^ (bit entered 8 edges ago | mark now)
      if (t >= 8) begin
        checks++;
        if ((line ^ prev) != (bits[t-8] | marks[t])) begin
          failures++; $display("FAIL t=%0d", t);
        end
      end
      prev = line;
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
