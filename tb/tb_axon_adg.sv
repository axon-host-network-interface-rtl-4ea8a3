// Test of ADG: after a load the address is base + 32 * packet, and each
// step adds one.
//
// The paper gives the function (addresses from the page base); the
// back-to-back packet layout is this design's.
module tb_axon_adg;
  logic clk = 0, rst_n = 1, load = 0, step = 0;
  initial #0.25 rst_n = 0;  // a falling edge applies the asynchronous reset
  logic [19:0] base, addr;
  logic [4:0] pkt;
  always #1 clk = ~clk;
  axon_adg #(.AW(20)) dut (.clk, .rst_n, .load, .base, .pkt, .step, .addr);
  int checks = 0, failures = 0;
  initial begin
    base = '0; pkt = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      logic [19:0] exp;
      base = 20'($urandom); pkt = 5'($urandom);
      load = 1; @(negedge clk); load = 0;
      exp = base + 20'(pkt) * 32;
      for (int s = 0; s < 32; s++) begin
        checks++;
        if (addr != exp) begin failures++; $display("FAIL %h vs %h", addr, exp); end
        step = s[0]; @(negedge clk); step = 0;
        if (s[0]) exp = exp + 1;
      end
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
