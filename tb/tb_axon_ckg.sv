// Test of CKG and CKC together with a reference sum computed here: CKG must
// write the 16-bit big-endian word sum of the 32 data bytes into the
// trailer (latency one enable, other bytes unchanged), and CKC must accept
// the cell; with one data byte altered after CKG, CKC must reject it.
//
// The paper asks for a data-field checksum in the trailer; the 16-bit word
// sum is this design's choice.
module tb_axon_ckg;
  import axon_pkg::*;
  logic clk = 0, rst_n = 1, ce = 0, done, ok;
  initial #0.25 rst_n = 0;  // a falling edge applies the asynchronous reset
  always #1 clk = ~clk;
  cbyte_t in, out, chk;
  axon_ckg dut (.clk, .rst_n, .ce, .in, .out);
  axon_ckc cmp (.clk, .rst_n, .ce, .in(chk), .done, .ok);
  int checks = 0, failures = 0, ndone = 0, nok = 0;
  bit flip;
  logic [7:0] pkt [CELL_BYTES];
  always_comb begin
    chk = out;
    if (flip && out.v && out.d != 8'hFF) chk.d = out.d ^ 8'h10;
  end
  initial begin
    in = '0; flip = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      automatic logic [15:0] s = 0;
      for (int n = 0; n < CELL_BYTES; n++) pkt[n] = 8'($urandom);
      for (int n = 19; n < 51; n++) s += (n % 2 == 1) ? {pkt[n], 8'h00} : {8'h00, pkt[n]};
      for (int n = 0; n < CELL_BYTES + 3; n++) begin
        @(negedge clk);
        in = (n < CELL_BYTES) ? '{v:1'b1, sop:(n == 0), d:pkt[n]} : '0;
        flip = (t % 2 == 1) && (n == 31);
        ce = 1;
        @(negedge clk);
        ce = 0;
        if (n < CELL_BYTES) begin
          automatic logic [7:0] e = (n == 51) ? s[15:8] : (n == 52) ? s[7:0] : pkt[n];
          checks++;
          if (out.d != e || !out.v) begin failures++; $display("FAIL cell %0d byte %0d %h exp %h", t, n, out.d, e); end
        end
        if (done && n == CELL_BYTES) begin
          ndone++;
          checks++;
          if (ok != (t % 2 == 0)) begin failures++; $display("FAIL ckc verdict cell %0d", t); end
        end
      end
    end
    checks++; if (ndone != 8) begin failures++; $display("FAIL ckc done count %0d", ndone); end
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
