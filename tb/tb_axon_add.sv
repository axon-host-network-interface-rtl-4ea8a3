// Test of ADD: for accepted data cells each of the 32 data bytes must be
// written once, at base + 1024*j + 32*i + b, with the byte's value; control
// cells, unknown congrams and out-of-bounds cells must write nothing.
//
// The address rule is the paper's (page base plus packet index); 1 KB pages
// and 32-byte packets are the paper's sizes, the bounds rule is this
// design's.
module tb_axon_add;
  import axon_pkg::*;
  logic clk = 0, rst_n = 1, ce = 0, we;
  initial #0.25 rst_n = 0;  // a falling edge applies the asynchronous reset
  logic [19:0] addr;
  logic [7:0] wdata;
  logic [31:0] base;
  hdr_t hdr;
  cbyte_t in;
  always #1 clk = ~clk;
  axon_add #(.AW(20)) dut (.clk, .rst_n, .ce, .in, .hdr, .base, .we, .addr, .wdata);
  int checks = 0, failures = 0, writes = 0, exp_writes = 0;
  logic [7:0] pkt [CELL_BYTES];
  logic [19:0] exp_a [$];
  logic [7:0] exp_d [$];
  always @(posedge clk) if (we) begin
    writes++;
    checks++;
    if (exp_a.size() == 0 || addr != exp_a[0] || wdata != exp_d[0]) begin
      failures++; $display("FAIL write %h=%h", addr, wdata);
    end
    if (exp_a.size() > 0) begin void'(exp_a.pop_front()); void'(exp_d.pop_front()); end
  end
  initial begin
    in = '0; hdr = '0; base = 32'h3000;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      automatic bit acc;
      hdr.ctrl = (t % 5 == 1); hdr.hit = (t % 5 != 2); hdr.inb = (t % 5 != 3);
      hdr.j = 16'($urandom_range(0, 7)); hdr.i = 16'($urandom_range(0, 31)); hdr.idx = 0;
      acc = !hdr.ctrl && hdr.hit && hdr.inb;
      for (int n = 0; n < CELL_BYTES; n++) begin
        pkt[n] = 8'($urandom);
        if (acc && n >= 19 && n < 51) begin
          exp_a.push_back(20'(base + 32'(hdr.j) * 1024 + 32'(hdr.i) * 32 + 32'(n - 19)));
          exp_d.push_back(pkt[n]);
          exp_writes++;
        end
      end
      for (int n = 0; n < CELL_BYTES + 2; n++) begin
        @(negedge clk);
        in = (n < CELL_BYTES) ? '{v:1'b1, sop:(n == 0), d:pkt[n]} : '0;
        ce = 1;
        @(negedge clk);
        ce = 0;
        repeat (2) @(negedge clk);
      end
    end
    checks++;
    if (writes != exp_writes) begin failures++; $display("FAIL writes %0d vs %0d", writes, exp_writes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
