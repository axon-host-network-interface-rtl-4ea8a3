// Test of PPL against a model kept here: pages of two congrams arrive with
// packets shuffled; some packets come corrupted first and good later.
// Each page must be reported present exactly once, right after its last
// good packet; a corrupted packet must clear a bit that was set; more
// partly received pages than entries must give an overflow; flush frees a
// congram's entries.
//
// The paper gives presence bits per page; the table size, overflow and
// flush are this design's.
module tb_axon_ppl;
  import axon_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #0.25 rst_n = 0;  // a falling edge applies the asynchronous reset
  logic arr = 0, arr_ok = 0, flush = 0, pres, ovf, alloc;
  logic [7:0] arr_idx = 0, flush_idx = 0, pres_idx;
  logic [15:0] arr_q = 0, arr_j = 0, pres_q, pres_j;
  logic [4:0] arr_i = 0;
  logic [2:0] alloc_ent;
  logic [7:0] ent_v;
  logic [7:0] ent_idx [8];
  logic [15:0] ent_q [8], ent_j [8];
  logic [31:0] ent_pres [8];
  always #1 clk = ~clk;
  axon_ppl #(.NPG(8)) dut (.clk, .rst_n, .arr, .arr_ok, .arr_idx, .arr_q, .arr_j, .arr_i,
    .flush, .flush_idx, .pres, .pres_idx, .pres_q, .pres_j, .ovf, .alloc, .alloc_ent,
    .ent_v, .ent_idx, .ent_q, .ent_j, .ent_pres);
  int checks = 0, failures = 0, npres = 0, novf = 0;
  always @(posedge clk) begin
    if (pres) npres++;
    if (ovf) novf++;
  end
  task automatic send(input int c, input int j, input int i, input bit ok);
    @(negedge clk);
    arr = 1; arr_ok = ok; arr_idx = 8'(c); arr_q = 16'(c + 7); arr_j = 16'(j); arr_i = 5'(i);
    @(negedge clk);
    arr = 0;
  endtask
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    // two pages interleaved, shuffled order, packet 5 of page (1,3) corrupted first
    begin
      int ord [64];
      for (int n = 0; n < 64; n++) ord[n] = n;
      ord.shuffle();
      for (int n = 0; n < 64; n++) begin
        automatic int c = ord[n] / 32, i = ord[n] % 32;
        if (c == 1 && i == 5) begin
          send(1, 3, 5, 1'b1);   // good, then a corrupted duplicate clears it
          send(1, 3, 5, 1'b0);
        end else send(c, (c == 0) ? 2 : 3, i, 1'b1);
      end
      @(negedge clk);
      checks++;
      if (npres != 1) begin failures++; $display("FAIL only congram 0 page complete, got %0d", npres); end
      checks++;
      if (!(ent_v != 0)) begin failures++; $display("FAIL page (1,3) entry missing"); end
      send(1, 3, 5, 1'b1);
      @(negedge clk);
      checks++;
      if (npres != 2) begin failures++; $display("FAIL page (1,3) not present after retransmission"); end
      checks++;
      if (ent_v != 0) begin failures++; $display("FAIL entries left %b", ent_v); end
    end
    // overflow: nine partly received pages
    for (int p = 0; p < 9; p++) send(2, p, 0, 1'b1);
    @(negedge clk);
    checks++;
    if (novf != 1 || ent_v != 8'hFF) begin failures++; $display("FAIL overflow %0d %b", novf, ent_v); end
    @(negedge clk); flush = 1; flush_idx = 2; @(negedge clk); flush = 0;
    @(negedge clk);
    checks++;
    if (ent_v != 0) begin failures++; $display("FAIL flush"); end
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
