// Test of PEL: finished packets are passed to the presence logic with their
// checksum verdict; corrupted ones are counted; when a timer fires for an
// entry the request carries that entry's congram, request, page and the
// complement of its presence vector, and the missing count grows by the
// number of absent packets.
//
// The paper gives the duties (corrupted and missing packets, retransmit
// bitmap); the counters are this design's.
module tb_axon_pel;
  timeunit 1ns; timeprecision 100ps;
  import axon_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #0.25 rst_n = 0;  // a falling edge applies the asynchronous reset
  logic cell_done = 0, cell_ok = 0, arr, arr_ok, fire = 0, rq;
  logic [7:0] cell_idx = 0, arr_idx, rq_idx;
  logic [15:0] cell_q = 0, cell_j = 0, arr_q, arr_j, rq_q, rq_j;
  logic [4:0] cell_i = 0, arr_i;
  logic [2:0] fire_ent = 0;
  logic [7:0] ent_idx [8];
  logic [15:0] ent_q [8], ent_j [8];
  logic [31:0] ent_pres [8], rq_bits, n_corrupt, n_missing;
  always #1 clk = ~clk;
  axon_pel #(.NPG(8)) dut (.clk, .rst_n, .cell_done, .cell_ok, .cell_idx, .cell_q, .cell_j, .cell_i,
    .arr, .arr_ok, .arr_idx, .arr_q, .arr_j, .arr_i, .fire, .fire_ent, .ent_idx, .ent_q, .ent_j,
    .ent_pres, .rq, .rq_idx, .rq_q, .rq_j, .rq_bits, .n_corrupt, .n_missing);
  int checks = 0, failures = 0, nbad = 0, nmiss = 0;
  initial begin
    for (int n = 0; n < 8; n++) begin
      ent_idx[n] = 8'(n % 3); ent_q[n] = 16'(100 + n); ent_j[n] = 16'(n * 2); ent_pres[n] = $urandom;
    end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      automatic bit ok = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      cell_done = 1; cell_ok = ok; cell_idx = 8'($urandom); cell_q = 16'($urandom);
      cell_j = 16'($urandom); cell_i = 5'($urandom);
      #0.5;
      checks++;
      if (!(arr && arr_ok == ok && arr_idx == cell_idx && arr_q == cell_q && arr_j == cell_j && arr_i == cell_i)) begin
        failures++; $display("FAIL pass-through %0d", t);
      end
      if (!ok) nbad++;
      @(negedge clk); cell_done = 0;
    end
    checks++; if (n_corrupt != 32'(nbad)) begin failures++; $display("FAIL corrupt count"); end
    for (int e = 0; e < 8; e++) begin
      @(negedge clk); fire = 1; fire_ent = 3'(e); @(negedge clk); fire = 0;
      nmiss += $countones(~ent_pres[e]);
      checks++;
      if (!(rq && rq_idx == ent_idx[e] && rq_q == ent_q[e] && rq_j == ent_j[e] && rq_bits == ~ent_pres[e])) begin
        failures++; $display("FAIL request for entry %0d", e);
      end
      @(negedge clk);
      checks++; if (rq) begin failures++; $display("FAIL request not a pulse"); end
    end
    checks++; if (n_missing != 32'(nmiss)) begin failures++; $display("FAIL missing count"); end
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
