// Test of the congram state registers: entries written by the CAP read
// back, page requests fill the primary or retransmission slot and are
// cleared by the sequencer, and the receive lookup finds the entry whose
// congram and request ids match (and only enabled entries).
//
// The paper gives a transmit and a receive CSR set per congram; the request
// slots and the lookup are this design's.
module tb_axon_csr;
  import axon_pkg::*;
  logic clk = 0, rst_n = 1, tx_we = 0, rx_we = 0, req_we = 0, clr_prim = 0, clr_rex = 0, lk_hit;
  initial #0.25 rst_n = 0;  // a falling edge applies the asynchronous reset
  logic [1:0] widx = 0, req_idx = 0, clr_idx = 0, lk_idx;
  tx_cfg_t tx_wdata = '0, tx_cfg [4];
  rx_cfg_t rx_wdata = '0, rx_cfg [4];
  tx_req_t req = '0, prim [4], rex [4];
  logic [3:0] prim_pend, rex_pend;
  logic [15:0] lk_c = 0, lk_q = 0;
  always #1 clk = ~clk;
  axon_csr #(.NCONG(4)) dut (.clk, .rst_n, .tx_we, .rx_we, .widx, .tx_wdata, .rx_wdata, .req_we, .req_idx,
    .req, .clr_prim, .clr_rex, .clr_idx, .tx_cfg, .rx_cfg, .prim, .rex, .prim_pend, .rex_pend,
    .lk_c, .lk_q, .lk_hit, .lk_idx);
  int checks = 0, failures = 0;
  rx_cfg_t rxm [4];
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 4; n++) begin
      tx_wdata = {$urandom, $urandom, $urandom, $urandom, $urandom};
      rxm[n] = {$urandom, $urandom, $urandom, $urandom};
      rxm[n].en = (n != 2); rxm[n].c = 16'(16'h40 + n); rxm[n].q = 16'(n);
      rx_wdata = rxm[n];
      widx = 2'(n); tx_we = 1; rx_we = 1;
      @(negedge clk);
      tx_we = 0; rx_we = 0;
      checks++;
      if (tx_cfg[n] != tx_wdata || rx_cfg[n] != rx_wdata) begin failures++; $display("FAIL write %0d", n); end
    end
    for (int n = 0; n < 5; n++) begin
      lk_c = 16'(16'h40 + n); lk_q = 16'(n);
      @(negedge clk);
      checks++;
      if (lk_hit != (n < 4 && n != 2) || (lk_hit && lk_idx != 2'(n))) begin failures++; $display("FAIL lookup %0d", n); end
    end
    lk_c = 16'h41; lk_q = 16'h7; @(negedge clk);
    checks++; if (lk_hit) begin failures++; $display("FAIL lookup with wrong q"); end
    req = '{rexmit:1'b0, j:16'd3, base:32'h100, bits:32'hF}; req_idx = 1; req_we = 1; @(negedge clk);
    req = '{rexmit:1'b1, j:16'd5, base:32'h200, bits:32'h1}; req_idx = 1; @(negedge clk);
    req_we = 0;
    checks++;
    if (prim_pend != 4'b0010 || rex_pend != 4'b0010 || prim[1].j != 16'd3 || rex[1].j != 16'd5) begin
      failures++; $display("FAIL request slots");
    end
    clr_rex = 1; clr_idx = 1; @(negedge clk); clr_rex = 0;
    checks++; if (rex_pend != 0 || prim_pend != 4'b0010) begin failures++; $display("FAIL clear rex"); end
    clr_prim = 1; @(negedge clk); clr_prim = 0;
    checks++; if (prim_pend != 0) begin failures++; $display("FAIL clear prim"); end
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
