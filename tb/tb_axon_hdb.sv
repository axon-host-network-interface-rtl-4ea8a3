// Test of HDB: every header byte of random congram settings, page and
// packet numbers is compared with the cell layout.
//
// The paper lists the header fields; their byte positions are this
// design's.
module tb_axon_hdb;
  import axon_pkg::*;
  tx_cfg_t cfg;
  logic [15:0] j;
  logic [4:0] i;
  logic [5:0] off;
  logic [7:0] d;
  axon_hdb dut (.cfg, .j, .i, .off, .d);
  int checks = 0, failures = 0;
  initial begin
    for (int t = 0; t < 20; t++) begin
      logic [7:0] e [19];
      cfg = '{en:1'b1, c:16'($urandom), q:16'($urandom), nethdr:{8'($urandom), 32'($urandom)},
              g:8'($urandom), k:8'($urandom), sk:16'($urandom), ipg:16'd0, swap:1'b0, crypt:1'b0, key:16'd0};
      j = 16'($urandom); i = 5'($urandom);
      for (int n = 0; n < 5; n++) e[n] = cfg.nethdr[39 - 8*n -: 8];
      e[5] = 8'h01; e[6] = 8'h01;
      e[7] = cfg.c[15:8]; e[8] = cfg.c[7:0]; e[9] = cfg.q[15:8]; e[10] = cfg.q[7:0];
      e[11] = cfg.g; e[12] = cfg.k; e[13] = cfg.sk[15:8]; e[14] = cfg.sk[7:0];
      e[15] = j[15:8]; e[16] = j[7:0]; e[17] = 8'h00; e[18] = {3'b0, i};
      for (int n = 0; n < 19; n++) begin
        off = 6'(n); #1;
        checks++;
        if (d != e[n]) begin failures++; $display("FAIL byte %0d: %h exp %h", n, d, e[n]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
