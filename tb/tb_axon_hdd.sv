// Test of HDD: header bytes of data and control cells are streamed in; the
// testbench answers the congram lookup from its own table. The decoded
// header (type, hit, CSR index, q, k, j, i and the bounds verdict) must
// appear, with hdr_v, in the enable after the last header byte.
//
// The paper gives the decode duties (congram, control or data, packet
// index); the bounds check is this design's.
module tb_axon_hdd;
  import axon_pkg::*;
  logic clk = 0, rst_n = 1, ce = 0, lk_hit, hdr_v;
  initial #0.25 rst_n = 0;  // a falling edge applies the asynchronous reset
  logic [15:0] lk_c, lk_q;
  logic [1:0] lk_idx;
  rx_cfg_t lk_cfg, tab [4];
  hdr_t hdr;
  cbyte_t in;
  always #1 clk = ~clk;
  axon_hdd #(.NCONG(4)) dut (.clk, .rst_n, .ce, .in, .lk_c, .lk_q, .lk_hit, .lk_idx, .lk_cfg, .hdr, .hdr_v);
  always_comb begin
    lk_hit = 0; lk_idx = 0;
    for (int n = 3; n >= 0; n--) if (tab[n].en && tab[n].c == lk_c && tab[n].q == lk_q) begin lk_hit = 1; lk_idx = 2'(n); end
    lk_cfg = tab[lk_idx];
  end
  int checks = 0, failures = 0;
  initial begin
    in = '0;
    for (int n = 0; n < 4; n++)
      tab[n] = '{en:1'b1, c:16'(16'h100 + n), q:16'(n * 3), base:32'h0, g:8'd2, sk:16'd4, swap:1'b0, crypt:1'b0, key:16'h0};
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      automatic int ci = $urandom_range(0, 4);       // 4 = unknown congram
      automatic bit ctl = ($urandom_range(0, 5) == 0);
      automatic logic [7:0] k = 8'($urandom_range(0, 2));
      automatic logic [15:0] j = 16'($urandom_range(0, 4));
      automatic logic [15:0] i = 16'($urandom_range(0, 33));
      automatic logic [15:0] c = (ci == 4) ? 16'h0999 : 16'(16'h100 + ci);
      automatic logic [15:0] q = (ci == 4) ? 16'h0 : 16'(ci * 3);
      logic [7:0] h [19];
      for (int n = 0; n < 19; n++) h[n] = 8'($urandom);
      h[6] = ctl ? ATYPE_CTRL : ATYPE_DATA;
      h[7] = c[15:8]; h[8] = c[7:0]; h[9] = q[15:8]; h[10] = q[7:0];
      h[12] = k; h[15] = j[15:8]; h[16] = j[7:0]; h[17] = i[15:8]; h[18] = i[7:0];
      for (int n = 0; n < 24; n++) begin
        @(negedge clk);
        in = (n < 19) ? '{v:1'b1, sop:(n == 0), d:h[n]} : '{v:1'b1, sop:1'b0, d:8'h55};
        ce = 1;
        @(negedge clk);
        ce = 0;
        if (n == 18) begin
          checks++;
          if (!hdr_v || hdr.ctrl != (ctl || ci == 4) || hdr.hit != (ci != 4) ||
              (ci != 4 && (hdr.idx != 8'(ci) || hdr.q != q ||
                           hdr.inb != (k < 2 && j < 4 && i < 32))) ||
              hdr.k != k || hdr.j != j || hdr.i != i) begin
            failures++; $display("FAIL cell %0d", t);
          end
        end
      end
    end
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
