// Test of the transmit sequencer (MPX with RXA, ADG and HDB inside).
//
// A divide-by-8 major cycle and a slot every CELL_SLOT major cycles drive
// the sequencer; a byte memory in the bench answers its read port one clock
// after the address, like the CMM. Four congrams: 0 and 1 enabled with
// pending pages, 2 disabled and 3 held by rate control, both with pages
// that must not go out until 3 is released. A control cell is pending at
// the start. The expected order is: the control cell, the retransmission
// page of congram 1 (before any primary page), the primary page of
// congram 0, the primary page of congram 1 (round robin), then congram 3
// once released. Every cell is checked byte by byte: header fields, the
// payload against memory at base + 32*i, zero trailer; only the packets
// set in a request bitmap are sent, and one page end is counted per page.
//
// The paper asks for page-granularity multiplexing with optional preemption
// by retransmissions; the priority order and round robin are this design's.
module tb_axon_mpx_tx;
  import axon_pkg::*;
  localparam int AW = 12;
  logic clk = 0, rst_n = 1, ce, slot, ctl_valid = 0, ctl_ack, t_en;
  initial #0.25 rst_n = 0;  // a falling edge applies the asynchronous reset
  logic [3:0] elig = 4'b0111, prim_pend = 0, rex_pend = 0;
  tx_cfg_t tx_cfg [4];
  tx_req_t prim [4], rex [4];
  logic [CELL_BYTES-3:0][7:0] ctl_cell;
  logic [AW-1:0] t_addr;
  logic [7:0] t_rdata = 0;
  logic clr_prim, clr_rex, page_end, cur_swap, cur_crypt;
  logic [1:0] clr_idx, page_idx;
  logic [15:0] page_j, cur_key;
  cbyte_t out;
  always #1 clk = ~clk;

  logic [2:0] div = 0;
  int unsigned scnt = 0;
  assign ce   = (div == 3'd7);
  assign slot = (scnt == 0);
  always_ff @(posedge clk) begin
    div <= div + 3'd1;
    if (ce) scnt <= (scnt == CELL_SLOT - 1) ? 0 : scnt + 1;
  end

  logic [7:0] mem [2**AW];
  always_ff @(posedge clk) if (t_en) t_rdata <= mem[t_addr];

  axon_mpx_tx #(.NCONG(4), .AW(AW)) dut (.clk, .rst_n, .ce, .slot, .elig, .tx_cfg, .prim, .rex,
    .prim_pend, .rex_pend, .ctl_valid, .ctl_cell, .ctl_ack, .t_en, .t_addr, .t_rdata,
    .clr_prim, .clr_rex, .clr_idx, .page_end, .page_idx, .page_j, .out, .cur_swap, .cur_crypt, .cur_key);

  // request slots as the CSRs hold them
  always_ff @(posedge clk) begin
    if (clr_prim) prim_pend[clr_idx] <= 1'b0;
    if (clr_rex)  rex_pend[clr_idx]  <= 1'b0;
    if (ctl_ack)  ctl_valid <= 1'b0;
  end

  int checks = 0, failures = 0, pages = 0, ncell = 0;
  // expected cells: congram (-1 = control), page j, packet i, base
  int exp_c [$], exp_j [$], exp_i [$], exp_b [$];
  logic [7:0] got [CELL_BYTES];
  int pos = -1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cell %0d)", what, ncell); end
  endtask

  task automatic check_cell();
    automatic int c = exp_c.pop_front(), j = exp_j.pop_front(), i = exp_i.pop_front(), b = exp_b.pop_front();
    if (c < 0) begin
      automatic bit ok = 1;
      for (int n = 0; n < CELL_BYTES - 2; n++) if (got[n] != ctl_cell[n]) ok = 0;
      chk(ok, "control cell bytes");
    end else begin
      automatic bit ok = 1;
      chk({got[OFF_C], got[OFF_C+1]} == tx_cfg[c].c, "congram id");
      chk({got[OFF_J], got[OFF_J+1]} == 16'(j), "page index");
      chk({got[OFF_I], got[OFF_I+1]} == 16'(i), "packet index");
      chk(got[0] == tx_cfg[c].nethdr[39:32] && got[OFF_MTYPE] == MTYPE_DATA && got[OFF_ATYPE] == ATYPE_DATA,
          "header template and types");
      for (int n = 0; n < DATA_BYTES; n++) if (got[OFF_DATA + n] != mem[b + 32 * i + n]) ok = 0;
      chk(ok, "payload");
      chk(got[OFF_CK] == 0 && got[OFF_CK+1] == 0, "trailer left for CKG");
      chk(cur_key == tx_cfg[c].key, "cell settings");
    end
  endtask

  always @(posedge clk) if (rst_n && ce && out.v) begin
    if (out.sop) pos = 0;
    if (pos >= 0 && pos < CELL_BYTES) got[pos] = out.d;
    if (pos == CELL_BYTES - 1) begin
      if (exp_c.size() == 0) begin failures++; $display("FAIL unexpected cell"); end
      else check_cell();
      ncell++;
    end
    pos++;
  end
  always @(posedge clk) if (page_end) pages++;

  task automatic expect_page(input int c, input int j, input int base, input logic [31:0] bits);
    for (int i = 0; i < 32; i++) if (bits[i]) begin
      exp_c.push_back(c); exp_j.push_back(j); exp_i.push_back(i); exp_b.push_back(base);
    end
  endtask

  initial begin
    for (int a = 0; a < 2**AW; a++) mem[a] = 8'($urandom);
    for (int n = 0; n < 4; n++) begin
      tx_cfg[n] = {$urandom, $urandom, $urandom, $urandom};
      tx_cfg[n].en = (n != 2); tx_cfg[n].c = 16'(16'h100 + n);
      prim[n] = '0; rex[n] = '0;
    end
    for (int n = 0; n < CELL_BYTES - 2; n++) ctl_cell[n] = 8'($urandom);
    prim[0] = '{rexmit:1'b0, j:16'd1, base:32'h000, bits:32'h0000_0005};
    prim[1] = '{rexmit:1'b0, j:16'd2, base:32'h400, bits:32'h8000_0003};
    rex[1]  = '{rexmit:1'b1, j:16'd3, base:32'h800, bits:32'h0000_0008};
    prim[2] = '{rexmit:1'b0, j:16'd4, base:32'h000, bits:32'hFFFF_FFFF};
    prim[3] = '{rexmit:1'b0, j:16'd5, base:32'hC00, bits:32'h0001_0000};
    prim_pend = 4'b1111; rex_pend = 4'b0010; ctl_valid = 1;
    exp_c.push_back(-1); exp_j.push_back(0); exp_i.push_back(0); exp_b.push_back(0);
    expect_page(1, 3, 'h800, rex[1].bits);
    expect_page(0, 1, 'h000, prim[0].bits);
    expect_page(1, 2, 'h400, prim[1].bits);
    repeat (4) @(negedge clk); rst_n = 1;
    wait (exp_c.size() == 0);
    repeat (CELL_SLOT * 8 * 3) @(negedge clk);
    chk(ncell == 7 && pages == 3, "nothing sent for a disabled or held congram");
    chk(prim_pend == 4'b1100 && rex_pend == 0, "request slots cleared as served");
    expect_page(3, 5, 'hC00, prim[3].bits);
    elig[3] = 1'b1;
    wait (exp_c.size() == 0);
    repeat (CELL_SLOT * 8 * 2) @(negedge clk);
    chk(ncell == 8 && pages == 4, "released congram served, disabled one never");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
