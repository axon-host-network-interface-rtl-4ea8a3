// End-to-end test of the host-network interface: two interfaces, A and B,
// joined by a pair of serial links, each with its own CMM, and a simple
// behavioural CAP for each written in the testbench.
//
// A's host fills three pages in its CMM (two of congram 0, one of congram 1).
// A's CAP sends a control cell to B, then queues the pages. Congram 0 uses
// byte-order conversion and encryption and a rate-limiting inter-page gap;
// congram 1 uses neither. The A->B channel inverts one line bit inside the
// data field of one cell, so B's checksum compare rejects that packet. B's
// retransmit timer (advanced by arrivals and by CAP ticks) fires, B's CAP
// sends a retransmit-packets control cell back over the B->A link, A's CAP
// turns it into a retransmission request, and the missing packet is sent
// again. The test checks that every page ends up present at B and that B's
// CMM holds exactly A's data, that control cells arrive intact, that cells
// leave at one per 432 bit times (53-byte cell plus framing byte), that the
// inter-page gap is honoured, and it counts each mechanism the design has:
// control cells, congram context switches, rate holds, checksum failures,
// retransmit requests and retransmitted pages, page completions.
//
// The flow (control cell, rate-controlled pages, checksum reject,
// retransmit-packets request) follows the paper's example operation;
// formats and timer values are this design's.
module tb_axon_nif;
  import axon_pkg::*;

  localparam int unsigned AW = 20;
  localparam int unsigned IPG0 = 3000;   // inter-page gap of congram 0, major cycles

  logic clk = 1'b0, rst_n = 1;
  initial #0.25 rst_n = 0;  // a falling edge applies the asynchronous reset
  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- the two interfaces ----------------
  logic a_out, b_out, a_in, b_in;

  logic          a_h_en, a_h_we, b_h_en, b_h_we;
  logic [AW-1:0] a_h_addr, b_h_addr;
  logic [7:0]    a_h_wdata, b_h_wdata, a_h_rdata, b_h_rdata;
  logic          a_tx_we, a_rx_we, b_tx_we, b_rx_we;
  logic [1:0]    a_widx, b_widx, a_req_idx, b_req_idx;
  tx_cfg_t       a_txw, b_txw;
  rx_cfg_t       a_rxw, b_rxw;
  logic          a_req_we, b_req_we;
  tx_req_t       a_req, b_req;
  logic          a_ctv, b_ctv, a_cta, b_cta;
  logic [CELL_BYTES-3:0][7:0] a_ctc, b_ctc;
  logic          a_crv, b_crv, a_cro, b_cro;
  logic [CELL_BYTES-1:0][7:0] a_crc, b_crc;
  logic          a_tpe, b_tpe;
  logic [1:0]    a_tpi, b_tpi;
  logic [15:0]   a_tpj, b_tpj;
  logic          a_pp, b_pp;
  logic [7:0]    a_ppi, b_ppi;
  logic [15:0]   a_ppq, b_ppq, a_ppj, b_ppj;
  logic          a_rq, b_rq;
  logic [7:0]    a_rqi, b_rqi;
  logic [15:0]   a_rqq, b_rqq, a_rqj, b_rqj;
  logic [31:0]   a_rqb, b_rqb;
  logic          a_ovf, b_ovf;
  logic [31:0]   a_nc, b_nc, a_nm, b_nm;
  logic          tick;

  axon_nif u_a (
    .clk, .rst_n, .link_out(a_out), .link_in(a_in),
    .h_en(a_h_en), .h_we(a_h_we), .h_addr(a_h_addr), .h_wdata(a_h_wdata), .h_rdata(a_h_rdata),
    .tx_we(a_tx_we), .rx_we(a_rx_we), .widx(a_widx), .tx_wdata(a_txw), .rx_wdata(a_rxw),
    .req_we(a_req_we), .req_idx(a_req_idx), .req(a_req),
    .ctl_tx_valid(a_ctv), .ctl_tx_cell(a_ctc), .ctl_tx_ack(a_cta),
    .ctl_rx_valid(a_crv), .ctl_rx_ok(a_cro), .ctl_rx_cell(a_crc),
    .tx_page_end(a_tpe), .tx_page_idx(a_tpi), .tx_page_j(a_tpj),
    .pg_pres(a_pp), .pg_idx(a_ppi), .pg_q(a_ppq), .pg_j(a_ppj),
    .rq(a_rq), .rq_idx(a_rqi), .rq_q(a_rqq), .rq_j(a_rqj), .rq_bits(a_rqb),
    .ppl_ovf(a_ovf), .n_corrupt(a_nc), .n_missing(a_nm),
    .rxt_tick(tick), .flush(1'b0), .flush_idx(8'd0)
  );
  axon_nif u_b (
    .clk, .rst_n, .link_out(b_out), .link_in(b_in),
    .h_en(b_h_en), .h_we(b_h_we), .h_addr(b_h_addr), .h_wdata(b_h_wdata), .h_rdata(b_h_rdata),
    .tx_we(b_tx_we), .rx_we(b_rx_we), .widx(b_widx), .tx_wdata(b_txw), .rx_wdata(b_rxw),
    .req_we(b_req_we), .req_idx(b_req_idx), .req(b_req),
    .ctl_tx_valid(b_ctv), .ctl_tx_cell(b_ctc), .ctl_tx_ack(b_cta),
    .ctl_rx_valid(b_crv), .ctl_rx_ok(b_cro), .ctl_rx_cell(b_crc),
    .tx_page_end(b_tpe), .tx_page_idx(b_tpi), .tx_page_j(b_tpj),
    .pg_pres(b_pp), .pg_idx(b_ppi), .pg_q(b_ppq), .pg_j(b_ppj),
    .rq(b_rq), .rq_idx(b_rqi), .rq_q(b_rqq), .rq_j(b_rqj), .rq_bits(b_rqb),
    .ppl_ovf(b_ovf), .n_corrupt(b_nc), .n_missing(b_nm),
    .rxt_tick(tick), .flush(1'b0), .flush_idx(8'd0)
  );

  // ---------------- channel A -> B with one injected error ----------------
  // A copy of the receiver's framing rule finds cell starts on the line.
  int  cell_no = 0, bitpos = 0, corrupt_cell = 40;
  bit  hunting = 1'b1, prev_line = 1'b0;
  longint cell_t [$];
  always_ff @(posedge clk) begin
    prev_line <= a_out;
    if (hunting) begin
      if (a_out != prev_line) begin
        hunting <= 1'b0; bitpos <= 0; cell_no <= cell_no + 1;
        cell_t.push_back($time);
      end
    end else begin
      bitpos <= bitpos + 1;
      if (bitpos == CELL_BYTES * W - 1) hunting <= 1'b1;
    end
  end
  // invert the line for one bit time inside the data field of one cell
  assign b_in = a_out ^ (!hunting && cell_no == corrupt_cell && bitpos == 8 * 30 + 3);
  assign a_in = b_out;

  // ---------------- test data ----------------
  localparam logic [15:0] C0 = 16'h0101, Q0 = 16'h0007, C1 = 16'h0202, Q1 = 16'h0009;
  localparam logic [31:0] A_BASE0 = 32'h0_1000, A_BASE1 = 32'h0_8000;
  localparam logic [31:0] B_BASE0 = 32'h2_0000, B_BASE1 = 32'h4_0000;
  logic [7:0] pg [3][PAGE_BYTES];   // pages: congram 0 page 0, congram 0 page 1, congram 1 page 0

  task automatic a_host_write(input logic [AW-1:0] addr, input logic [7:0] d);
    @(negedge clk);
    a_h_en = 1'b1; a_h_we = 1'b1; a_h_addr = addr; a_h_wdata = d;
    @(negedge clk);
    a_h_en = 1'b0; a_h_we = 1'b0;
  endtask

  task automatic b_host_read(input logic [AW-1:0] addr, output logic [7:0] d);
    @(negedge clk);
    b_h_en = 1'b1; b_h_we = 1'b0; b_h_addr = addr;
    @(negedge clk);
    b_h_en = 1'b0;
    d = b_h_rdata;
  endtask

  function automatic tx_req_t mkreq(bit rx, logic [15:0] j, logic [31:0] base, logic [31:0] bits);
    tx_req_t r;
    r.rexmit = rx; r.j = j; r.base = base; r.bits = bits;
    return r;
  endfunction

  // ---------------- CAP models and event counters ----------------
  int n_ctl_b = 0, n_ctl_a = 0, n_ctx = 0, n_hold = 0, n_rq = 0, n_rex = 0, n_rex_done = 0;
  int n_pres = 0;
  bit present [3];
  longint page0_end_t = 0, page1_start_t = 0;
  logic [1:0] last_cong = 2'd3;

  // B's CAP: turns a retransmission request into a retransmit-packets control cell
  always @(posedge clk) begin
    if (b_rq) begin
      n_rq++;
      wait (!b_ctv);
      @(negedge clk);
      b_ctc = '0;
      b_ctc[OFF_MTYPE] = MTYPE_DATA; b_ctc[OFF_ATYPE] = ATYPE_CTRL;
      b_ctc[OFF_C] = (b_rqi == 8'd0) ? C0[15:8] : C1[15:8];
      b_ctc[OFF_C+1] = (b_rqi == 8'd0) ? C0[7:0] : C1[7:0];
      b_ctc[OFF_Q] = b_rqq[15:8]; b_ctc[OFF_Q+1] = b_rqq[7:0];
      b_ctc[OFF_J] = b_rqj[15:8]; b_ctc[OFF_J+1] = b_rqj[7:0];
      for (int n = 0; n < 4; n++) b_ctc[OFF_DATA + n] = b_rqb[8*n +: 8];
      b_ctv = 1'b1;
      wait (b_cta);
      @(negedge clk);
      b_ctv = 1'b0;
    end
  end

  // A's CAP: receives control cells, requests retransmission of the named packets
  always @(posedge clk) begin
    if (a_crv) begin
      logic [15:0] c, j;
      logic [31:0] bits;
      n_ctl_a++;
      check(a_cro, "retransmit control cell checksum at A");
      c = {a_crc[OFF_C], a_crc[OFF_C+1]};
      j = {a_crc[OFF_J], a_crc[OFF_J+1]};
      for (int n = 0; n < 4; n++) bits[8*n +: 8] = a_crc[OFF_DATA + n];
      @(negedge clk);
      a_req_we = 1'b1;
      a_req_idx = (c == C0) ? 2'd0 : 2'd1;
      a_req = mkreq(1'b1, j, ((c == C0) ? A_BASE0 : A_BASE1) + 32'(j) * PAGE_BYTES, bits);
      @(negedge clk);
      a_req_we = 1'b0;
      n_rex++;
    end
  end

  // B's CAP: control cells from A
  logic [CELL_BYTES-3:0][7:0] a_ctl_sent;
  always @(posedge clk) if (b_crv) begin
    n_ctl_b++;
    check(b_cro, "control cell checksum at B");
    for (int n = 0; n < OFF_CK; n++)
      check(b_crc[n] == a_ctl_sent[n], $sformatf("control cell byte %0d at B: %h vs %h", n, b_crc[n], a_ctl_sent[n]));
  end

  // page presence at B
  always @(posedge clk) if (b_pp) begin
    int p;
    p = (b_ppi == 8'd1) ? 2 : int'(b_ppj);
    n_pres++;
    check(b_ppq == ((b_ppi == 8'd1) ? Q1 : Q0), "request id of present page");
    check(!present[p], "page reported present once");
    present[p] = 1'b1;
  end

  // transmit side observations at A
  always @(posedge clk) begin
    if (a_tpe) begin
      if (a_tpi == 2'd0 && a_tpj == 16'd0 && page0_end_t == 0) page0_end_t = $time;
    end
    if (u_a.u_cmp.u_mpx.clr_prim || u_a.u_cmp.u_mpx.clr_rex) begin
      if (u_a.u_cmp.u_mpx.clr_idx != last_cong && last_cong != 2'd3) n_ctx++;
      last_cong = u_a.u_cmp.u_mpx.clr_idx;
      if (u_a.u_cmp.u_mpx.clr_rex) n_rex_done++;
      if (u_a.u_cmp.u_mpx.clr_prim && u_a.u_cmp.u_mpx.clr_idx == 2'd0 &&
          u_a.u_cmp.u_mpx.cur_j == 16'd1) page1_start_t = $time;
    end
    if (u_a.u_cmp.ce_tx && u_a.u_cmp.slot && u_a.u_cmp.prim_pend[0] && !u_a.u_cmp.elig[0])
      n_hold++;
  end

  // ---------------- stimulus ----------------
  initial begin
    logic [7:0] d;
    {a_h_en, a_h_we, b_h_en, b_h_we} = '0;
    a_h_addr = '0; b_h_addr = '0; a_h_wdata = '0; b_h_wdata = '0;
    {a_tx_we, a_rx_we, b_tx_we, b_rx_we, a_req_we, b_req_we, a_ctv, b_ctv, tick} = '0;
    a_widx = '0; b_widx = '0; a_req_idx = '0; b_req_idx = '0;
    a_txw = '0; b_txw = '0; a_rxw = '0; b_rxw = '0; a_req = '0; b_req = '0;
    a_ctc = '0; b_ctc = '0; a_ctl_sent = '0;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;

    for (int p = 0; p < 3; p++)
      for (int n = 0; n < PAGE_BYTES; n++) pg[p][n] = 8'($urandom);
    for (int n = 0; n < PAGE_BYTES; n++) begin
      a_host_write(AW'(A_BASE0 + n), pg[0][n]);
      a_host_write(AW'(A_BASE0 + PAGE_BYTES + n), pg[1][n]);
      a_host_write(AW'(A_BASE1 + n), pg[2][n]);
    end

    // congram state registers
    @(negedge clk);
    a_tx_we = 1'b1; a_widx = 2'd0;
    a_txw = '{en:1'b1, c:C0, q:Q0, nethdr:40'h00_00_10_10_AA, g:8'd1, k:8'd0, sk:16'd2,
              ipg:16'(IPG0), swap:1'b1, crypt:1'b1, key:16'hACE1};
    b_rx_we = 1'b1; b_widx = 2'd0;
    b_rxw = '{en:1'b1, c:C0, q:Q0, base:B_BASE0, g:8'd1, sk:16'd2, swap:1'b1, crypt:1'b1, key:16'hACE1};
    @(negedge clk);
    a_widx = 2'd1;
    a_txw = '{en:1'b1, c:C1, q:Q1, nethdr:40'h00_00_20_20_BB, g:8'd1, k:8'd0, sk:16'd1,
              ipg:16'd0, swap:1'b0, crypt:1'b0, key:16'h0};
    b_widx = 2'd1;
    b_rxw = '{en:1'b1, c:C1, q:Q1, base:B_BASE1, g:8'd1, sk:16'd1, swap:1'b0, crypt:1'b0, key:16'h0};
    @(negedge clk);
    a_tx_we = 1'b0; b_rx_we = 1'b0;

    // a control cell from A's CAP (say, a get-segment request)
    for (int n = 0; n < OFF_CK; n++) a_ctc[n] = 8'($urandom);
    a_ctc[OFF_ATYPE] = ATYPE_CTRL;
    a_ctl_sent = a_ctc;
    a_ctv = 1'b1;
    wait (a_cta);
    @(negedge clk);
    a_ctv = 1'b0;

    // the pages
    @(negedge clk);
    a_req_we = 1'b1; a_req_idx = 2'd0; a_req = mkreq(1'b0, 16'd0, A_BASE0, '1);
    @(negedge clk);
    a_req_idx = 2'd1; a_req = mkreq(1'b0, 16'd0, A_BASE1, '1);
    @(negedge clk);
    a_req_we = 1'b0;
    wait (page0_end_t != 0 || u_a.u_cmp.clr_prim && u_a.u_cmp.clr_idx == 2'd0);
    // queue page 1 of congram 0 as soon as page 0 has been taken
    wait (!u_a.u_cmp.prim_pend[0]);
    @(negedge clk);
    a_req_we = 1'b1; a_req_idx = 2'd0; a_req = mkreq(1'b0, 16'd1, A_BASE0 + PAGE_BYTES, '1);
    @(negedge clk);
    a_req_we = 1'b0;

    // CAP timer ticks until everything is present
    while (!(present[0] && present[1] && present[2])) begin
      repeat (400) @(negedge clk);
      tick = 1'b1;
      @(negedge clk);
      tick = 1'b0;
    end
    repeat (2000) @(negedge clk);

    // B's CMM must hold A's pages
    begin
      automatic int bad = 0;
      for (int n = 0; n < PAGE_BYTES; n++) begin
        b_host_read(AW'(B_BASE0 + n), d);              if (d != pg[0][n]) bad++;
        b_host_read(AW'(B_BASE0 + PAGE_BYTES + n), d); if (d != pg[1][n]) bad++;
        b_host_read(AW'(B_BASE1 + n), d);              if (d != pg[2][n]) bad++;
      end
      check(bad == 0, $sformatf("B's CMM matches A's pages (%0d bad bytes)", bad));
    end

    // cell rate on the link: consecutive cells of a burst are 432 bit times apart
    begin
      automatic int n432 = 0;
      for (int n = 1; n < cell_t.size(); n++) begin
        check(cell_t[n] - cell_t[n-1] >= 2 * CELL_SLOT * W, "cell spacing at least one slot");
        if (cell_t[n] - cell_t[n-1] == 2 * CELL_SLOT * W) n432++;
      end
      check(n432 > 90, $sformatf("cells at the peak rate of one per 432 bit times (%0d)", n432));
    end
    check(page1_start_t - page0_end_t >= 2 * W * IPG0, "inter-page gap of congram 0 honoured");

    check(n_pres == 3, $sformatf("three pages present at B (%0d)", n_pres));
    check(n_ctl_b == 1, "control cell A->B delivered");
    check(n_ctl_a >= 1, "retransmit-packets control cell B->A delivered");
    check(n_ctx >= 1, $sformatf("congram context switches (%0d)", n_ctx));
    check(n_hold >= 1, $sformatf("rate holds of congram 0 (%0d)", n_hold));
    check(b_nc >= 1, $sformatf("corrupted packets detected (%0d)", b_nc));
    check(n_rq >= 1, $sformatf("retransmit requests (%0d)", n_rq));
    check(n_rex_done >= 1, $sformatf("retransmitted pages (%0d)", n_rex_done));
    check(b_ovf == 1'b0, "no presence table overflow");
    $display("mechanisms: ctl_cells=%0d ctx_switch=%0d rate_hold=%0d corrupt=%0d rexmit_req=%0d rexmit_page=%0d pages=%0d cells=%0d",
             n_ctl_b + n_ctl_a, n_ctx, n_hold, b_nc, n_rq, n_rex_done, n_pres, cell_t.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
