// Segment transfer at full size: one 1 MB segment (1024 pages of 1 KB,
// 32768 cells) goes from interface A to interface B at the peak rate, both
// at their default parameters (1 MB CMM each, one clock per link bit).
//
// A's host fills its whole CMM with a pattern computed from the address.
// A's CAP opens one congram with no inter-page gap and keeps its primary
// request slot filled with the next page as soon as the sequencer has
// taken the previous one; B's receive CSR places the segment at address 0
// of B's CMM. The test checks that every page is reported present once and
// in order, that no packet is lost or corrupted, that B's CMM then equals
// A's byte for byte, and that the transfer takes the time set by the cell
// slot: 32768 cells x 432 bit times, plus the pipeline latency. At 1 Gb/s
// that is 14.16 ms, and the first page alone takes 32 slots, 13.8 us; the
// Axon paper's figures are 13.9 ms and 13.5 us (424 ns per cell, with no
// framing byte).
//
// Uses the same ports as the end-to-end test; the request slot is watched
// inside A because the CAP interface has no "slot free" output.
module tb_axon_segment;
  import axon_pkg::*;
  localparam int AW = 20;
  localparam int NPAGES = (1 << AW) / PAGE_BYTES;    // 1024
  localparam longint NCELLS = longint'(NPAGES) * PKTS_PER_PAGE;
  logic clk = 0, rst_n = 1;
  initial #0.25 rst_n = 0;  // a falling edge applies the asynchronous reset
  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] pattern(input logic [AW-1:0] a);
    logic [31:0] h = 32'(a) * 32'h9E37_79B1;
    return h[20:13] ^ 8'(a);
  endfunction

  logic a_out, b_out;
  logic a_h_en = 0, a_h_we = 0, b_h_en = 0;
  logic [AW-1:0] a_h_addr = 0, b_h_addr = 0;
  logic [7:0] a_h_wdata = 0, a_h_rdata, b_h_rdata;
  logic a_tx_we = 0, b_rx_we = 0, a_req_we = 0;
  tx_cfg_t a_txw = '0;
  rx_cfg_t b_rxw = '0;
  tx_req_t a_req = '0;
  logic [CELL_BYTES-3:0][7:0] no_cell = '0;
  logic a_cta, b_cta, a_crv, b_crv, a_cro, b_cro, a_tpe, b_tpe, a_pp, b_pp, a_rq, b_rq, a_ovf, b_ovf;
  logic [CELL_BYTES-1:0][7:0] a_crc, b_crc;
  logic [1:0] a_tpi, b_tpi;
  logic [15:0] a_tpj, b_tpj, a_ppq, b_ppq, a_ppj, b_ppj, a_rqq, b_rqq, a_rqj, b_rqj;
  logic [7:0] a_ppi, b_ppi, a_rqi, b_rqi;
  logic [31:0] a_rqb, b_rqb, a_nc, b_nc, a_nm, b_nm;

  axon_nif u_a (
    .clk, .rst_n, .link_out(a_out), .link_in(b_out),
    .h_en(a_h_en), .h_we(a_h_we), .h_addr(a_h_addr), .h_wdata(a_h_wdata), .h_rdata(a_h_rdata),
    .tx_we(a_tx_we), .rx_we(1'b0), .widx(2'd0), .tx_wdata(a_txw), .rx_wdata('0),
    .req_we(a_req_we), .req_idx(2'd0), .req(a_req),
    .ctl_tx_valid(1'b0), .ctl_tx_cell(no_cell), .ctl_tx_ack(a_cta),
    .ctl_rx_valid(a_crv), .ctl_rx_ok(a_cro), .ctl_rx_cell(a_crc),
    .tx_page_end(a_tpe), .tx_page_idx(a_tpi), .tx_page_j(a_tpj),
    .pg_pres(a_pp), .pg_idx(a_ppi), .pg_q(a_ppq), .pg_j(a_ppj),
    .rq(a_rq), .rq_idx(a_rqi), .rq_q(a_rqq), .rq_j(a_rqj), .rq_bits(a_rqb),
    .ppl_ovf(a_ovf), .n_corrupt(a_nc), .n_missing(a_nm),
    .rxt_tick(1'b0), .flush(1'b0), .flush_idx(8'd0)
  );
  axon_nif u_b (
    .clk, .rst_n, .link_out(b_out), .link_in(a_out),
    .h_en(b_h_en), .h_we(1'b0), .h_addr(b_h_addr), .h_wdata(8'd0), .h_rdata(b_h_rdata),
    .tx_we(1'b0), .rx_we(b_rx_we), .widx(2'd0), .tx_wdata('0), .rx_wdata(b_rxw),
    .req_we(1'b0), .req_idx(2'd0), .req('0),
    .ctl_tx_valid(1'b0), .ctl_tx_cell(no_cell), .ctl_tx_ack(b_cta),
    .ctl_rx_valid(b_crv), .ctl_rx_ok(b_cro), .ctl_rx_cell(b_crc),
    .tx_page_end(b_tpe), .tx_page_idx(b_tpi), .tx_page_j(b_tpj),
    .pg_pres(b_pp), .pg_idx(b_ppi), .pg_q(b_ppq), .pg_j(b_ppj),
    .rq(b_rq), .rq_idx(b_rqi), .rq_q(b_rqq), .rq_j(b_rqj), .rq_bits(b_rqb),
    .ppl_ovf(b_ovf), .n_corrupt(b_nc), .n_missing(b_nm),
    .rxt_tick(1'b0), .flush(1'b0), .flush_idx(8'd0)
  );

  // clock count, first line activity, page presence at B
  longint cyc = 0, t_first = -1, t_last = 0, t_page0 = 0;
  int n_pres = 0, n_order = 0, n_ctl = 0, n_rq = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (t_first < 0 && a_out) t_first <= cyc;
    if (b_pp) begin
      if (int'(b_ppj) == n_pres) n_order++;
      if (n_pres == 0) t_page0 <= cyc;
      n_pres++;
      t_last <= cyc;
    end
    if (b_crv) n_ctl++;
    if (b_rq) n_rq++;
  end

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1;
    // A's host writes the whole segment, one byte per clock
    for (int a = 0; a < (1 << AW); a++) begin
      @(negedge clk);
      a_h_en = 1; a_h_we = 1; a_h_addr = AW'(a); a_h_wdata = pattern(AW'(a));
    end
    @(negedge clk);
    a_h_en = 0; a_h_we = 0;

    a_tx_we = 1;
    a_txw = '{en:1'b1, c:16'h0301, q:16'h0001, nethdr:40'h00_00_30_30_CC, g:8'd1, k:8'd0, sk:16'(NPAGES),
              ipg:16'd0, swap:1'b1, crypt:1'b1, key:16'h5EED};
    b_rx_we = 1;
    b_rxw = '{en:1'b1, c:16'h0301, q:16'h0001, base:32'h0, g:8'd1, sk:16'(NPAGES), swap:1'b1, crypt:1'b1, key:16'h5EED};
    @(negedge clk);
    a_tx_we = 0; b_rx_we = 0;

    // A's CAP: one request per page, the next as soon as the slot is free
    for (int j = 0; j < NPAGES; j++) begin
      @(negedge clk);
      a_req_we = 1;
      a_req = '{rexmit:1'b0, j:16'(j), base:32'(j * PAGE_BYTES), bits:'1};
      @(negedge clk);
      a_req_we = 0;
      wait (!u_a.u_cmp.prim_pend[0]);
    end
    wait (n_pres == NPAGES);
    repeat (100) @(negedge clk);

    check(n_order == NPAGES, $sformatf("all %0d pages present at B, in order (%0d)", NPAGES, n_order));
    check(b_nc == 0 && b_nm == 0 && n_rq == 0 && n_ctl == 0 && !b_ovf, "no corrupted, missing or stray cells");
    begin
      // the transfer time: every cell in its 432-bit slot, plus latency
      automatic longint span = t_last - t_first, ideal = NCELLS * CELL_SLOT * W;
      $display("segment: %0d cells in %0d bit times (ideal %0d) = %0.3f ms at 1 Gb/s",
               NCELLS, span, ideal, real'(span) / 1.0e6);
      check(span >= ideal - CELL_SLOT * W && span <= ideal + 2000, "transfer at the peak cell rate");
    end
    begin
      // the first page: 32 slots of 432 bit times, plus the latency
      automatic longint p0 = t_page0 - t_first, ideal0 = longint'(PKTS_PER_PAGE) * CELL_SLOT * W;
      $display("first page: %0d bit times (ideal %0d) = %0.2f us at 1 Gb/s", p0, ideal0, real'(p0) / 1.0e3);
      check(p0 >= ideal0 - CELL_SLOT * W && p0 <= ideal0 + 2000, "one page in 32 cell slots");
    end
    // B's CMM equals A's data: pipelined reads through the host port
    begin
      automatic int bad = 0;
      for (int a = 0; a <= (1 << AW); a++) begin
        @(negedge clk);
        if (a > 0 && b_h_rdata != pattern(AW'(a - 1))) bad++;
        b_h_en = (a < (1 << AW)); b_h_addr = AW'(a);
      end
      b_h_en = 0;
      check(bad == 0, $sformatf("B's CMM holds the segment (%0d bad bytes)", bad));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
