// Loopback test of the CMP: its link output feeds its own link input, and a
// byte memory in the bench serves both sequential ports (read data one
// clock after the address, like the CMM). Congram 0 is set up to send and
// to receive its own pages, with byte swapping and encryption on.
//  - A control cell comes back to the CAP port with a good checksum and
//    the same bytes.
//  - Page 0 goes out whole and must arrive in the receive area and be
//    reported present.
//  - Page 1 goes out with packet 5 left out of the bitmap: the page stays
//    partial, the retransmit timer (driven by CAP ticks) requests exactly
//    that packet (the CAP ticks only once the page has left), and
//    retransmitting it completes the page.
//  - One bit of the line is inverted during a data cell of page 2: the
//    checksum check counts a corrupted packet and its retransmission makes
//    the page complete.
// The receive area must then equal the transmit area.
//
// The pipe order follows the paper's block list; line code, cell layout,
// cipher and timer rule are this design's.
module tb_axon_cmp;
  import axon_pkg::*;
  localparam int AW = 14;
  localparam logic [31:0] TXB = 32'h0000, RXB = 32'h2000;
  logic clk = 0, rst_n = 1, link_out, link_in, flip = 0;
  initial #0.25 rst_n = 0;  // a falling edge applies the asynchronous reset
  logic tx_we = 0, rx_we = 0, req_we = 0, ctl_tx_valid = 0, ctl_tx_ack, ctl_rx_valid, ctl_rx_ok;
  logic [1:0] widx = 0, req_idx = 0, tx_page_idx;
  tx_cfg_t tx_wdata = '0;
  rx_cfg_t rx_wdata = '0;
  tx_req_t req = '0;
  logic [CELL_BYTES-3:0][7:0] ctl_tx_cell = '0;
  logic [CELL_BYTES-1:0][7:0] ctl_rx_cell;
  logic tx_page_end, pg_pres, rq, ppl_ovf, rxt_tick = 0, t_en, r_we;
  logic [15:0] tx_page_j, pg_q, pg_j, rq_q, rq_j;
  logic [7:0] pg_idx, rq_idx;
  logic [31:0] rq_bits, n_corrupt, n_missing;
  logic [AW-1:0] t_addr, r_addr;
  logic [7:0] t_rdata = 0, r_wdata;
  always #1 clk = ~clk;
  assign link_in = link_out ^ flip;

  axon_cmp #(.AW(AW)) dut (.clk, .rst_n, .link_out, .link_in, .tx_we, .rx_we, .widx, .tx_wdata, .rx_wdata,
    .req_we, .req_idx, .req, .ctl_tx_valid, .ctl_tx_cell, .ctl_tx_ack, .ctl_rx_valid, .ctl_rx_ok, .ctl_rx_cell,
    .tx_page_end, .tx_page_idx, .tx_page_j, .pg_pres, .pg_idx, .pg_q, .pg_j, .rq, .rq_idx, .rq_q, .rq_j, .rq_bits,
    .ppl_ovf, .n_corrupt, .n_missing, .rxt_tick, .flush(1'b0), .flush_idx(8'd0),
    .t_en, .t_addr, .t_rdata, .r_we, .r_addr, .r_wdata);

  logic [7:0] mem [2**AW];
  always_ff @(posedge clk) begin
    if (t_en) t_rdata <= mem[t_addr];
    if (r_we) mem[r_addr] <= r_wdata;
  end

  int checks = 0, failures = 0, n_pres = 0, n_ctl = 0, n_rq = 0;
  logic [2:0] present = 0;
  logic [31:0] last_rq_bits = 0;
  logic [15:0] last_rq_j = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    if (pg_pres) begin n_pres++; present[pg_j[1:0]] <= 1'b1; end
    if (rq) begin n_rq++; last_rq_bits <= rq_bits; last_rq_j <= rq_j; end
    if (ctl_rx_valid) begin
      automatic bit same = 1;
      n_ctl++;
      for (int n = 0; n < CELL_BYTES - 2; n++) if (ctl_rx_cell[n] != ctl_tx_cell[n]) same = 0;
      chk(ctl_rx_ok && same, "control cell returned intact");
    end
  end

  task automatic send(input logic [15:0] j, input logic [31:0] bits, input bit rx);
    @(negedge clk);
    req_we = 1; req_idx = 0;
    req = '{rexmit:rx, j:j, base:TXB + 32'(j) * PAGE_BYTES, bits:bits};
    @(negedge clk);
    req_we = 0;
    wait (!dut.prim_pend[0] && !dut.rex_pend[0]);
    // the CAP starts its timer ticks only once the page has left
    @(posedge tx_page_end);
    repeat (1000) @(negedge clk);
  endtask

  task automatic tick_until(input int p);
    while (!present[p] && n_rq == 0) begin
      repeat (200) @(negedge clk);
      rxt_tick = 1; @(negedge clk); rxt_tick = 0;
    end
  endtask

  initial begin
    for (int a = 0; a < 2**AW; a++) mem[a] = 8'($urandom);
    repeat (4) @(negedge clk); rst_n = 1;
    @(negedge clk);
    tx_we = 1; rx_we = 1; widx = 0;
    tx_wdata = '{en:1'b1, c:16'h0042, q:16'h0007, nethdr:40'h01_02_03_04_05, g:8'd1, k:8'd0, sk:16'd3,
                 ipg:16'd100, swap:1'b1, crypt:1'b1, key:16'h1D0F};
    rx_wdata = '{en:1'b1, c:16'h0042, q:16'h0007, base:RXB, g:8'd1, sk:16'd3, swap:1'b1, crypt:1'b1, key:16'h1D0F};
    @(negedge clk); tx_we = 0; rx_we = 0;

    for (int n = 0; n < CELL_BYTES - 2; n++) ctl_tx_cell[n] = 8'($urandom);
    ctl_tx_cell[OFF_ATYPE] = ATYPE_CTRL;
    ctl_tx_valid = 1; wait (ctl_tx_ack); @(negedge clk); ctl_tx_valid = 0;

    send(0, '1, 0);
    wait (present[0]);
    chk(1, "page 0 present");

    send(1, ~32'h20, 0);
    tick_until(1);
    @(negedge clk);
    chk(!present[1] && n_rq >= 1 && last_rq_j == 1 && last_rq_bits == 32'h20, "missing packet 5 requested");
    send(1, last_rq_bits, 1);
    wait (present[1]);
    chk(1, "page 1 complete after retransmission");

    fork
      send(2, '1, 0);
      begin
        // invert one line bit inside the payload of the 4th cell of page 2
        wait (dut.u_mpx.st == 2'd1 && dut.u_mpx.cur_i == 5'd3 && dut.u_mpx.pos == 6'd30);
        repeat (120) @(negedge clk);
        flip = 1; @(negedge clk); flip = 0;
      end
    join
    n_rq = 0;
    tick_until(2);
    @(negedge clk);
    chk(n_corrupt == 1, "corrupted packet counted");
    chk(!present[2] && last_rq_j == 2 && last_rq_bits == 32'h8, "corrupted packet requested");
    send(2, last_rq_bits, 1);
    wait (present[2]);
    repeat (2000) @(negedge clk);
    begin
      automatic int bad = 0;
      for (int n = 0; n < 3 * PAGE_BYTES; n++) if (mem[RXB + n] != mem[TXB + n]) bad++;
      chk(bad == 0, $sformatf("receive area equals transmit area (%0d bytes differ)", bad));
    end
    chk(n_ctl == 1 && n_pres == 3 && !ppl_ovf, "one control cell, three pages, no overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
