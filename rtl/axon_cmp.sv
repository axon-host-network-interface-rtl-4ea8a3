// CMP: the communications processor.
//
// A pipeline between the bit-serial network link and the sequential ports of
// the communications memory (CMM). Nothing is buffered beyond the pipeline
// registers: a packet is read from the CMM while it is being sent, and
// written to the CMM while it is being received.
//
// Transmit pipe (major cycle = one byte time, every W link clocks):
//   MPX/RCT/RXA/ADG/HDB sequencer -> CKG -> ECD -> ECR -> P2S -> XMT
// Receive pipe (clocked by the enable S2P derives from the line):
//   RCV -> S2P -> DCR -> DCD -> {CKC, ADD -> CMM, control cell -> CAP}
//   with HDD decoding the header right after S2P and selecting the
//   congram's receive CSR, and CKC -> PEL -> PPL, RXT for packet control.
//
// Everything runs on one clock `clk` at the link bit rate; the two major
// cycles are clock enables. The CAP programs the congram state registers,
// queues page (re)transmission requests, hands over and receives control
// cells, and gets page-complete and retransmission-request events. Event
// outputs are one-clock pulses. The block split follows the Axon paper; the
// single-clock scheme, interfaces and field formats are this design's own.
//
// Lint notes: rst_n also disables the assertions of ECD/DCD and P2S (the
// 'synchronous' use it reports is only that); hdr_v of HDD is not needed
// here because `hdr` stays valid for the whole cell; only some fields of
// the selected receive CSR are used on this path.
module axon_cmp
  import axon_pkg::*;
#(
  parameter int unsigned NCONG = 4,
  parameter int unsigned NPG   = 8,
  parameter int unsigned AW    = 20,
  parameter int unsigned RXT_LIMIT = 64,
  localparam int unsigned IW   = $clog2(NCONG)
) (
  input  logic            clk,
  input  logic            rst_n,
  // VHSI link (bit serial, NRZI)
  output logic            link_out,
  input  logic            link_in,
  // CAP: congram state registers and page requests
  input  logic            tx_we,
  input  logic            rx_we,
  input  logic [IW-1:0]   widx,
  input  tx_cfg_t         tx_wdata,
  input  rx_cfg_t         rx_wdata,
  input  logic            req_we,
  input  logic [IW-1:0]   req_idx,
  input  tx_req_t         req,
  // CAP: control cells out and in
  input  logic            ctl_tx_valid,
  input  logic [CELL_BYTES-3:0][7:0] ctl_tx_cell,
  output logic            ctl_tx_ack,
  output logic            ctl_rx_valid,
  output logic            ctl_rx_ok,
  output logic [CELL_BYTES-1:0][7:0] ctl_rx_cell,
  // CAP: events
  output logic            tx_page_end,
  output logic [IW-1:0]   tx_page_idx,
  output logic [15:0]     tx_page_j,
  output logic            pg_pres,
  output logic [7:0]      pg_idx,
  output logic [15:0]     pg_q,
  output logic [15:0]     pg_j,
  output logic            rq,
  output logic [7:0]      rq_idx,
  output logic [15:0]     rq_q,
  output logic [15:0]     rq_j,
  output logic [PKTS_PER_PAGE-1:0] rq_bits,
  output logic            ppl_ovf,
  output logic [31:0]     n_corrupt,
  output logic [31:0]     n_missing,
  input  logic            rxt_tick,
  input  logic            flush,
  input  logic [7:0]      flush_idx,
  // CMM sequential ports
  output logic            t_en,
  output logic [AW-1:0]   t_addr,
  input  logic [7:0]      t_rdata,
  output logic            r_we,
  output logic [AW-1:0]   r_addr,
  output logic [7:0]      r_wdata
);
  // ---------------- congram state registers ----------------
  tx_cfg_t        tx_cfg [NCONG];
  rx_cfg_t        rx_cfg [NCONG];
  tx_req_t        prim [NCONG], rex [NCONG];
  logic [NCONG-1:0] prim_pend, rex_pend;
  logic           clr_prim, clr_rex;
  logic [IW-1:0]  clr_idx;
  logic [15:0]    lk_c, lk_q;
  logic           lk_hit;
  logic [IW-1:0]  lk_idx;

  axon_csr #(.NCONG(NCONG)) u_csr (
    .clk, .rst_n, .tx_we, .rx_we, .widx, .tx_wdata, .rx_wdata,
    .req_we, .req_idx, .req, .clr_prim, .clr_rex, .clr_idx,
    .tx_cfg, .rx_cfg, .prim, .rex, .prim_pend, .rex_pend,
    .lk_c, .lk_q, .lk_hit, .lk_idx
  );

  // ---------------- transmit ----------------
  logic [$clog2(W)-1:0] div;
  logic                 ce_tx;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) div <= '0;
    else        div <= div + 1'b1;
  assign ce_tx = (div == '1);

  logic             slot;
  logic [NCONG-1:0] elig;
  logic [15:0]      ipg [NCONG];
  always_comb for (int n = 0; n < NCONG; n++) ipg[n] = tx_cfg[n].ipg;

  axon_rct #(.NCONG(NCONG)) u_rct (
    .clk, .rst_n, .ce(ce_tx), .page_end(tx_page_end), .page_idx(tx_page_idx),
    .ipg, .slot, .elig
  );

  cbyte_t      s_seq, s_ckg, s_ecd, s_ecr;
  logic        cur_swap, cur_crypt;
  logic [15:0] cur_key;

  axon_mpx_tx #(.NCONG(NCONG), .AW(AW)) u_mpx (
    .clk, .rst_n, .ce(ce_tx), .slot, .elig, .tx_cfg, .prim, .rex, .prim_pend, .rex_pend,
    .ctl_valid(ctl_tx_valid), .ctl_cell(ctl_tx_cell), .ctl_ack(ctl_tx_ack),
    .t_en, .t_addr, .t_rdata, .clr_prim, .clr_rex, .clr_idx,
    .page_end(tx_page_end), .page_idx(tx_page_idx), .page_j(tx_page_j),
    .out(s_seq), .cur_swap, .cur_crypt, .cur_key
  );

  // The cell's encode/encrypt settings follow it down the pipe: a cell still
  // in ECD/ECR must not see the settings of the next cell, chosen at the
  // next slot. Six major cycles of delay put the change after the last data
  // byte of one cell and before the first data byte of the next.
  localparam int unsigned CFG_DLY = 6;
  logic [17:0] cfg_pipe [CFG_DLY];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < CFG_DLY; n++) cfg_pipe[n] <= '0;
    end else if (ce_tx) begin
      cfg_pipe[0] <= {cur_swap, cur_crypt, cur_key};
      for (int n = 1; n < CFG_DLY; n++) cfg_pipe[n] <= cfg_pipe[n-1];
    end
  end

  axon_ckg      u_ckg (.clk, .rst_n, .ce(ce_tx), .in(s_seq), .out(s_ckg));
  axon_byteswap u_ecd (.clk, .rst_n, .ce(ce_tx), .swap(cfg_pipe[CFG_DLY-1][17]), .in(s_ckg), .out(s_ecd));
  axon_cipher   u_ecr (.clk, .rst_n, .ce(ce_tx), .crypt(cfg_pipe[CFG_DLY-1][16]),
                       .key(cfg_pipe[CFG_DLY-1][15:0]), .in(s_ecd), .out(s_ecr));

  logic sbit, smark;
  axon_p2s u_p2s (.clk, .rst_n, .ce(ce_tx), .in(s_ecr), .sbit, .smark);
  axon_xmt u_xmt (.clk, .rst_n, .sbit, .smark, .line(link_out));

  // ---------------- receive ----------------
  logic   dbit, dval, dfirst, ce_rx;
  cbyte_t s_s2p, s_dcr, s_dcd;

  axon_rcv u_rcv (.clk, .rst_n, .line(link_in), .dbit, .dval, .dfirst);
  axon_s2p u_s2p (.clk, .rst_n, .dbit, .dval, .dfirst, .ce(ce_rx), .out(s_s2p));

  hdr_t    hdr;
  logic    hdr_v;
  rx_cfg_t rcfg;
  axon_hdd #(.NCONG(NCONG)) u_hdd (
    .clk, .rst_n, .ce(ce_rx), .in(s_s2p), .lk_c, .lk_q, .lk_hit, .lk_idx,
    .lk_cfg(rx_cfg[lk_idx]), .hdr, .hdr_v
  );
  assign rcfg = rx_cfg[IW'(hdr.idx)];

  logic rx_data;
  assign rx_data = !hdr.ctrl;
  axon_cipher   u_dcr (.clk, .rst_n, .ce(ce_rx), .crypt(rx_data && rcfg.crypt), .key(rcfg.key),
                       .in(s_s2p), .out(s_dcr));
  axon_byteswap u_dcd (.clk, .rst_n, .ce(ce_rx), .swap(rx_data && rcfg.swap), .in(s_dcr), .out(s_dcd));

  logic ck_done, ck_ok, cell_end;
  axon_ckc u_ckc (.clk, .rst_n, .ce(ce_rx), .in(s_dcd), .done(ck_done), .ok(ck_ok));
  assign cell_end = ce_rx && ck_done;

  axon_add #(.AW(AW)) u_add (
    .clk, .rst_n, .ce(ce_rx), .in(s_dcd), .hdr, .base(rcfg.base),
    .we(r_we), .addr(r_addr), .wdata(r_wdata)
  );

  // control cells: captured whole and handed to the CAP with the checksum verdict
  logic [5:0] coff_prev, coff;
  logic [CELL_BYTES-1:0][7:0] cap_buf;
  assign coff = (s_dcd.sop || coff_prev == 6'd63) ? 6'd0 : coff_prev + 6'd1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coff_prev <= 6'd63; cap_buf <= '0;
      ctl_rx_valid <= 1'b0; ctl_rx_ok <= 1'b0; ctl_rx_cell <= '0;
    end else begin
      ctl_rx_valid <= 1'b0;
      if (ce_rx && s_dcd.v) begin
        coff_prev <= coff;
        if (coff < 6'(CELL_BYTES)) cap_buf[coff] <= s_dcd.d;
      end
      if (cell_end && hdr.ctrl) begin
        ctl_rx_valid <= 1'b1;
        ctl_rx_ok    <= ck_ok;
        ctl_rx_cell  <= cap_buf;
      end
    end
  end

  // ---------------- packet and error control ----------------
  logic        arr, arr_ok;
  logic [7:0]  arr_idx;
  logic [15:0] arr_q, arr_j;
  logic [4:0]  arr_i;
  logic        fire, alloc;
  logic [$clog2(NPG)-1:0] fire_ent, alloc_ent;
  logic [NPG-1:0] ent_v;
  logic [7:0]  ent_idx [NPG];
  logic [15:0] ent_q [NPG], ent_j [NPG];
  logic [PKTS_PER_PAGE-1:0] ent_pres [NPG];

  axon_pel #(.NPG(NPG)) u_pel (
    .clk, .rst_n,
    .cell_done(cell_end && !hdr.ctrl && hdr.inb), .cell_ok(ck_ok),
    .cell_idx(hdr.idx), .cell_q(hdr.q), .cell_j(hdr.j), .cell_i(hdr.i[4:0]),
    .arr, .arr_ok, .arr_idx, .arr_q, .arr_j, .arr_i,
    .fire, .fire_ent, .ent_idx, .ent_q, .ent_j, .ent_pres,
    .rq, .rq_idx, .rq_q, .rq_j, .rq_bits, .n_corrupt, .n_missing
  );

  axon_ppl #(.NPG(NPG)) u_ppl (
    .clk, .rst_n, .arr, .arr_ok, .arr_idx, .arr_q, .arr_j, .arr_i,
    .flush, .flush_idx,
    .pres(pg_pres), .pres_idx(pg_idx), .pres_q(pg_q), .pres_j(pg_j), .ovf(ppl_ovf),
    .alloc, .alloc_ent, .ent_v, .ent_idx, .ent_q, .ent_j, .ent_pres
  );

  axon_rxt #(.NPG(NPG), .LIMIT(RXT_LIMIT)) u_rxt (
    .clk, .rst_n, .arr, .arr_idx, .tick(rxt_tick), .alloc, .alloc_ent,
    .ent_v, .ent_idx, .fire, .fire_ent
  );
endmodule
