// Axon host-network interface (memory interface architecture).
//
// The top level: one communications processor (CMP) attached to the
// sequential ports of its communications memory module (CMM). The host
// reaches the CMM through the random access port like any memory bank; the
// CMP assist processor (CAP) drives the control ports; the optical
// transmitter and receiver attach to the bit-serial link pins. Packets move
// between the link and the CMM without being stored anywhere in between.
//
// All logic runs on `clk`, one cycle per link bit (1 ns at 1 Gb/s); the
// CMP's octet-wide pipes advance every 8 clocks (8 ns, the Axon paper's cycle
// time for an 8-bit datapath at 1 Gb/s). See axon_cmp for the CAP ports.
//
// Lint notes that rst_n is also used synchronously: that is only the
// `disable iff` of assertions inside the CMP. Six output bits are constant
// in synthesis: the upper bits of 8-bit congram index fields, which carry a
// 2-bit index at NCONG = 4.
module axon_nif
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
  output logic            link_out,
  input  logic            link_in,
  // host random access port of the CMM
  input  logic            h_en,
  input  logic            h_we,
  input  logic [AW-1:0]   h_addr,
  input  logic [7:0]      h_wdata,
  output logic [7:0]      h_rdata,
  // CAP
  input  logic            tx_we,
  input  logic            rx_we,
  input  logic [IW-1:0]   widx,
  input  tx_cfg_t         tx_wdata,
  input  rx_cfg_t         rx_wdata,
  input  logic            req_we,
  input  logic [IW-1:0]   req_idx,
  input  tx_req_t         req,
  input  logic            ctl_tx_valid,
  input  logic [CELL_BYTES-3:0][7:0] ctl_tx_cell,
  output logic            ctl_tx_ack,
  output logic            ctl_rx_valid,
  output logic            ctl_rx_ok,
  output logic [CELL_BYTES-1:0][7:0] ctl_rx_cell,
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
  input  logic [7:0]      flush_idx
);
  logic          t_en, r_we;
  logic [AW-1:0] t_addr, r_addr;
  logic [7:0]    t_rdata, r_wdata;

  axon_cmp #(.NCONG(NCONG), .NPG(NPG), .AW(AW), .RXT_LIMIT(RXT_LIMIT)) u_cmp (
    .clk, .rst_n, .link_out, .link_in,
    .tx_we, .rx_we, .widx, .tx_wdata, .rx_wdata, .req_we, .req_idx, .req,
    .ctl_tx_valid, .ctl_tx_cell, .ctl_tx_ack, .ctl_rx_valid, .ctl_rx_ok, .ctl_rx_cell,
    .tx_page_end, .tx_page_idx, .tx_page_j, .pg_pres, .pg_idx, .pg_q, .pg_j,
    .rq, .rq_idx, .rq_q, .rq_j, .rq_bits, .ppl_ovf, .n_corrupt, .n_missing,
    .rxt_tick, .flush, .flush_idx,
    .t_en, .t_addr, .t_rdata, .r_we, .r_addr, .r_wdata
  );

  axon_cmm #(.AW(AW)) u_cmm (
    .clk, .h_en, .h_we, .h_addr, .h_wdata, .h_rdata,
    .t_en, .t_addr, .t_rdata, .r_we, .r_addr, .r_wdata
  );
endmodule
