// HDD: header decode.
//
// Watches the receive stream right after S2P and collects the header bytes
// of each cell. On the last header byte it decides the cell's type
// (control or data, from the ALTP type byte), looks the congram and request
// ids up in the receive CSRs (through the `lk_*` port), checks the segment
// index k against |g| and the page index j against the pages allocated for
// the request, and registers the result in `hdr`. `hdr` is valid from the
// major cycle after the last header byte until the next cell's header is
// complete, which covers the rest of the cell through the later stages.
// A control cell is also one whose congram is unknown; both go to the CAP.
//
// Only the bounds fields of the receive CSR are read here; lint reports the
// others as unused.
module axon_hdd
  import axon_pkg::*;
#(
  parameter int unsigned NCONG = 4,
  localparam int unsigned IW   = $clog2(NCONG)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ce,
  input  cbyte_t        in,
  output logic [15:0]   lk_c,
  output logic [15:0]   lk_q,
  input  logic          lk_hit,
  input  logic [IW-1:0] lk_idx,
  input  rx_cfg_t       lk_cfg,   // receive CSR entry lk_idx
  output hdr_t          hdr,
  output logic          hdr_v     // pulses with the new hdr
);
  logic [5:0]  off_prev, off;
  logic [7:0]  hb [OFF_DATA];
  logic [15:0] j_new;
  logic        ctrl_new;

  always_comb begin
    off      = (in.sop || off_prev == 6'd63) ? 6'd0 : off_prev + 6'd1;
    lk_c     = {hb[OFF_C], hb[OFF_C+1]};
    lk_q     = {hb[OFF_Q], hb[OFF_Q+1]};
    j_new    = {hb[OFF_J], hb[OFF_J+1]};
    ctrl_new = (hb[OFF_ATYPE] != ATYPE_DATA) || !lk_hit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      off_prev <= 6'd63;
      for (int n = 0; n < OFF_DATA; n++) hb[n] <= '0;
      hdr   <= '0;
      hdr_v <= 1'b0;
    end else if (ce) begin
      hdr_v <= 1'b0;
      if (in.v) begin
        off_prev <= off;
        if (off < 6'(OFF_DATA - 1)) hb[5'(off)] <= in.d;
        if (off == 6'(OFF_DATA - 1)) begin
          hdr_v    <= 1'b1;
          hdr.ctrl <= ctrl_new;
          hdr.hit  <= lk_hit;
          hdr.idx  <= 8'(lk_idx);
          hdr.q    <= lk_q;
          hdr.k    <= hb[OFF_K];
          hdr.j    <= j_new;
          hdr.i    <= {hb[OFF_I], in.d};
          hdr.inb  <= hb[OFF_K] < lk_cfg.g && j_new < lk_cfg.sk &&
                      {hb[OFF_I], in.d} < 16'(PKTS_PER_PAGE);
        end
      end
    end
  end
endmodule
