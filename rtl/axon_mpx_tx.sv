// MPX (transmit): congram multiplexing and packet sequencing.
//
// Decides, once per cell slot given by rate control, what the transmit pipe
// sends next, and produces that cell byte by byte (one per major cycle,
// 53 bytes after the slot's idle byte):
//   1. a control cell the CAP has handed over (`ctl_valid`), first;
//   2. otherwise the next packet of the page in progress;
//   3. otherwise a new page - a hardware context switch to another congram.
//      Among enabled congrams whose rate control allows a new page, pending
//      retransmission pages come before primary pages (preemption at page
//      granularity), and congrams are served round robin.
// Pages go out as bursts of consecutive cells; only then may the context
// switch. The packets of a page are those set in its request bitmap (all
// 32 for a primary page), tracked by RXA; ADG forms their CMM addresses and
// HDB their headers. Data bytes are read from the CMM one major cycle
// ahead (`t_en`/`t_addr`, data back on `t_rdata` before the next enable).
// The trailer bytes are left as zeros for CKG to fill. `cur_*` hold the
// current cell's encode/encrypt settings for the later pipe stages.
// The arbitration order and request slots are this design's choices.
//
// Lint notes unused signals: RXA's `has` is not needed because a page in
// progress always has a packet left, the request's retransmission flag is
// implied by the slot it came from, and the base is cut to the CMM address
// width.
module axon_mpx_tx
  import axon_pkg::*;
#(
  parameter int unsigned NCONG = 4,
  parameter int unsigned AW    = 20,
  localparam int unsigned IW   = $clog2(NCONG)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ce,
  input  logic            slot,
  input  logic [NCONG-1:0] elig,
  input  tx_cfg_t         tx_cfg [NCONG],
  input  tx_req_t         prim   [NCONG],
  input  tx_req_t         rex    [NCONG],
  input  logic [NCONG-1:0] prim_pend,
  input  logic [NCONG-1:0] rex_pend,
  input  logic            ctl_valid,
  input  logic [CELL_BYTES-3:0][7:0] ctl_cell,   // ctl_cell[n] is cell byte n
  output logic            ctl_ack,
  output logic            t_en,
  output logic [AW-1:0]   t_addr,
  input  logic [7:0]      t_rdata,
  output logic            clr_prim,
  output logic            clr_rex,
  output logic [IW-1:0]   clr_idx,
  output logic            page_end,
  output logic [IW-1:0]   page_idx,
  output logic [15:0]     page_j,
  output cbyte_t          out,
  output logic            cur_swap,
  output logic            cur_crypt,
  output logic [15:0]     cur_key
);
  typedef enum logic [1:0] {S_IDLE, S_DATA, S_CTRL} state_t;

  state_t        st;
  logic [5:0]    pos;
  logic [IW-1:0] cur, rr;
  logic [15:0]   cur_j;
  logic [4:0]    cur_i;
  logic          page_act, last_cell;
  logic [CELL_BYTES-3:0][7:0] ctl_buf;

  // new-page choice
  logic          cand, cand_rex;
  logic [IW-1:0] cand_idx;
  always_comb begin
    cand = 1'b0; cand_rex = 1'b0; cand_idx = '0;
    for (int s = NCONG - 1; s >= 0; s--) begin
      automatic logic [IW-1:0] n = IW'(rr + IW'(s));
      if (tx_cfg[n].en && elig[n] && prim_pend[n] && |prim[n].bits) begin
        cand = 1'b1; cand_idx = n;
      end
    end
    for (int s = NCONG - 1; s >= 0; s--) begin
      automatic logic [IW-1:0] n = IW'(rr + IW'(s));
      if (tx_cfg[n].en && elig[n] && rex_pend[n] && |rex[n].bits) begin
        cand = 1'b1; cand_rex = 1'b1; cand_idx = n;
      end
    end
  end

  logic    start_ctl, start_cont, start_new, start_data;
  tx_req_t nreq;
  always_comb begin
    start_ctl  = ce && slot && st == S_IDLE && ctl_valid;
    start_cont = ce && slot && st == S_IDLE && !ctl_valid && page_act;
    start_new  = ce && slot && st == S_IDLE && !ctl_valid && !page_act && cand;
    start_data = start_cont || start_new;
    nreq       = cand_rex ? rex[cand_idx] : prim[cand_idx];
  end

  // RXA: packets left in the page; ADG: CMM addresses
  logic       rxa_has, rxa_last;
  logic [4:0] rxa_idx;
  logic [31:0] base_q;
  axon_rxa u_rxa (
    .clk, .rst_n,
    .load (start_new), .lbits(nreq.bits), .take(start_data),
    .has(rxa_has), .idx(rxa_idx), .last(rxa_last)
  );

  logic [31:0] adg_base;
  assign adg_base = start_new ? nreq.base : base_q;
  axon_adg #(.AW(AW)) u_adg (
    .clk, .rst_n,
    .load (start_data), .base(AW'(adg_base)), .pkt(rxa_idx),
    .step (ce && st == S_DATA && pos >= 6'(OFF_DATA) && pos < 6'(OFF_CK)),
    .addr (t_addr)
  );
  assign t_en = (st == S_DATA) && pos >= 6'(OFF_DATA) && pos < 6'(OFF_CK);

  logic [7:0] hdr_byte;
  axon_hdb u_hdb (.cfg(tx_cfg[cur]), .j(cur_j), .i(cur_i), .off(pos), .d(hdr_byte));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; pos <= '0; cur <= '0; rr <= '0; cur_j <= '0; cur_i <= '0;
      page_act <= 1'b0; last_cell <= 1'b0; base_q <= '0; ctl_buf <= '0;
      ctl_ack <= 1'b0; clr_prim <= 1'b0; clr_rex <= 1'b0; clr_idx <= '0;
      page_end <= 1'b0; page_idx <= '0; page_j <= '0; out <= '0;
      cur_swap <= 1'b0; cur_crypt <= 1'b0; cur_key <= '0;
    end else begin
      ctl_ack  <= 1'b0;
      clr_prim <= 1'b0;
      clr_rex  <= 1'b0;
      page_end <= 1'b0;
      if (ce) begin
        out <= '0;
        unique case (st)
          S_IDLE: begin
            pos <= '0;
            if (start_ctl) begin
              st        <= S_CTRL;
              ctl_buf   <= ctl_cell;
              ctl_ack   <= 1'b1;
              cur_swap  <= 1'b0;
              cur_crypt <= 1'b0;
            end else if (start_data) begin
              st        <= S_DATA;
              cur_i     <= rxa_idx;
              last_cell <= rxa_last;
              page_act  <= !rxa_last;
              if (start_new) begin
                cur      <= cand_idx;
                rr       <= IW'(cand_idx + 1'b1);
                cur_j    <= nreq.j;
                base_q   <= nreq.base;
                clr_idx  <= cand_idx;
                clr_prim <= !cand_rex;
                clr_rex  <= cand_rex;
                cur_swap  <= tx_cfg[cand_idx].swap;
                cur_crypt <= tx_cfg[cand_idx].crypt;
                cur_key   <= tx_cfg[cand_idx].key;
              end
            end
          end
          S_DATA, S_CTRL: begin
            out.v   <= 1'b1;
            out.sop <= (pos == 6'd0);
            if (st == S_CTRL) out.d <= (pos < 6'(OFF_CK)) ? ctl_buf[pos] : 8'h00;
            else if (pos < 6'(OFF_DATA)) out.d <= hdr_byte;
            else if (pos < 6'(OFF_CK))   out.d <= t_rdata;
            else                         out.d <= 8'h00;
            pos <= pos + 6'd1;
            if (pos == 6'(CELL_BYTES - 1)) begin
              st <= S_IDLE;
              if (st == S_DATA && last_cell) begin
                page_end <= 1'b1;
                page_idx <= cur;
                page_j   <= cur_j;
              end
            end
          end
          default: st <= S_IDLE;
        endcase
      end
    end
  end
endmodule
