// CSR: congram state registers.
//
// One transmit and one receive register set per active congram, so the CMP
// can switch between multiplexed congrams from one packet to the next
// without reloading anything. The CAP writes whole entries (`tx_we`,
// `rx_we`). Each transmit entry also holds two page-request slots, filled by
// `req_we`: a primary slot for pages of the original transfer and a
// retransmission slot; the transmit sequencer empties a slot when it starts
// the page (`clr_prim`, `clr_rex`). A request written to a full slot
// replaces it.
//
// The receive set is searched associatively by congram and request id
// (`lk_c`, `lk_q`); `lk_hit`/`lk_idx` give the matching entry in the same
// cycle. This is the receive half of the multiplexing control, which
// selects the CSR of an arriving packet.
//
// The number of entries (NCONG) is not given by the Axon paper; 4 is assumed.
module axon_csr
  import axon_pkg::*;
#(
  parameter int unsigned NCONG = 4,
  localparam int unsigned IW   = $clog2(NCONG)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           tx_we,
  input  logic           rx_we,
  input  logic [IW-1:0]  widx,
  input  tx_cfg_t        tx_wdata,
  input  rx_cfg_t        rx_wdata,
  input  logic           req_we,
  input  logic [IW-1:0]  req_idx,
  input  tx_req_t        req,
  input  logic           clr_prim,
  input  logic           clr_rex,
  input  logic [IW-1:0]  clr_idx,
  output tx_cfg_t        tx_cfg   [NCONG],
  output rx_cfg_t        rx_cfg   [NCONG],
  output tx_req_t        prim     [NCONG],
  output tx_req_t        rex      [NCONG],
  output logic [NCONG-1:0] prim_pend,
  output logic [NCONG-1:0] rex_pend,
  input  logic [15:0]    lk_c,
  input  logic [15:0]    lk_q,
  output logic           lk_hit,
  output logic [IW-1:0]  lk_idx
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < NCONG; n++) begin
        tx_cfg[n] <= '0; rx_cfg[n] <= '0; prim[n] <= '0; rex[n] <= '0;
      end
      prim_pend <= '0;
      rex_pend  <= '0;
    end else begin
      if (tx_we) tx_cfg[widx] <= tx_wdata;
      if (rx_we) rx_cfg[widx] <= rx_wdata;
      if (clr_prim) prim_pend[clr_idx] <= 1'b0;
      if (clr_rex)  rex_pend[clr_idx]  <= 1'b0;
      if (req_we) begin
        if (req.rexmit) begin
          rex[req_idx] <= req; rex_pend[req_idx] <= 1'b1;
        end else begin
          prim[req_idx] <= req; prim_pend[req_idx] <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    lk_hit = 1'b0;
    lk_idx = '0;
    for (int n = NCONG - 1; n >= 0; n--)
      if (rx_cfg[n].en && rx_cfg[n].c == lk_c && rx_cfg[n].q == lk_q) begin
        lk_hit = 1'b1;
        lk_idx = IW'(n);
      end
  end
endmodule
