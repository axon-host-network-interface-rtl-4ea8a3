// PEL: packet error logic.
//
// Sits between checksum compare and the presence logic. Every data packet
// that finished (`cell_done`) is passed on to the PPL with its checksum
// verdict, so a corrupted packet is invalidated there; corrupted packets are
// also counted (`n_corrupt`). When a retransmit timer fires for a page, PEL
// builds the retransmit packet bit map of that page - the packets not
// present, whether missing or corrupted - and offers it to the CAP as a
// retransmission request (`rq`, with congram, request, page and map),
// counting the missing packets in `n_missing`. The CAP turns it into a
// retransmit-packets control packet.
module axon_pel
  import axon_pkg::*;
#(
  parameter int unsigned NPG = 8,
  localparam int unsigned EW = $clog2(NPG)
) (
  input  logic          clk,
  input  logic          rst_n,
  // from checksum compare and header decode
  input  logic          cell_done,
  input  logic          cell_ok,
  input  logic [7:0]    cell_idx,
  input  logic [15:0]   cell_q,
  input  logic [15:0]   cell_j,
  input  logic [4:0]    cell_i,
  // to the PPL
  output logic          arr,
  output logic          arr_ok,
  output logic [7:0]    arr_idx,
  output logic [15:0]   arr_q,
  output logic [15:0]   arr_j,
  output logic [4:0]    arr_i,
  // from the timers and the PPL entries
  input  logic          fire,
  input  logic [EW-1:0] fire_ent,
  input  logic [7:0]    ent_idx  [NPG],
  input  logic [15:0]   ent_q    [NPG],
  input  logic [15:0]   ent_j    [NPG],
  input  logic [PKTS_PER_PAGE-1:0] ent_pres [NPG],
  // retransmission request to the CAP
  output logic          rq,
  output logic [7:0]    rq_idx,
  output logic [15:0]   rq_q,
  output logic [15:0]   rq_j,
  output logic [PKTS_PER_PAGE-1:0] rq_bits,
  output logic [31:0]   n_corrupt,
  output logic [31:0]   n_missing
);
  assign arr     = cell_done;
  assign arr_ok  = cell_ok;
  assign arr_idx = cell_idx;
  assign arr_q   = cell_q;
  assign arr_j   = cell_j;
  assign arr_i   = cell_i;

  logic [PKTS_PER_PAGE-1:0] miss;
  assign miss = ~ent_pres[fire_ent];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rq <= 1'b0; rq_idx <= '0; rq_q <= '0; rq_j <= '0; rq_bits <= '0;
      n_corrupt <= '0; n_missing <= '0;
    end else begin
      rq <= 1'b0;
      if (cell_done && !cell_ok) n_corrupt <= n_corrupt + 1'b1;
      if (fire) begin
        rq        <= 1'b1;
        rq_idx    <= ent_idx[fire_ent];
        rq_q      <= ent_q[fire_ent];
        rq_j      <= ent_j[fire_ent];
        rq_bits   <= miss;
        n_missing <= n_missing + 32'($countones(miss));
      end
    end
  end
endmodule
