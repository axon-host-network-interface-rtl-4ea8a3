// RXA: retransmit address - which packets of a page to send.
//
// Holds the bitmap of packets still to send for the page in progress. A full
// page is the all-ones map; a retransmission request carries the map the
// receiver built from its missing and corrupted packets. `idx` is the lowest
// packet still to send; `take` removes it. When `load` is high the new map
// replaces the old one and `idx` already refers to it, so load and take may
// come together. Together with ADG this forms the CMM address of each packet
// (page base + 32 * idx).
module axon_rxa
  import axon_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,
  input  logic [PKTS_PER_PAGE-1:0] lbits,
  input  logic                  take,
  output logic                  has,
  output logic [4:0]            idx,
  output logic                  last   // idx is the only packet left
);
  logic [PKTS_PER_PAGE-1:0] rem, cur;

  always_comb begin
    cur = load ? lbits : rem;
    idx = '0;
    for (int n = PKTS_PER_PAGE - 1; n >= 0; n--) if (cur[n]) idx = 5'(n);
    has  = |cur;
    last = has && ((cur & (cur - 1'b1)) == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rem <= '0;
    else if (load || take) rem <= (take && has) ? (cur & ~(PKTS_PER_PAGE'(1) << idx)) : cur;
  end
endmodule
