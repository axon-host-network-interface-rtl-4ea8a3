// RXT: retransmit timers.
//
// One timer per partly received page (per PPL entry). Following the
// document's counter scheme, a timer advances on every expected packet
// arrival of the same congram (`arr`, any page) and also on each `tick`
// from the CAP, which covers the end of a transfer when no packets follow.
// It restarts when its entry is allocated. When it reaches LIMIT the page's
// missing packets are due for a retransmission request: `fire` pulses with
// the entry and the timer restarts, so the request repeats until the page
// is complete. Timers are kept at page granularity, one of the
// granularities the Axon paper lists. One timeout is reported per clock; the
// lowest entry goes first. LIMIT is not given by the Axon paper; two pages of
// packets (64) is assumed.
module axon_rxt
  import axon_pkg::*;
#(
  parameter int unsigned NPG   = 8,
  parameter int unsigned LIMIT = 64,
  localparam int unsigned EW   = $clog2(NPG)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           arr,
  input  logic [7:0]     arr_idx,
  input  logic           tick,
  input  logic           alloc,
  input  logic [EW-1:0]  alloc_ent,
  input  logic [NPG-1:0] ent_v,
  input  logic [7:0]     ent_idx [NPG],
  output logic           fire,
  output logic [EW-1:0]  fire_ent
);
  localparam int unsigned CW = $clog2(LIMIT + 1);
  logic [CW-1:0] age [NPG];
  logic          due;
  logic [EW-1:0] due_e;

  always_comb begin
    due = 1'b0; due_e = '0;
    for (int n = NPG - 1; n >= 0; n--)
      if (ent_v[n] && age[n] >= CW'(LIMIT)) begin
        due = 1'b1; due_e = EW'(n);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < NPG; n++) age[n] <= '0;
      fire <= 1'b0; fire_ent <= '0;
    end else begin
      fire     <= due;
      fire_ent <= due_e;
      for (int n = 0; n < NPG; n++) begin
        if ((alloc && alloc_ent == EW'(n)) || !ent_v[n] || (due && due_e == EW'(n)))
          age[n] <= '0;
        else if (((arr && ent_idx[n] == arr_idx) || tick) && age[n] < CW'(LIMIT))
          age[n] <= age[n] + 1'b1;
      end
    end
  end
endmodule
