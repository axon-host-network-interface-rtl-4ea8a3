// RCT: rate control.
//
// Cells leave at the peak rate, one per CELL_SLOT major cycles (a 53-byte
// cell plus the framing byte); `slot` marks the major cycle in which the
// sequencer may start the next one. A congram's average rate comes from its
// inter-page gap: after a page of congram n is finished (`page_end`), the
// congram is held back (`page_end` may come in any clock; the gap counts
// major cycles) (`elig[n]` low) for `ipg[n]` major cycles. This is the
// page-burst form of rate control the Axon paper suggests (a page-length
// burst at peak rate and an inter-page gap that sets the average rate); the
// gap counter itself is this design's choice.
module axon_rct
  import axon_pkg::*;
#(
  parameter int unsigned NCONG = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce,
  input  logic              page_end,
  input  logic [$clog2(NCONG)-1:0] page_idx,
  input  logic [15:0]       ipg [NCONG],
  output logic              slot,
  output logic [NCONG-1:0]  elig
);
  logic [5:0]  sc;
  logic [15:0] gap [NCONG];

  assign slot = (sc == 6'd0);
  always_comb for (int n = 0; n < NCONG; n++) elig[n] = (gap[n] == 16'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sc <= '0;
      for (int n = 0; n < NCONG; n++) gap[n] <= '0;
    end else begin
      if (ce) sc <= (sc == 6'(CELL_SLOT - 1)) ? 6'd0 : sc + 6'd1;
      for (int n = 0; n < NCONG; n++) begin
        if (page_end && page_idx == $clog2(NCONG)'(n)) gap[n] <= ipg[n];
        else if (ce && gap[n] != 16'd0) gap[n] <= gap[n] - 16'd1;
      end
    end
  end
endmodule
