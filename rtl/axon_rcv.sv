// RCV: receive side of the line code.
//
// Undoes the NRZI line code (a bit is 1 where the line changed) and finds
// the cell framing: while hunting, the first 1 received is the end of the
// preamble, and the next CELL_BYTES*W bits are the cell body, which is
// passed to S2P with `dval` (and `dfirst` on its first bit). The bit clock
// itself is assumed to come from the optical receiver's clock recovery.
//
// Latency: two bit clocks from `line` to `dbit`.
module axon_rcv
  import axon_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic line,
  output logic dbit,
  output logic dval,
  output logic dfirst
);
  localparam int unsigned NBITS = CELL_BYTES * W;
  logic        prev, rbit, hunt;
  logic [$clog2(NBITS):0] left;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev <= 1'b0; rbit <= 1'b0; hunt <= 1'b1; left <= '0;
      dbit <= 1'b0; dval <= 1'b0; dfirst <= 1'b0;
    end else begin
      prev   <= line;
      rbit   <= line ^ prev;
      dbit   <= rbit;
      dval   <= !hunt;
      dfirst <= !hunt && left == ($clog2(NBITS)+1)'(NBITS);
      if (hunt) begin
        if (rbit) begin
          hunt <= 1'b0;
          left <= ($clog2(NBITS)+1)'(NBITS);
        end
      end else begin
        left <= left - 1'b1;
        if (left == 1) hunt <= 1'b1;
      end
    end
  end
endmodule
