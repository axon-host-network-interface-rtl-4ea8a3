// S2P: serial-to-parallel conversion of the receive pipe.
//
// Assembles the cell bits from RCV into W-bit words and, together with RCV,
// derives the clock of the receive pipe: `ce` pulses once every W bit clocks,
// re-phased at the first bit of each cell, and the receive pipe stages
// advance only on it. Outside a cell `ce` keeps running with out.v = 0 so
// the pipe drains.
//
// Timing: out and ce are registered; ce is high for one clock, in the clock
// after the last bit of a word arrived.
//
// The oldest bit of the shift register leaves with the byte; lint reports
// it as unused.
module axon_s2p
  import axon_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   dbit,
  input  logic   dval,
  input  logic   dfirst,
  output logic   ce,
  output cbyte_t out
);
  logic [W-1:0]         sh, nsh;
  logic [$clog2(W)-1:0] cnt, pos;
  logic                 sop_pend, nsop;

  always_comb begin
    pos  = (dval && dfirst) ? '0 : cnt;
    nsh  = {sh[W-2:0], dbit};
    nsop = (dval && dfirst) ? 1'b1 : sop_pend;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; cnt <= '0; sop_pend <= 1'b0; ce <= 1'b0; out <= '0;
    end else begin
      sh  <= nsh;
      cnt <= pos + 1'b1;
      ce  <= (pos == $clog2(W)'(W - 1));
      if (pos == $clog2(W)'(W - 1)) begin
        out      <= '{v: dval, sop: dval & nsop, d: nsh};
        sop_pend <= 1'b0;
      end else begin
        sop_pend <= nsop;
      end
    end
  end
endmodule
