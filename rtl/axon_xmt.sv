// XMT: line coding and framing for the optical transmitter.
//
// The Axon paper leaves the line code open; this design uses NRZI (the line
// toggles for a 1) with an idle line of zeros, and frames every cell with a
// one-byte preamble 00000001: the only 1 before the cell body tells the
// receiver where the cell starts. The cell bits from P2S are delayed by
// W bit times so the preamble fits in the idle byte that rate control
// leaves before every cell; the preamble 1 is sent when P2S signals the
// last bit of the cell's first byte (`smark`).
//
// Latency: W + 1 bit clocks from `sbit` to the line.
module axon_xmt
  import axon_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic sbit,
  input  logic smark,
  output logic line
);
  logic [W-1:0] dly;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dly  <= '0;
      line <= 1'b0;
    end else begin
      dly  <= {dly[W-2:0], sbit};
      line <= line ^ (dly[W-1] | smark);
    end
  end
endmodule
