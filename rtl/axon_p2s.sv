// P2S: parallel-to-serial conversion of the transmit pipe.
//
// Runs at the minor cycle (one clock per link bit). `ce` marks the clock on
// which the major-cycle pipe presents a new byte; it must come every W
// clocks. The byte is sent MSB first on the following W clocks; a missing
// byte (in.v = 0) sends zeros. `smark` is high during the last bit of the
// first byte of a cell, which the XMT stage uses to place its framing bit.
//
// Lint notes that rst_n is used both as an asynchronous reset and
// synchronously: the synchronous use is only the `disable iff` of the
// assertion, not logic.
module axon_p2s
  import axon_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   ce,
  input  cbyte_t in,
  output logic   sbit,
  output logic   smark
);
  logic [W-1:0]         sh;
  logic [$clog2(W)-1:0] cnt;
  logic                 first;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; cnt <= '0; first <= 1'b0;
    end else if (ce) begin
      sh    <= in.v ? in.d : '0;
      first <= in.v & in.sop;
      cnt   <= '0;
    end else begin
      sh  <= sh << 1;
      cnt <= cnt + 1'b1;
    end
  end

  assign sbit  = sh[W-1];
  assign smark = first && (cnt == $clog2(W)'(W - 1));

  property p_ce_period;
    @(posedge clk) disable iff (!rst_n) ce |=> !ce [*W-1] ##1 ce;
  endproperty
  a_ce_period: assert property (p_ce_period);
endmodule
