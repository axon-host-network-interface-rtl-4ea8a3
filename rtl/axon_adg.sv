// ADG: address generate for the transmit side.
//
// Forms the CMM read address of each data byte of a packet. On `load` the
// address becomes the page base plus 32 times the packet index (packets of
// a page lie back to back in the CMM); each `step` advances it by one byte.
module axon_adg
  import axon_pkg::*;
#(
  parameter int unsigned AW = 20
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [AW-1:0] base,
  input  logic [4:0]    pkt,
  input  logic          step,
  output logic [AW-1:0] addr
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    addr <= '0;
    else if (load) addr <= base + (AW'(pkt) << $clog2(DATA_BYTES));
    else if (step) addr <= addr + 1'b1;
  end
endmodule
