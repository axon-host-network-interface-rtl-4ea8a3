// CMM: communications memory module.
//
// A multiported memory in the spirit of a video RAM: a random access port
// for the host (the CPU may run code and keep data here like in any other
// memory bank), a sequential read port feeding the CMP transmit pipe and a
// sequential write port fed by the CMP receive pipe. All three work in the
// same cycle. Reads are registered (data one clock after the address);
// when the receive port and the host write the same byte in the same clock,
// the receive port wins. Byte-wide ports and the single clock are this
// design's choices; the Axon paper gives neither. Its size is not given
// either: the default, 1 MB, holds one of the 1 MB segments the Axon paper
// uses as its example.
module axon_cmm #(
  parameter int unsigned AW = 20
) (
  input  logic          clk,
  // host random access port
  input  logic          h_en,
  input  logic          h_we,
  input  logic [AW-1:0] h_addr,
  input  logic [7:0]    h_wdata,
  output logic [7:0]    h_rdata,
  // CMP transmit (sequential read) port
  input  logic          t_en,
  input  logic [AW-1:0] t_addr,
  output logic [7:0]    t_rdata,
  // CMP receive (sequential write) port
  input  logic          r_we,
  input  logic [AW-1:0] r_addr,
  input  logic [7:0]    r_wdata
);
  logic [7:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (h_en && h_we) mem[h_addr] <= h_wdata;
    if (r_we)         mem[r_addr] <= r_wdata;
    if (h_en)         h_rdata <= mem[h_addr];
    if (t_en)         t_rdata <= mem[t_addr];
  end
endmodule
