// ADD: address decode for the receive side.
//
// Writes the data bytes of every accepted data cell straight into the CMM as
// they leave the receive pipe: the address of data byte b of packet i of
// page j is base + 1024*j + 32*i + b, where base is the CMM address of the
// request's first page, taken from its receive CSR. A page therefore holds
// its packets in order whatever order they arrive in ("sequence by
// placement"). Pages of a request are placed back to back from base - the
// document has the CSR supply each page's base; a single segment base is
// this design's simplification. Cells that are control cells, of an
// unknown congram or out of bounds are not written. The write happens before
// the checksum is known; CKC reports a bad cell afterwards.
//
// Only the header fields that form the address are read; lint reports the
// others as unused.
module axon_add
  import axon_pkg::*;
#(
  parameter int unsigned AW = 20
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ce,
  input  cbyte_t        in,
  input  hdr_t          hdr,
  input  logic [31:0]   base,
  output logic          we,
  output logic [AW-1:0] addr,
  output logic [7:0]    wdata
);
  logic [5:0]  off_prev, off;
  logic        accept;
  logic [31:0] pkt_base;

  always_comb begin
    off      = (in.sop || off_prev == 6'd63) ? 6'd0 : off_prev + 6'd1;
    accept   = !hdr.ctrl && hdr.hit && hdr.inb;
    pkt_base = base + (32'(hdr.j) << $clog2(PAGE_BYTES)) + (32'(hdr.i) << $clog2(DATA_BYTES));
  end

  // we is high for exactly one clock per written byte.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      off_prev <= 6'd63; we <= 1'b0; addr <= '0; wdata <= '0;
    end else begin
      we <= 1'b0;
      if (ce && in.v) begin
        off_prev <= off;
        if (accept && off >= 6'(OFF_DATA) && off < 6'(OFF_CK)) begin
          we    <= 1'b1;
          addr  <= AW'(pkt_base + 32'(off - 6'(OFF_DATA)));
          wdata <= in.d;
        end
      end
    end
  end
endmodule
