// ECD / DCD: byte-order conversion of the cell data field.
//
// Hosts of different byte order exchange data through the network format;
// the encode (transmit) and decode (receive) stages convert it. The
// conversion used here reverses the four bytes of every 32-bit word of the
// 32-byte data field when `swap` is set; header and trailer pass unchanged.
// The same circuit serves both directions because the reversal is its own
// inverse. Which transformation a host needs is the design's own choice; the
// stage position in the pipe (ECD first on transmit, DCD last on receive)
// follows the CMP block diagram.
//
// The stage looks up to three bytes ahead, so it keeps a 7-byte history and
// has a fixed latency of 4 major cycles (clock enables `ce`). The bytes of a
// cell must arrive on consecutive enables; `swap` must be steady during a
// cell's data field.
//
// Lint notes that rst_n is used both as an asynchronous reset and
// synchronously: the synchronous use is only the `disable iff` of the
// assertion, not logic.
module axon_byteswap
  import axon_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   ce,
  input  logic   swap,
  input  cbyte_t in,
  output cbyte_t out
);
  typedef struct packed {
    cbyte_t     b;
    logic [5:0] off;   // byte offset in the cell
  } hent_t;

  hent_t      hist [7];
  logic [5:0] off_in, off_prev;

  always_comb off_in = (in.sop || off_prev == 6'd63) ? 6'd0 : off_prev + 6'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      off_prev <= 6'd63;
      for (int n = 0; n < 7; n++) hist[n] <= '0;
      out <= '0;
    end else if (ce) begin
      if (in.v) off_prev <= off_in;
      hist[0] <= '{b: in, off: off_in};
      for (int n = 1; n < 7; n++) hist[n] <= hist[n-1];
      out <= hist[3].b;
      if (swap && hist[3].b.v && hist[3].off >= 6'(OFF_DATA) &&
          hist[3].off < 6'(OFF_DATA + DATA_BYTES)) begin
        unique case (2'(hist[3].off - 6'(OFF_DATA)))
          2'd0: out.d <= hist[0].b.d;
          2'd1: out.d <= hist[2].b.d;
          2'd2: out.d <= hist[4].b.d;
          default: out.d <= hist[6].b.d;
        endcase
      end
    end
  end

  // A cell's bytes are contiguous: a byte that is not the first of a cell
  // follows a present byte.
  property p_contig;
    @(posedge clk) disable iff (!rst_n) (ce && in.v && !in.sop) |-> hist[0].b.v;
  endproperty
  a_contig: assert property (p_contig);
endmodule
