// CKG: checksum generate.
//
// Sums the 32 data bytes of each cell as they stream past (16-bit sum of
// big-endian words, see axon_pkg::ck_add) and writes the result into the
// two trailer bytes, replacing whatever the sequencer put there. The sum is
// taken over the data as read from the CMM, ahead of encoding and
// encryption, so the receiver checks it after decoding. The sum definition
// is this design's choice; the Axon paper says only that the data fields are
// summed and the result placed in the trailer.
//
// Latency: one major cycle.
module axon_ckg
  import axon_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   ce,
  input  cbyte_t in,
  output cbyte_t out
);
  logic [5:0]  off_prev, off;
  logic [15:0] sum;

  always_comb off = (in.sop || off_prev == 6'd63) ? 6'd0 : off_prev + 6'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      off_prev <= 6'd63; sum <= '0; out <= '0;
    end else if (ce) begin
      out <= in;
      if (in.v) begin
        off_prev <= off;
        if (off == 6'd0) sum <= '0;
        else if (off >= 6'(OFF_DATA) && off < 6'(OFF_CK)) sum <= ck_add(sum, off[0], in.d);
        if (off == 6'(OFF_CK))     out.d <= sum[15:8];
        if (off == 6'(OFF_CK + 1)) out.d <= sum[7:0];
      end
    end
  end
endmodule
