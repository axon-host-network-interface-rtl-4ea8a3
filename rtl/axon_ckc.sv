// CKC: checksum compare.
//
// Sums the data bytes of each received cell exactly as CKG does on the
// sending side and compares the sum with the trailer. One major cycle after
// the last byte of a cell, `done` pulses (for one clock enable) with `ok`
// telling whether the sums matched. The stream itself is not delayed: CKC
// only watches it.
module axon_ckc
  import axon_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   ce,
  input  cbyte_t in,
  output logic   done,
  output logic   ok
);
  logic [5:0]  off_prev, off;
  logic [15:0] sum;
  logic [7:0]  hi;

  always_comb off = (in.sop || off_prev == 6'd63) ? 6'd0 : off_prev + 6'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      off_prev <= 6'd63; sum <= '0; hi <= '0; done <= 1'b0; ok <= 1'b0;
    end else if (ce) begin
      done <= 1'b0;
      if (in.v) begin
        off_prev <= off;
        if (off == 6'd0) sum <= '0;
        else if (off >= 6'(OFF_DATA) && off < 6'(OFF_CK)) sum <= ck_add(sum, off[0], in.d);
        if (off == 6'(OFF_CK)) hi <= in.d;
        if (off == 6'(OFF_CK + 1)) begin
          done <= 1'b1;
          ok   <= ({hi, in.d} == sum);
        end
      end
    end
  end
endmodule
