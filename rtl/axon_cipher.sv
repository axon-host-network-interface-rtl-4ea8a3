// ECR / DCR: encryption and decryption of the cell data field.
//
// The Axon paper asks only that data be encrypted as it streams through the
// pipe; the cipher is this design's own choice: an additive stream cipher.
// The 32 data bytes are XORed with the low byte of a 16-bit LFSR that is
// loaded with the congram key at the first data byte and stepped once per
// data byte (see axon_pkg::lfsr_next). Encryption and decryption are the
// same operation. The header (which the receiver needs in clear to find the
// congram and its key) and the checksum trailer pass unchanged.
//
// Latency: one major cycle. `crypt` and `key` must be steady from the first
// data byte of a cell to its last.
module axon_cipher
  import axon_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  logic        crypt,
  input  logic [15:0] key,
  input  cbyte_t      in,
  output cbyte_t      out
);
  logic [5:0]  off_prev, off;
  logic [15:0] st, cur;
  logic        in_data;

  always_comb begin
    off     = (in.sop || off_prev == 6'd63) ? 6'd0 : off_prev + 6'd1;
    in_data = in.v && off >= 6'(OFF_DATA) && off < 6'(OFF_DATA + DATA_BYTES);
    cur     = (off == 6'(OFF_DATA)) ? ((key == 16'h0) ? 16'h0001 : key) : st;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      off_prev <= 6'd63;
      st       <= 16'h0001;
      out      <= '0;
    end else if (ce) begin
      if (in.v) off_prev <= off;
      out <= in;
      if (in_data) begin
        st <= lfsr_next(cur);
        if (crypt) out.d <= in.d ^ cur[7:0];
      end
    end
  end
endmodule
