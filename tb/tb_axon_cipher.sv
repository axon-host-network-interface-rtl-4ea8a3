// Test of the ECR/DCR cipher stage: the data field must equal the plaintext
// XOR a keystream computed here from the key (16-bit Galois LFSR, taps
// 0xB400, low byte used, stepped per data byte), header and trailer must
// pass unchanged, latency is one enable; decrypting restores the input.
//
// The paper asks for encryption in the pipe but names no cipher; the
// keystream checked here is this design's placeholder.
module tb_axon_cipher;
  import axon_pkg::*;
  logic clk = 0, rst_n = 1, ce = 0, crypt = 0;
  initial #0.25 rst_n = 0;  // a falling edge applies the asynchronous reset
  logic [15:0] key;
  always #1 clk = ~clk;
  cbyte_t in, mid, out;
  axon_cipher enc (.clk, .rst_n, .ce, .crypt, .key, .in, .out(mid));
  axon_cipher dec (.clk, .rst_n, .ce, .crypt, .key, .in(mid), .out);
  int checks = 0, failures = 0;
  logic [7:0] pkt [CELL_BYTES], ks [CELL_BYTES];

  initial begin
    in = '0; key = 16'h1234;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      logic [15:0] s;
      crypt = (t != 2);
      key = (t == 4) ? 16'h0000 : 16'($urandom);
      s = (key == 0) ? 16'h0001 : key;
      for (int n = 0; n < CELL_BYTES; n++) begin
        pkt[n] = 8'($urandom);
        ks[n] = 8'h00;
        if (n >= 19 && n < 51) begin
          ks[n] = crypt ? s[7:0] : 8'h00;
          s = s[0] ? ((s >> 1) ^ 16'hB400) : (s >> 1);
        end
      end
      for (int n = 0; n < CELL_BYTES + 4; n++) begin
        @(negedge clk);
        in = (n < CELL_BYTES) ? '{v:1'b1, sop:(n == 0), d:pkt[n]} : '0;
        ce = 1;
        @(negedge clk);
        ce = 0;
        if (n < CELL_BYTES) begin
          checks++;
          if (mid.d != (pkt[n] ^ ks[n]) || !mid.v) begin
            failures++; $display("FAIL enc byte %0d: %h exp %h", n, mid.d, pkt[n] ^ ks[n]);
          end
        end
        if (n >= 1 && n - 1 < CELL_BYTES) begin
          checks++;
          if (out.d != pkt[n-1]) begin failures++; $display("FAIL dec byte %0d", n-1); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
