// Test of the ECD/DCD byte-order stage: random cells, with and without
// swapping; data-field words must come out byte-reversed, everything else
// unchanged, four enables later. Two stages in a row must restore the input.
//
// The paper names byte ordering as an encode/decode job; the 32-bit word
// reversal and the fixed latency are this design's.
module tb_axon_byteswap;
  import axon_pkg::*;
  logic clk = 0, rst_n = 1, ce = 0, swap = 0;
  initial #0.25 rst_n = 0;  // a falling edge applies the asynchronous reset
  always #1 clk = ~clk;
  cbyte_t in, mid, out;
  axon_byteswap dut (.clk, .rst_n, .ce, .swap, .in, .out(mid));
  axon_byteswap inv (.clk, .rst_n, .ce, .swap, .in(mid), .out);
  int checks = 0, failures = 0;
  logic [7:0] pkt [CELL_BYTES];
  cbyte_t sent [$];
  int lat_ok = 0;

  function automatic logic [7:0] expect_b(int off);
    if (swap && off >= OFF_DATA && off < OFF_CK) begin
      int r = (off - OFF_DATA) % 4;
      return pkt[off - r + 3 - r];
    end
    return pkt[off];
  endfunction

  initial begin
    in = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      swap = t[0];
      for (int n = 0; n < CELL_BYTES; n++) pkt[n] = 8'($urandom);
      for (int n = 0; n < CELL_BYTES + 14; n++) begin
        @(negedge clk);
        in = (n < CELL_BYTES) ? '{v:1'b1, sop:(n == 0), d:pkt[n]} : '0;
        ce = 1;
        @(negedge clk);
        ce = 0;
        // mid shows byte n-5 of the pkt (five enables of latency)
        if (n >= 4 && n - 4 < CELL_BYTES) begin
          checks++;
          if (!(mid.v && mid.sop == (n == 4) && mid.d == expect_b(n - 4))) begin
            failures++; $display("FAIL swap=%0d byte %0d: %h exp %h", swap, n-4, mid.d, expect_b(n-4));
          end
        end
        if (n >= 9 && n - 9 < CELL_BYTES) begin
          checks++;
          if (!(out.v && out.d == pkt[n - 9])) begin
            failures++; $display("FAIL round trip byte %0d: %h v%0d exp %h", n - 9, out.d, out.v, pkt[n - 9]);
          end
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
