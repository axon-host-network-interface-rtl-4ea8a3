// Test of RCT: the slot strobe repeats every 54 enables; after a page end a
// congram is ineligible for exactly its inter-page gap (in enables), while
// the others stay eligible.
//
// The page burst with an inter-page gap is the paper's simple rate control;
// the 54-cycle slot is this design's.
module tb_axon_rct;
  import axon_pkg::*;
  logic clk = 0, rst_n = 1, ce = 0, page_end = 0, slot;
  initial #0.25 rst_n = 0;  // a falling edge applies the asynchronous reset
  logic [1:0] page_idx = 0;
  logic [15:0] ipg [4];
  logic [3:0] elig;
  always #1 clk = ~clk;
  axon_rct #(.NCONG(4)) dut (.clk, .rst_n, .ce, .page_end, .page_idx, .ipg, .slot, .elig);
  int checks = 0, failures = 0;
  task automatic step();
    @(negedge clk); ce = 1; @(negedge clk); ce = 0;
  endtask
  initial begin
    ipg[0] = 10; ipg[1] = 0; ipg[2] = 100; ipg[3] = 5;
    repeat (3) @(negedge clk); rst_n = 1;
    begin
      int last = -1, k = 0, periods = 0;
      for (int n = 0; n < 200; n++) begin
        if (slot) begin
          if (last >= 0) begin
            checks++; periods++;
            if (n - last != CELL_SLOT) begin failures++; $display("FAIL slot period %0d", n - last); end
          end
          last = n;
        end
        step();
      end
      checks++; if (periods < 3) begin failures++; $display("FAIL no slots"); end
    end
    checks++; if (elig != 4'hF) begin failures++; $display("FAIL initial elig"); end
    // page end of congram 2 (gap 100), in a clock without enable
    @(negedge clk); page_end = 1; page_idx = 2; @(negedge clk); page_end = 0;
    for (int n = 0; n < 100; n++) begin
      checks++;
      if (elig != 4'b1011) begin failures++; $display("FAIL elig %b at %0d", elig, n); end
      step();
    end
    checks++; if (elig != 4'hF) begin failures++; $display("FAIL elig after gap %b", elig); end
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
