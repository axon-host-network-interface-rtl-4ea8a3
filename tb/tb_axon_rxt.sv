// Test of RXT: a timer fires after LIMIT arrivals of its congram (arrivals
// of other congrams do not count), CAP ticks also advance it, it restarts
// after firing and on allocation, and an empty entry never fires.
//
// The paper leaves timer values and granularity open; page timers counting
// arrivals and ticks up to LIMIT are this design's.
module tb_axon_rxt;
  localparam int LIMIT = 10;
  logic clk = 0, rst_n = 1, arr = 0, tick = 0, alloc = 0, fire;
  initial #0.25 rst_n = 0;  // a falling edge applies the asynchronous reset
  logic [7:0] arr_idx = 0;
  logic [1:0] alloc_ent = 0, fire_ent;
  logic [3:0] ent_v = 0;
  logic [7:0] ent_idx [4];
  always #1 clk = ~clk;
  axon_rxt #(.NPG(4), .LIMIT(LIMIT)) dut (.clk, .rst_n, .arr, .arr_idx, .tick, .alloc, .alloc_ent,
    .ent_v, .ent_idx, .fire, .fire_ent);
  int checks = 0, failures = 0, nfire = 0, last_ent = -1;
  always @(posedge clk) if (fire) begin nfire++; last_ent = int'(fire_ent); end
  task automatic pulse_arr(input int c);
    @(negedge clk); arr = 1; arr_idx = 8'(c); @(negedge clk); arr = 0;
  endtask
  initial begin
    ent_idx[0] = 0; ent_idx[1] = 1; ent_idx[2] = 0; ent_idx[3] = 3;
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); ent_v = 4'b0010; alloc = 1; alloc_ent = 1; @(negedge clk); alloc = 0;
    for (int n = 0; n < LIMIT - 1; n++) begin pulse_arr(1); pulse_arr(0); end
    repeat (3) @(negedge clk);
    checks++; if (nfire != 0) begin failures++; $display("FAIL fired early"); end
    pulse_arr(1);
    repeat (3) @(negedge clk);
    checks++; if (nfire != 1 || last_ent != 1) begin failures++; $display("FAIL no fire after %0d arrivals (%0d)", LIMIT, nfire); end
    // ticks
    for (int n = 0; n < LIMIT; n++) begin @(negedge clk); tick = 1; @(negedge clk); tick = 0; end
    repeat (3) @(negedge clk);
    checks++; if (nfire != 2) begin failures++; $display("FAIL tick fire %0d", nfire); end
    // re-allocation restarts the count
    for (int n = 0; n < LIMIT - 2; n++) pulse_arr(1);
    @(negedge clk); alloc = 1; alloc_ent = 1; @(negedge clk); alloc = 0;
    for (int n = 0; n < LIMIT - 2; n++) pulse_arr(1);
    repeat (3) @(negedge clk);
    checks++; if (nfire != 2) begin failures++; $display("FAIL alloc restart %0d", nfire); end
    ent_v = 0;
    for (int n = 0; n < 2 * LIMIT; n++) begin @(negedge clk); tick = 1; @(negedge clk); tick = 0; end
    checks++; if (nfire != 2) begin failures++; $display("FAIL empty entry fired"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
