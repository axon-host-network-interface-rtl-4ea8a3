// Test of the CMM: host writes and reads back, the transmit port reads
// what the host wrote, the receive port writes what the host then reads,
// all three ports active in the same clocks, and the receive port wins a
// same-address write collision. Read data follow one clock after the
// address. A small address width keeps the test short.
//
// The paper gives the three ports; byte width, read latency and the
// collision rule are this design's.
module tb_axon_cmm;
  localparam int AW = 12;
  logic clk = 0, h_en = 0, h_we = 0, t_en = 0, r_we = 0;
  logic [AW-1:0] h_addr = 0, t_addr = 0, r_addr = 0;
  logic [7:0] h_wdata = 0, h_rdata, t_rdata, r_wdata = 0;
  always #1 clk = ~clk;
  axon_cmm #(.AW(AW)) dut (.clk, .h_en, .h_we, .h_addr, .h_wdata, .h_rdata, .t_en, .t_addr, .t_rdata,
    .r_we, .r_addr, .r_wdata);
  int checks = 0, failures = 0;
  logic [7:0] model [2**AW];
  initial begin
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      model[a] = 8'($urandom);
      h_en = 1; h_we = 1; h_addr = AW'(a); h_wdata = model[a];
    end
    @(negedge clk); h_en = 0; h_we = 0;
    for (int t = 0; t < 500; t++) begin
      automatic int ta = $urandom_range(0, 2**AW - 1), ha = $urandom_range(0, 2**AW - 1);
      automatic int ra = $urandom_range(0, 2**AW - 1);
      automatic logic [7:0] rd = 8'($urandom);
      t_en = 1; t_addr = AW'(ta);
      h_en = 1; h_we = 0; h_addr = AW'(ha);
      r_we = 1; r_addr = AW'(ra); r_wdata = rd;
      @(negedge clk);
      checks++;
      if (t_rdata != model[ta] || h_rdata != model[ha]) begin failures++; $display("FAIL read %0d", t); end
      model[ra] = rd;
    end
    // collision: host and receive port write the same byte
    r_we = 1; r_addr = 5; r_wdata = 8'hA5; h_en = 1; h_we = 1; h_addr = 5; h_wdata = 8'h5A; t_en = 0;
    @(negedge clk);
    r_we = 0; h_we = 0; h_addr = 5;
    @(negedge clk);
    checks++; if (h_rdata != 8'hA5) begin failures++; $display("FAIL collision %h", h_rdata); end
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
