// tb_mkvc_input_sync: checks that each rising edge of the Timestamp clock
// (at a third of the Node clock) and of random external signals gives exactly
// one pulse, that the synchronized level lags the input by two clocks, and
// the edge-to-pulse latency of the Timestamp clock.
module tb_mkvc_input_sync;
  logic clk = 0, rst_n = 0, ts_clk = 0;
  logic [15:0] ext = '0, ext_lvl, ext_rise;
  logic ts_rise;
  logic [15:0] ext_d1, ext_d2, ext_d3;
  int ts_edges = 0, ts_pulses = 0, ext_edges = 0, ext_pulses = 0;
  int checks = 0, failures = 0, cyc = 0, last_ts_edge = 0;

  mkvc_input_sync #(.NEXT(16)) dut (.clk, .rst_n, .ts_clk, .ext, .ts_rise, .ext_lvl, .ext_rise);
  always #5 clk = ~clk;

  // reference: inputs change on negedges, flops sample at posedges
  always @(posedge clk) begin
    cyc++;
    ext_d3 <= ext_d2; ext_d2 <= ext_d1; ext_d1 <= ext;
    if (rst_n) begin
      ts_pulses  += int'(ts_rise);
      ext_pulses += $countones(ext_rise);
      if (ts_rise) begin
        checks++;
        if (cyc - last_ts_edge != 3) failures++;  // pulse seen at the edge that ends it
      end
      if (cyc > 5) begin
        checks++;
        if (ext_lvl !== ext_d2) failures++;
      end
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ext_d1 = 0; ext_d2 = 0; ext_d3 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (t % 3 == 0 && t < 2990) begin ts_clk = 1; ts_edges++; last_ts_edge = cyc; end
      else ts_clk = 0;
      if (t < 2990) begin
        logic [15:0] nx;
        nx = 16'($urandom);
        ext_edges += $countones(nx & ~ext);
        ext = nx;
      end
    end
    repeat (5) @(negedge clk);
    checks++;
    if (ts_pulses != ts_edges) begin failures++; $display("FAIL ts %0d/%0d", ts_pulses, ts_edges); end
    checks++;
    if (ext_pulses != ext_edges) begin failures++; $display("FAIL ext %0d/%0d", ext_pulses, ext_edges); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
