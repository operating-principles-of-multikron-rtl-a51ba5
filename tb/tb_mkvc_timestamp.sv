// tb_mkvc_timestamp: drives Timestamp clock edges (one every three Node
// clocks, the fastest allowed) and checks the 56-bit count, the TSclk/10 and
// TSclk/100 pulse counts, and test mode: load, single-step, no counting,
// and that load/step requests are ignored outside test mode.
module tb_mkvc_timestamp;
  import mkvc_pkg::*;
  logic clk = 0, rst_n = 0, ts_rise = 0, test_mode = 0, wr_en = 0, inc_en = 0;
  logic [TSW-1:0] wr_data = '0, ts;
  logic tick1, tick10, tick100;
  int n1 = 0, n10 = 0, n100 = 0;
  int checks = 0, failures = 0;

  mkvc_timestamp dut (.clk, .rst_n, .ts_rise, .test_mode, .wr_en, .wr_data, .inc_en,
                      .ts, .tick1, .tick10, .tick100);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    n1   += int'(tick1);
    n10  += int'(tick10);
    n100 += int'(tick100);
  end

  task automatic check(input logic [TSW-1:0] got, input logic [TSW-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic ts_edges(input int n);
    repeat (n) begin
      @(negedge clk) ts_rise = 1;
      @(negedge clk) ts_rise = 0;
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1;
    check(ts, 0, "reset");
    ts_edges(1234);
    check(ts, 1234, "count of TS edges");
    check(TSW'(n10), 123, "TSclk/10 pulses");
    check(TSW'(n100), 12, "TSclk/100 pulses");
    // outside test mode writes and increments are ignored
    @(negedge clk) begin wr_en = 1; wr_data = 56'h12_3456_789A_BCDE; end
    @(negedge clk) begin wr_en = 0; inc_en = 1; end
    @(negedge clk) inc_en = 0;
    check(ts, 1234, "write/increment ignored outside test mode");
    // test mode
    test_mode = 1;
    @(negedge clk) begin wr_en = 1; wr_data = 56'hFF_FFFF_FFFF_FFFE; end
    @(negedge clk) wr_en = 0;
    check(ts, 56'hFF_FFFF_FFFF_FFFE, "test mode write");
    ts_edges(5);
    check(ts, 56'hFF_FFFF_FFFF_FFFE, "no TS counting in test mode");
    @(negedge clk) inc_en = 1;
    @(negedge clk) inc_en = 0;
    check(ts, 56'hFF_FFFF_FFFF_FFFF, "test mode increment");
    @(negedge clk) inc_en = 1;
    @(negedge clk) inc_en = 0;
    check(ts, 0, "wrap at 2^56");
    test_mode = 0;
    ts_edges(7);
    check(ts, 7, "counting resumes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
