// tb_mkvc_hi_reg: checks the High Order register: direct write, capture of
// read data, which source supplies write bits 63:32 in each mode, and reset.
module tb_mkvc_hi_reg;
  logic clk = 0, rst_n = 0, soft_rst = 0, mode32 = 0, wr_en = 0, cap_en = 0;
  logic [31:0] wr_data = '0, cap_data = '0, pin_hi = 32'hAAAA_5555, hi, wdata_hi;
  int checks = 0, failures = 0;

  mkvc_hi_reg dut (.clk, .rst_n, .soft_rst, .mode32, .wr_en, .wr_data,
                   .cap_en, .cap_data, .pin_hi, .hi, .wdata_hi);

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %08h expected %08h", what, got, exp);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(hi, 32'h0, "reset value");
    check(wdata_hi, 32'hAAAA_5555, "64-bit mode uses pins");
    wr_en = 1; wr_data = 32'h1234_5678;
    @(negedge clk) wr_en = 0;
    check(hi, 32'h1234_5678, "direct write");
    check(wdata_hi, 32'hAAAA_5555, "64-bit mode still uses pins");
    mode32 = 1; #1;
    check(wdata_hi, 32'h1234_5678, "32-bit mode uses register");
    cap_en = 1; cap_data = 32'hDEAD_BEEF;
    @(negedge clk) cap_en = 0;
    check(hi, 32'hDEAD_BEEF, "capture of read data");
    wr_en = 1; cap_en = 1; wr_data = 32'h0BAD_F00D; cap_data = 32'h1111_1111;
    @(negedge clk) begin wr_en = 0; cap_en = 0; end
    check(hi, 32'h0BAD_F00D, "direct write wins over capture");
    soft_rst = 1;
    @(negedge clk) soft_rst = 0;
    check(hi, 32'h0, "software reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
