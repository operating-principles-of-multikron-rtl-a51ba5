// tb_mkvc_csr: checks the CSR layout, the wait-state bits taken from the
// WCPU/WMEM pins during hardware and software reset, and the write-1-to-set
// 32/64-bit mode bits.
module tb_mkvc_csr;
  logic clk = 0, rst_n = 0, soft_rst = 0, wcpu = 1, wmem = 0, wr_en = 0;
  logic [15:0] wr_data = '0, rd_data;
  logic mode32, wait_cpu, wait_mem;
  int checks = 0, failures = 0;

  mkvc_csr dut (.clk, .rst_n, .soft_rst, .wcpu_pin(wcpu), .wmem_pin(wmem),
                .wr_en, .wr_data, .rd_data, .mode32, .wait_cpu, .wait_mem);

  always #5 clk = ~clk;

  task automatic check(input logic [15:0] exp, input string what);
    checks++;
    if (rd_data !== exp) begin
      failures++;
      $display("FAIL %s: csr %04h expected %04h", what, rd_data, exp);
    end
  endtask

  task automatic write(input logic [15:0] d);
    @(negedge clk) begin wr_en = 1; wr_data = d; end
    @(negedge clk) wr_en = 0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6) @(negedge clk);
    rst_n = 1;
    wcpu = 0; wmem = 1;            // pins change after reset: ignored
    repeat (2) @(negedge clk);
    check(16'h2000, "after reset, WCPU=1 WMEM=0");
    write(16'h4000);
    check(16'h6000, "32-bit mode set");
    write(16'h0000);
    check(16'h6000, "writing 0 leaves the mode");
    write(16'hC000);
    check(16'h6000, "both mode bits: unchanged");
    write(16'h0FFF);
    check(16'h6000, "read-only bits ignore writes");
    write(16'h8000);
    check(16'h2000, "64-bit mode set");
    write(16'h4000);
    @(negedge clk) soft_rst = 1;
    @(negedge clk) soft_rst = 0;
    check(16'h1000, "software reset resamples pins and clears mode");
    checks++;
    if (!(wait_mem && !wait_cpu && !mode32)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
