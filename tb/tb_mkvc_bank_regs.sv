// tb_mkvc_bank_regs: random writes and invalidates against a reference copy.
module tb_mkvc_bank_regs;
  logic clk = 0, rst_n = 0, soft_rst = 0, wr_en = 0, inv_en = 0;
  logic [1:0] wr_bank = 0, inv_bank = 0;
  logic [11:0] wr_home = 0;
  logic [3:0][11:0] home;
  logic [3:0] valid;
  logic [11:0] ref_home [4];
  logic ref_valid [4];
  int checks = 0, failures = 0;

  mkvc_bank_regs #(.NBANK(4)) dut (.clk, .rst_n, .soft_rst, .wr_en, .wr_bank, .wr_home,
                                   .inv_en, .inv_bank, .home, .valid);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin ref_home[i] = 0; ref_valid[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (home[i] !== ref_home[i] || valid[i] !== ref_valid[i]) begin
          failures++;
          if (failures < 5) $display("FAIL t=%0d bank %0d: %03h/%b expected %03h/%b",
                                     t, i, home[i], valid[i], ref_home[i], ref_valid[i]);
        end
      end
      wr_en = ($urandom % 3) == 0; wr_bank = 2'($urandom); wr_home = 12'($urandom);
      inv_en = ($urandom % 3) == 0; inv_bank = 2'($urandom);
      soft_rst = (t == 300);
      if (soft_rst) for (int i = 0; i < 4; i++) begin ref_home[i] = 0; ref_valid[i] = 0; end
      else begin
        if (inv_en) ref_valid[inv_bank] = 0;
        if (wr_en) begin ref_home[wr_bank] = wr_home; ref_valid[wr_bank] = 1; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
