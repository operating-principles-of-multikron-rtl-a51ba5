// tb_mkvc_decoder: exhaustive check of the address decoder.
// Walks all 4096 word addresses and compares the decoded access class, bank
// and index with a reference written from the address table (a lookup on the
// full 12-bit address, coded differently from the decoder).
module tb_mkvc_decoder;
  import mkvc_pkg::*;

  logic [AW-1:0] addr;
  decoded_t      dec;
  int checks = 0, failures = 0;

  mkvc_decoder #(.NBANK(4)) dut (.addr, .dec);

  function automatic access_e ref_kind(int a);
    int c = a / 256, b = (a / 16) % 16, n = a % 16;
    if (c == 0) begin
      if (a == 0) return A_SOFT_RESET;
      if (a == 1) return A_CSR;
      if (a == 2) return A_TS;
      if (a == 3) return A_TS_INC;
      if (a == 7) return A_HI_REG;
      return A_NONE;
    end
    if (b > 3) return A_NONE;
    if (c == 1) return A_CNT32;
    if (c == 2) return A_CNT_PAIR;
    if (c == 4) return A_CNT_NOCOPY;
    if (c == 3) begin
      if (n == 0) return A_CLEAR_BANK;
      if (n == 1) return A_INVALIDATE;
      if (n == 2) return A_BANK_REG;
      if (n == 3) return A_ENABLE_REG;
      if (n == 4) return A_CONFIG_REG;
    end
    if (c == 5) begin
      if (n == 1) return A_STORE;
      if (n == 2) return A_LOAD;
      if (n == 3) return A_SWAP;
    end
    return A_NONE;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 4096; a++) begin
      addr = a[AW-1:0];
      #1;
      checks++;
      if (dec.kind != ref_kind(a)) begin
        failures++;
        if (failures < 10) $display("addr %03h: kind %s expected %s", a, dec.kind.name(), ref_kind(a).name());
      end
      if (dec.kind != A_NONE) begin
        checks++;
        if (dec.bank != 4'((a / 16) % 16) || dec.idx != 4'(a % 16)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
