// tb_mkvc_sram_ctrl: runs STORE, LOAD and SWAP against the SRAM model, a
// bank register and a model counter bank (16 words in an array).
// Checks: stored words land at {home, index} with the bank's contents; a
// STORE of an invalid bank writes nothing; LOAD sets the bank register and
// valid bit and fills all 16 words from {new home, index}; SWAP stores to the
// old home then loads from the new one; CE/OEB levels during each phase;
// the command length in clocks with and without the SRAM wait state.
module tb_mkvc_sram_ctrl;
  import mkvc_pkg::*;
  logic clk = 0, rst_n = 0, soft_rst = 0, wait_mem = 0, start = 0;
  bank_op_e op = OP_STORE;
  logic [1:0] bank = 0, sel_bank;
  logic [11:0] new_home = 0, breg_home;
  logic busy, done, breg_wr, ld_en, mem_wdrive, mem_r_wb, mem_oeb, mem_ce1b, mem_ce2h;
  logic [3:0] st_idx, ld_idx;
  sram_word_t st_word, ld_word;
  logic [15:0] mem_addr;
  logic [39:0] mem_wdata, mem_rdata;
  int checks = 0, failures = 0;

  // model bank registers and counter bank words
  logic [11:0] home [4];
  logic        valid [4];
  sram_word_t  words [4][16];

  mkvc_sram_ctrl #(.NBANK(4)) dut (
    .clk, .rst_n, .soft_rst, .wait_mem, .start, .op, .bank, .new_home, .busy, .done,
    .sel_bank, .cur_home(home[sel_bank]), .cur_valid(valid[sel_bank]), .breg_wr, .breg_home,
    .st_idx, .st_word, .ld_en, .ld_idx, .ld_word,
    .mem_addr, .mem_wdata, .mem_wdrive, .mem_rdata, .mem_r_wb, .mem_oeb, .mem_ce1b, .mem_ce2h);

  mkvc_sram_model u_mem (.addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata),
                         .r_wb(mem_r_wb), .oeb(mem_oeb), .ce1b(mem_ce1b), .ce2h(mem_ce2h));

  assign st_word = words[sel_bank][st_idx];
  always_ff @(posedge clk) begin
    if (breg_wr) begin home[sel_bank] <= breg_home; valid[sel_bank] <= 1'b1; end
    if (ld_en) words[sel_bank][ld_idx] <= ld_word;
    // control levels: enabled during transfers, OEB high on writes
    if (busy && !mem_ce1b) begin
      if (!mem_ce2h) failures++;
      if (!mem_r_wb && !mem_oeb) failures++;
    end
  end
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input bank_op_e o, input logic [1:0] b, input logic [11:0] nh, output int clocks);
    @(negedge clk) begin start = 1; op = o; bank = b; new_home = nh; end
    @(negedge clk) start = 0;
    clocks = 1;
    while (!done) begin @(negedge clk); clocks++; if (clocks > 500) break; end
    @(negedge clk);
  endtask

  function automatic sram_word_t pattern(int seed, int i);
    return sram_word_t'({4'(seed + i), 4'(i), 32'(seed * 1000 + i * 7)});
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c, w0;
    for (int b = 0; b < 4; b++) begin
      home[b] = 12'(b); valid[b] = 0;
      for (int i = 0; i < 16; i++) words[b][i] = pattern(b + 1, i);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // STORE of an invalid bank does nothing
    w0 = u_mem.writes;
    run(OP_STORE, 2, 0, c);
    chk(u_mem.writes == w0, "invalid bank is not stored");
    // STORE of a valid bank
    home[1] = 12'hABC; valid[1] = 1;
    run(OP_STORE, 1, 0, c);
    chk(c == 2 + 16 * 3, $sformatf("STORE length %0d clocks", c));
    chk(u_mem.writes == w0 + 16, "16 words written");
    for (int i = 0; i < 16; i++)
      chk(u_mem.peek({12'hABC, 4'(i)}) == pattern(2, i), $sformatf("stored word %0d", i));
    // LOAD into bank 3 from block 0x123
    for (int i = 0; i < 16; i++) u_mem.poke({12'h123, 4'(i)}, pattern(9, i));
    run(OP_LOAD, 3, 12'h123, c);
    chk(c == 2 + 16 * 2, $sformatf("LOAD length %0d clocks", c));
    chk(home[3] == 12'h123 && valid[3], "LOAD sets bank register and valid");
    for (int i = 0; i < 16; i++) chk(words[3][i] == pattern(9, i), $sformatf("loaded word %0d", i));
    // SWAP bank 3 with block 0x456, SRAM wait state on
    wait_mem = 1;
    for (int i = 0; i < 16; i++) begin
      u_mem.poke({12'h456, 4'(i)}, pattern(5, i));
      words[3][i] = pattern(7, i);
    end
    run(OP_SWAP, 3, 12'h456, c);
    chk(c == 2 + 16 * 4 + 1 + 16 * 3, $sformatf("SWAP length with wait state %0d", c));
    for (int i = 0; i < 16; i++) begin
      chk(u_mem.peek({12'h123, 4'(i)}) == pattern(7, i), $sformatf("swap stored word %0d", i));
      chk(words[3][i] == pattern(5, i), $sformatf("swap loaded word %0d", i));
    end
    chk(home[3] == 12'h456, "SWAP updates home");
    // SWAP of an invalid bank only loads
    w0 = u_mem.writes;
    run(OP_SWAP, 0, 12'h123, c);
    chk(u_mem.writes == w0 && words[0][5] == pattern(7, 5) && valid[0], "invalid SWAP only loads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
