// tb_mkvc_counter_bank: checks one counter bank against a reference model.
// Directed part: reset defaults of the Enable and Configuration registers, a
// Node clock stop-watch of exactly 10 clocks, and a 64-bit pair carrying
// from the even into the odd counter. Random part: 20000 clocks of random
// counting sources (Timestamp ticks, divided ticks, external levels and
// edges), test mode, and random processor operations (32- and 64-bit writes,
// software increments, shadow copies, bank clears, Enable and Configuration
// writes with zero fields, SRAM word loads), comparing every counter, shadow,
// control register and SRAM store word with the model each clock.
module tb_mkvc_counter_bank;
  import mkvc_pkg::*;
  localparam int N = 16;
  logic clk = 0, rst_n = 0, soft_rst = 0, test_mode = 0;
  logic tick1 = 0, tick10 = 0, tick100 = 0;
  logic [N-1:0] ext_lvl = '0, ext_rise = '0;
  logic wr32_en = 0, wr64_en = 0, swinc_en = 0, copy_en = 0, clear_en = 0, en_wr = 0, cfg_wr = 0;
  logic [3:0] wr_idx = 0, swinc_idx = 0, ld_idx = 0, st_idx = 0;
  logic [DW-1:0] wr_data = '0;
  logic [4*N-1:0] ctl_data = '0, en_reg, cfg_reg;
  logic ld_en = 0;
  sram_word_t ld_word = '0, st_word;
  logic [N-1:0][CW-1:0] count, shadow;
  int checks = 0, failures = 0;

  mkvc_counter_bank #(.NCNT(N)) dut (.*);
  always #5 clk = ~clk;

  // ---------------- reference model ----------------
  logic [31:0] m_cnt [N], m_shd [N];
  logic        m_en  [N];
  logic [3:0]  m_cfg [N];

  function automatic bit src_event(int i);
    case (m_cfg[i])
      1, 2, 3: return ext_rise[i];
      8:  return tick1 & ext_lvl[i];
      9:  return ext_lvl[i];
      10: return tick10 & ext_lvl[i];
      11: return tick100 & ext_lvl[i];
      12: return tick1;
      13: return 1;
      14: return tick10;
      15: return tick100;
      default: return 0;
    endcase
  endfunction

  task automatic model_step();
    bit lo [N];
    bit up [N];
    bit tm [N];
    logic [31:0] nxt [N];
    for (int i = 0; i < N; i++) begin
      bit sw = swinc_en && swinc_idx == i &&
               (m_cfg[i] == 4 || m_cfg[i] == 5 || m_cfg[i] == 6 || (m_cfg[i] == 7 && i % 2 == 0));
      tm[i] = test_mode && swinc_en && swinc_idx == i;
      lo[i] = (m_en[i] && ((src_event(i) && !test_mode) || sw)) || tm[i];
    end
    for (int i = 0; i < N; i++) begin
      if (i % 2 == 1 && m_cfg[i] == 7) up[i] = (lo[i-1] && m_cnt[i-1] == 32'hFFFF_FFFF) || tm[i];
      else up[i] = lo[i];
    end
    if (copy_en) for (int i = 0; i < N; i++) m_shd[i] = m_cnt[i];
    for (int i = 0; i < N; i++) begin
      bit clr = clear_en || (en_wr && ctl_data[4*i +: 2] == 2'b11) ||
                (i % 2 == 1 && m_cfg[i] == 7 && en_wr && ctl_data[4*(i-1) +: 2] == 2'b11);
      nxt[i] = m_cnt[i];
      if (ld_en && ld_idx == i) nxt[i] = ld_word.count;
      else if (wr32_en && wr_idx == i) nxt[i] = wr_data[31:0];
      else if (wr64_en && wr_idx == i) nxt[i] = wr_data[31:0];
      else if (wr64_en && wr_idx[0] == 0 && wr_idx + 1 == i) nxt[i] = wr_data[63:32];
      else if (clr) nxt[i] = 0;
      else if (up[i]) nxt[i] = m_cnt[i] + 1;
    end
    for (int i = 0; i < N; i++) begin
      m_cnt[i] = nxt[i];
      if (ld_en && ld_idx == i) begin
        m_en[i] = ld_word.en[1]; m_cfg[i] = ld_word.cfg;
      end else begin
        if (en_wr && ctl_data[4*i +: 2] != 0) m_en[i] = ctl_data[4*i + 1];
        if (cfg_wr && ctl_data[4*i +: 4] != 0) m_cfg[i] = ctl_data[4*i +: 4];
      end
    end
  endtask

  task automatic model_reset();
    for (int i = 0; i < N; i++) begin m_cnt[i] = 0; m_shd[i] = 0; m_en[i] = 0; m_cfg[i] = 15; end
  endtask

  task automatic compare(input string when);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (count[i] !== m_cnt[i] || shadow[i] !== m_shd[i] ||
          en_reg[4*i +: 4] !== {2'b00, m_en[i], !m_en[i]} || cfg_reg[4*i +: 4] !== m_cfg[i]) begin
        failures++;
        if (failures < 8)
          $display("FAIL %s counter %0d: cnt %h/%h shd %h/%h en %h/%b cfg %h/%h", when, i,
                   count[i], m_cnt[i], shadow[i], m_shd[i], en_reg[4*i +: 4], m_en[i],
                   cfg_reg[4*i +: 4], m_cfg[i]);
      end
    end
    checks++;
    if (st_word !== {m_cfg[st_idx], 2'b00, m_en[st_idx], !m_en[st_idx], m_cnt[st_idx]}) failures++;
  endtask

  task automatic idle_inputs();
    {wr32_en, wr64_en, swinc_en, copy_en, clear_en, en_wr, cfg_wr, ld_en} = '0;
    tick1 = 0; tick10 = 0; tick100 = 0; ext_rise = '0; ext_lvl = '0;
  endtask

  // apply the inputs set up for this cycle, advance the model, compare after the edge
  task automatic cycle(input string when);
    @(posedge clk);
    model_step();
    @(negedge clk);
    compare(when);
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model_reset();
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // reset defaults: all fields 1111 (TSclk/100) and 0001 (disabled)
    checks++; if (cfg_reg !== 64'hFFFF_FFFF_FFFF_FFFF) failures++;
    checks++; if (en_reg  !== 64'h1111_1111_1111_1111) failures++;
    compare("reset");

    // stop-watch: counter 3 counts Node clocks for exactly 10 enabled clocks
    cfg_wr = 1; ctl_data = 64'h0000_0000_0000_D000; cycle("cfg");
    idle_inputs(); en_wr = 1; ctl_data = 64'h0000_0000_0000_3000; cycle("reset+enable");
    idle_inputs(); repeat (9) cycle("count");
    en_wr = 1; ctl_data = 64'h0000_0000_0000_1000; cycle("disable");
    idle_inputs(); repeat (3) cycle("stopped");
    checks++; if (count[3] !== 32'd10) begin failures++; $display("FAIL stop-watch %0d", count[3]); end

    // 64-bit pair: counter 4 software increment, counter 5 upper half
    cfg_wr = 1; ctl_data = 64'h0000_0000_0074_0000; cycle("pair cfg");
    idle_inputs(); en_wr = 1; ctl_data = 64'h0000_0000_0002_0000; cycle("pair enable");
    idle_inputs(); wr64_en = 1; wr_idx = 4; wr_data = 64'h0000_0007_FFFF_FFFE; cycle("pair write");
    idle_inputs();
    repeat (3) begin swinc_en = 1; swinc_idx = 4; cycle("pair inc"); idle_inputs(); end
    checks++;
    if ({count[5], count[4]} !== 64'h0000_0008_0000_0001) begin
      failures++; $display("FAIL 64-bit carry %h_%h", count[5], count[4]);
    end

    // random operations
    for (int t = 0; t < 20000; t++) begin
      idle_inputs();
      tick1   = ($urandom % 3) == 0;
      tick10  = tick1 && ($urandom % 4) == 0;
      tick100 = tick10 && ($urandom % 4) == 0;
      ext_lvl = N'($urandom); ext_rise = N'($urandom) & ext_lvl;
      st_idx  = 4'($urandom);
      if (t % 2000 == 1999) test_mode = !test_mode;
      case ($urandom % 16)
        0: begin wr32_en = 1; wr_idx = 4'($urandom);
                 wr_data = ($urandom % 2) ? 64'($urandom) : 64'hFFFF_FFFF - 64'($urandom % 4); end
        1: begin wr64_en = 1; wr_idx = 4'($urandom); wr_data = {$urandom, 32'hFFFF_FFF0 | 32'($urandom % 16)}; end
        2, 3: begin swinc_en = 1; swinc_idx = 4'($urandom); end
        4: copy_en = 1;
        5: if ($urandom % 8 == 0) clear_en = 1;
        6: begin en_wr = 1; ctl_data = {$urandom, $urandom} & {$urandom, $urandom}; end
        7: begin cfg_wr = 1; ctl_data = {$urandom, $urandom} & {$urandom, $urandom}; end
        8: begin ld_en = 1; ld_idx = 4'($urandom); ld_word = {4'($urandom), 4'($urandom), $urandom}; end
        default: ;
      endcase
      cycle("random");
    end

    // software reset
    idle_inputs(); soft_rst = 1;
    @(posedge clk); model_reset();
    @(negedge clk); soft_rst = 0; compare("soft reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
