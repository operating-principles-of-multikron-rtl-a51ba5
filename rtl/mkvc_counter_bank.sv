// mkvc_counter_bank: one bank of sixteen 32-bit resource counters.
//
// Every counter has a 4-bit Configuration field that picks its counting
// source and a 4-bit Enable field that starts or stops it:
//   cfg 0001-0011  rising edges of its external signal X[i]
//   cfg 0100-0110  software increment (processor command, swinc_en)
//   cfg 0111       odd counter: upper half of a 64-bit counter whose lower
//                  half is the even counter below it (counts the carry out);
//                  even counter: software increment
//   cfg 1000-1011  Timestamp clock, Node clock, TSclk/10, TSclk/100, each
//                  counted only while X[i] is high
//   cfg 1100-1111  the same four clocks ungated (1111 is the reset default)
//   en  xx01 disable (default), xx10 enable, xx11 clear and enable
// Writing a 0 field to either control register leaves that counter's field
// unchanged, so experimenters can share a bank. Counters wrap at 2^32.
//
// Shadow registers: copy_en copies all sixteen live counts into the shadow
// registers in one clock, so a group of reads sees one instant; the core
// reads live counts for read-with-copy and shadows for read-without-copy.
// The SRAM port reads one counter with its two fields as a 40-bit word
// (st_idx -> st_word, combinational) and writes one back (ld_en).
//
// Per clock, a counter takes the first that applies: SRAM load, processor
// write, bank clear, clear-and-enable, increment. In test mode the hardware
// sources do not count, and a software increment steps the addressed
// counter whatever its source and Enable field (the chip's test mode lets the
// processor write and increment every counter).
//
// Source codes and field semantics follow the chip's register tables. This
// design's choices: the upper half of a 64-bit pair follows only the carry of
// the lower half (its own Enable field is not consulted), clear-and-enable of
// the lower half clears the upper half too, a software increment also needs
// the counter enabled, and the stored Enable field reads back as 0001 or 0010.
module mkvc_counter_bank
  import mkvc_pkg::*;
#(
  parameter int unsigned NCNT = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      soft_rst,
  input  logic                      test_mode,
  // counting sources
  input  logic                      tick1,
  input  logic                      tick10,
  input  logic                      tick100,
  input  logic [NCNT-1:0]           ext_lvl,
  input  logic [NCNT-1:0]           ext_rise,
  // processor operations (at most one per clock)
  input  logic                      wr32_en,    // write counter wr_idx
  input  logic                      wr64_en,    // write pair wr_idx (even), wr_idx+1
  input  logic [3:0]                wr_idx,
  input  logic [DW-1:0]             wr_data,
  input  logic                      swinc_en,
  input  logic [3:0]                swinc_idx,
  input  logic                      copy_en,
  input  logic                      clear_en,
  input  logic                      en_wr,
  input  logic                      cfg_wr,
  input  logic [4*NCNT-1:0]         ctl_data,
  // SRAM word port
  input  logic                      ld_en,
  input  logic [3:0]                ld_idx,
  input  sram_word_t                ld_word,
  input  logic [3:0]                st_idx,
  output sram_word_t                st_word,
  // state
  output logic [NCNT-1:0][CW-1:0]   count,
  output logic [NCNT-1:0][CW-1:0]   shadow,
  output logic [4*NCNT-1:0]         en_reg,
  output logic [4*NCNT-1:0]         cfg_reg
);

  logic [NCNT-1:0]       en_q;
  logic [NCNT-1:0][3:0]  cfg_q;
  logic [NCNT-1:0]       hw_ev, sw_ev, tm_ev, inc_lo, inc, wr_hit, rst_en_hit;

  // Increment requests
  always_comb begin
    for (int i = 0; i < NCNT; i++) begin
      unique case (cfg_q[i])
        CFG_EXT1, CFG_EXT2, CFG_EXT3: hw_ev[i] = ext_rise[i];
        CFG_TS_G:                     hw_ev[i] = tick1   && ext_lvl[i];
        CFG_NODE_G:                   hw_ev[i] = ext_lvl[i];
        CFG_TS10_G:                   hw_ev[i] = tick10  && ext_lvl[i];
        CFG_TS100_G:                  hw_ev[i] = tick100 && ext_lvl[i];
        CFG_TS:                       hw_ev[i] = tick1;
        CFG_NODE:                     hw_ev[i] = 1'b1;
        CFG_TS10:                     hw_ev[i] = tick10;
        CFG_TS100:                    hw_ev[i] = tick100;
        default:                      hw_ev[i] = 1'b0;
      endcase
      sw_ev[i] = swinc_en && (swinc_idx == i[3:0]) &&
                 (cfg_q[i] inside {CFG_SW1, CFG_SW2, CFG_SW3} ||
                  (cfg_q[i] == CFG_DBL && i % 2 == 0));
      // test mode: the processor may step any counter, whatever its source
      tm_ev[i] = test_mode && swinc_en && (swinc_idx == i[3:0]);
      inc_lo[i] = (en_q[i] && ((hw_ev[i] && !test_mode) || sw_ev[i])) || tm_ev[i];
    end
    for (int i = 0; i < NCNT; i++) begin
      if (i % 2 == 1 && cfg_q[i] == CFG_DBL)
        inc[i] = (inc_lo[i-1] && (count[i-1] == {CW{1'b1}})) || tm_ev[i];
      else
        inc[i] = inc_lo[i];
    end
  end

  // Which counters a processor write or clear-and-enable touches
  always_comb begin
    for (int i = 0; i < NCNT; i++) begin
      wr_hit[i] = (wr32_en && wr_idx == i[3:0]) ||
                  (wr64_en && wr_idx == i[3:0]) ||
                  (wr64_en && !wr_idx[0] && wr_idx + 4'd1 == i[3:0]);
      rst_en_hit[i] = en_wr && ctl_data[4*i +: 2] == EN_RST_EN;
      if (i % 2 == 1 && cfg_q[i] == CFG_DBL && en_wr && ctl_data[4*(i-1) +: 2] == EN_RST_EN)
        rst_en_hit[i] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count  <= '0;
      shadow <= '0;
      en_q   <= '0;
      cfg_q  <= {NCNT{CFG_TS100}};
    end else if (soft_rst) begin
      count  <= '0;
      shadow <= '0;
      en_q   <= '0;
      cfg_q  <= {NCNT{CFG_TS100}};
    end else begin
      if (copy_en) shadow <= count;
      for (int i = 0; i < NCNT; i++) begin
        // counter value
        if (ld_en && ld_idx == i[3:0])
          count[i] <= ld_word.count;
        else if (wr_hit[i])
          count[i] <= (wr64_en && wr_idx != i[3:0]) ? wr_data[DW-1:CW] : wr_data[CW-1:0];
        else if (clear_en || rst_en_hit[i])
          count[i] <= '0;
        else if (inc[i])
          count[i] <= count[i] + 1'b1;
        // control fields
        if (ld_en && ld_idx == i[3:0]) begin
          en_q[i]  <= ld_word.en[1];
          cfg_q[i] <= ld_word.cfg;
        end else begin
          if (en_wr && ctl_data[4*i +: 2] != EN_NOP)
            en_q[i] <= ctl_data[4*i + 1];
          if (cfg_wr && ctl_data[4*i +: 4] != CFG_NOP)
            cfg_q[i] <= ctl_data[4*i +: 4];
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NCNT; i++) begin
      en_reg[4*i +: 4]  = {2'b00, en_q[i], !en_q[i]};
      cfg_reg[4*i +: 4] = cfg_q[i];
    end
  end

  assign st_word = '{cfg: cfg_q[st_idx], en: {2'b00, en_q[st_idx], !en_q[st_idx]}, count: count[st_idx]};

  // Only one processor operation is issued per clock
  assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({wr32_en, wr64_en, swinc_en, clear_en, en_wr, cfg_wr}));

endmodule
