// multikron_vc: MultiKron_vc virtual-counter performance instrumentation chip.
//
// A memory-mapped counter device for one node of a multiprocessor. It holds
// NBANK (4) active banks of 16 resource counters; inactive banks live in a
// dedicated 64K x 40-bit SRAM, and the processor pages them in and out with
// STORE, LOAD and SWAP commands, so up to 64K virtual counters are reachable.
// Each counter counts one of: Node clock, Timestamp clock, TSclk/10,
// TSclk/100 (optionally gated by its external pin), external rising edges or
// software increments; an even/odd pair can form one 64-bit counter. A 56-bit
// Timestamp counter, a CSR and a High Order register complete the map.
//
// Address map (12-bit word address, b = bank, n = counter):
//   x000 W soft reset (Timestamp kept)   x001 R/W CSR   x002 R Timestamp
//   (W in test mode)   x003 W increment Timestamp (test mode)   x007 R/W
//   High Order 32-bit register   x1bn R/W 32-bit counter (read copies the
//   bank into the shadows)   x2bn R/W counter pair n,n+1 as 64 bits for even
//   n, 32 bits for odd n (read copies)   x3b0 W clear bank   x3b1 W
//   invalidate   x3b2 R/W bank register   x3b3 R/W Enable register   x3b4
//   R/W Configuration register   x4bn R shadow n (no copy) / W software
//   increment   x5b1 W store   x5b2 W load from SRAM block data[11:0]
//   x5b3 W swap with SRAM block data[11:0]. Unused read bits return 1.
//
// Interface: the processor pins READB, WRITEB, STARTB, HOLDB, ACKB, AC[11:0]
// and the 64-bit data bus (split into d_in, d_out, d_oe); the SRAM pins
// AM[15:0], M[39:0] (m_in, m_out, m_oe), MEM_R_WB, MEM_OEB, MEM_CE1B,
// MEM_CE2H; NODECLK, TSCLK, RESETB (asynchronous), TESTB, OE, WCPU, WMEM and
// the event inputs X[15:0] (X[i] feeds counter i of every bank). OE low turns
// off the data drivers d_oe and m_oe; the other outputs are left to the pads.
//
// Timing: everything runs on the Node clock. For a register access ACKB
// goes low at the second Node clock edge after the start edge (the third
// with the CPU wait state) and stays low one clock or while HOLDB is low.
// STORE, LOAD and SWAP keep the processor waiting until the SRAM transfer has
// ended: 3 clocks per word for a store and 2 per word for a load (4 and 3
// with the SRAM wait state), plus one or two clocks of sequencing.
// The register map, field codes and SRAM behaviour follow the chip
// description; the cycle counts, the decision to acknowledge bank transfers
// only when they end, and the bit position of the bank register's valid flag
// (bit 12) are this design's choices.
module multikron_vc
  import mkvc_pkg::*;
#(
  parameter int unsigned NBANK = 4,
  localparam int unsigned NCNT = 16,
  localparam int unsigned BW   = (NBANK > 1) ? $clog2(NBANK) : 1
) (
  input  logic            node_clk,
  input  logic            ts_clk,
  input  logic            resetb,
  input  logic            testb,
  input  logic            oe,
  input  logic            wcpu,
  input  logic            wmem,
  // processor
  input  logic            readb,
  input  logic            writeb,
  input  logic            startb,
  input  logic            holdb,
  input  logic [AW-1:0]   ac,
  input  logic [DW-1:0]   d_in,
  output logic [DW-1:0]   d_out,
  output logic            d_oe,
  output logic            ackb,
  // external events
  input  logic [NCNT-1:0] x,
  // SRAM
  output logic [MAW-1:0]  am,
  input  logic [MDW-1:0]  m_in,
  output logic [MDW-1:0]  m_out,
  output logic            m_oe,
  output logic            mem_r_wb,
  output logic            mem_oeb,
  output logic            mem_ce1b,
  output logic            mem_ce2h
);

  logic clk, rst_n, test_mode;
  assign clk       = node_clk;
  assign rst_n     = resetb;
  assign test_mode = !testb;

  // ---------------- processor interface ----------------
  logic           req_valid, req_write, core_done, dout_en;
  logic [AW-1:0]  req_addr;
  logic [DW-1:0]  req_data, rdata_q;
  logic           wait_cpu, wait_mem, mode32;

  mkvc_cpu_if u_cpu_if (
    .clk, .rst_n, .readb, .writeb, .startb, .holdb,
    .addr_in (ac), .din (d_in), .wait_cpu,
    .ackb, .dout (d_out), .dout_en,
    .req_valid, .req_write, .req_addr, .req_data,
    .done (core_done), .rdata (rdata_q)
  );
  assign d_oe = dout_en && oe;

  decoded_t dec;
  mkvc_decoder #(.NBANK(NBANK)) u_dec (.addr(req_addr), .dec);

  logic [BW-1:0] bsel;
  assign bsel = dec.bank[BW-1:0];

  logic rd, wr;
  assign rd = req_valid && !req_write;
  assign wr = req_valid &&  req_write;

  // ---------------- CSR and High Order register ----------------
  logic        soft_rst;
  logic [15:0] csr_rd;
  logic [31:0] hi, wdata_hi;
  logic        cap_en;
  logic [DW-1:0] wdata;

  assign soft_rst = wr && dec.kind == A_SOFT_RESET;

  mkvc_csr u_csr (
    .clk, .rst_n, .soft_rst, .wcpu_pin (wcpu), .wmem_pin (wmem),
    .wr_en (wr && dec.kind == A_CSR), .wr_data (req_data[15:0]),
    .rd_data (csr_rd), .mode32, .wait_cpu, .wait_mem
  );

  mkvc_hi_reg u_hi (
    .clk, .rst_n, .soft_rst, .mode32,
    .wr_en (wr && dec.kind == A_HI_REG), .wr_data (req_data[31:0]),
    .cap_en, .cap_data (rdata_q[63:32]), .pin_hi (req_data[63:32]),
    .hi, .wdata_hi
  );
  assign wdata = {wdata_hi, req_data[31:0]};

  // ---------------- clocks, events, Timestamp ----------------
  logic            ts_rise, tick1, tick10, tick100;
  logic [NCNT-1:0] ext_lvl, ext_rise;
  logic [TSW-1:0]  ts;

  mkvc_input_sync #(.NEXT(NCNT)) u_sync (
    .clk, .rst_n, .ts_clk, .ext (x), .ts_rise, .ext_lvl, .ext_rise
  );

  mkvc_timestamp u_ts (
    .clk, .rst_n, .ts_rise, .test_mode,
    .wr_en (wr && dec.kind == A_TS), .wr_data (wdata[TSW-1:0]),
    .inc_en (wr && dec.kind == A_TS_INC),
    .ts, .tick1, .tick10, .tick100
  );

  // ---------------- bank registers and SRAM sequencer ----------------
  logic [NBANK-1:0][HOMEW-1:0] home;
  logic [NBANK-1:0]            valid;
  logic                        sram_start, sram_busy, sram_done, breg_wr;
  logic [BW-1:0]               sel_bank;
  logic [HOMEW-1:0]            breg_home;
  logic [3:0]                  st_idx, ld_idx;
  logic                        ld_en;
  sram_word_t                  st_word, ld_word;
  bank_op_e                    sram_op;
  logic                        m_oe_int;

  always_comb begin
    unique case (dec.kind)
      A_LOAD:  sram_op = OP_LOAD;
      A_SWAP:  sram_op = OP_SWAP;
      default: sram_op = OP_STORE;
    endcase
  end
  assign sram_start = wr && dec.kind inside {A_STORE, A_LOAD, A_SWAP};

  mkvc_bank_regs #(.NBANK(NBANK)) u_bregs (
    .clk, .rst_n, .soft_rst,
    .wr_en   (breg_wr || (wr && dec.kind == A_BANK_REG)),
    .wr_bank (breg_wr ? sel_bank : bsel),
    .wr_home (breg_wr ? breg_home : wdata[HOMEW-1:0]),
    .inv_en  (wr && dec.kind == A_INVALIDATE), .inv_bank (bsel),
    .home, .valid
  );

  mkvc_sram_ctrl #(.NBANK(NBANK)) u_sram (
    .clk, .rst_n, .soft_rst, .wait_mem,
    .start (sram_start), .op (sram_op), .bank (bsel), .new_home (wdata[HOMEW-1:0]),
    .busy (sram_busy), .done (sram_done),
    .sel_bank, .cur_home (home[sel_bank]), .cur_valid (valid[sel_bank]),
    .breg_wr, .breg_home,
    .st_idx, .st_word, .ld_en, .ld_idx, .ld_word,
    .mem_addr (am), .mem_wdata (m_out), .mem_wdrive (m_oe_int), .mem_rdata (m_in),
    .mem_r_wb, .mem_oeb, .mem_ce1b, .mem_ce2h
  );
  assign m_oe = m_oe_int && oe;

  // ---------------- counter banks ----------------
  logic [NBANK-1:0][NCNT-1:0][CW-1:0] count, shadow;
  logic [NBANK-1:0][4*NCNT-1:0]       en_reg, cfg_reg;
  sram_word_t [NBANK-1:0]             st_words;

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    logic hit;
    assign hit = (bsel == b[BW-1:0]);
    mkvc_counter_bank #(.NCNT(NCNT)) u_bank (
      .clk, .rst_n, .soft_rst, .test_mode,
      .tick1, .tick10, .tick100, .ext_lvl, .ext_rise,
      .wr32_en  (hit && wr && (dec.kind == A_CNT32 ||
                               (dec.kind == A_CNT_PAIR && dec.idx[0]))),
      .wr64_en  (hit && wr && dec.kind == A_CNT_PAIR && !dec.idx[0]),
      .wr_idx   (dec.idx),
      .wr_data  (wdata),
      .swinc_en (hit && wr && dec.kind == A_CNT_NOCOPY),
      .swinc_idx(dec.idx),
      .copy_en  (hit && rd && dec.kind inside {A_CNT32, A_CNT_PAIR}),
      .clear_en (hit && wr && dec.kind == A_CLEAR_BANK),
      .en_wr    (hit && wr && dec.kind == A_ENABLE_REG),
      .cfg_wr   (hit && wr && dec.kind == A_CONFIG_REG),
      .ctl_data (wdata),
      .ld_en    (ld_en && sel_bank == b[BW-1:0]),
      .ld_idx, .ld_word,
      .st_idx,  .st_word (st_words[b]),
      .count (count[b]), .shadow (shadow[b]),
      .en_reg (en_reg[b]), .cfg_reg (cfg_reg[b])
    );
  end
  assign st_word = st_words[sel_bank];

  // ---------------- read data and completion ----------------
  logic [DW-1:0] rd_mux;
  always_comb begin
    rd_mux = '1;
    unique case (dec.kind)
      A_CSR:        rd_mux = {48'hFFFF_FFFF_FFFF, csr_rd};
      A_TS:         rd_mux = {8'hFF, ts};
      A_HI_REG:     rd_mux = {32'hFFFF_FFFF, hi};
      A_CNT32:      rd_mux = {32'hFFFF_FFFF, count[bsel][dec.idx]};
      A_CNT_PAIR:   rd_mux = dec.idx[0] ? {32'hFFFF_FFFF, count[bsel][dec.idx]}
                                        : {count[bsel][dec.idx + 4'd1], count[bsel][dec.idx]};
      A_BANK_REG:   rd_mux = {{(DW-HOMEW-1){1'b1}}, valid[bsel], home[bsel]};
      A_ENABLE_REG: rd_mux = en_reg[bsel];
      A_CONFIG_REG: rd_mux = cfg_reg[bsel];
      A_CNT_NOCOPY: rd_mux = {32'hFFFF_FFFF, shadow[bsel][dec.idx]};
      default:      rd_mux = '1;
    endcase
  end

  logic reg_done, cap_pending;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_done    <= 1'b0;
      cap_pending <= 1'b0;
      rdata_q     <= '1;
    end else begin
      reg_done    <= req_valid && !sram_start;
      cap_pending <= rd && dec.kind != A_HI_REG;
      if (rd) rdata_q <= rd_mux;
    end
  end
  assign core_done = reg_done || sram_done;
  assign cap_en    = cap_pending;

  // A bank transfer holds the processor handshake, so no access arrives
  // while the SRAM sequencer is working
  assert property (@(posedge clk) disable iff (!rst_n) sram_busy |-> !req_valid);

endmodule
