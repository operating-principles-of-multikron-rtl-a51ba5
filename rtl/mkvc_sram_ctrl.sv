// mkvc_sram_ctrl: moves a whole counter bank between the chip and its
// dedicated SRAM (STORE, LOAD, SWAP).
//
// The SRAM address is {home address (12 bits, from the bank register),
// word counter (4 bits)}. The word counter starts at 15 and counts down; the
// command ends after word 0. One SRAM word (40 bits) carries one 32-bit
// counter with its 4-bit Enable and Configuration fields.
//   STORE: skipped entirely if the bank register is invalid. Otherwise, per
//          word: SETUP (address out, R_WB high, data captured from the bank),
//          PULSE (R_WB low, data driven; two clocks with the SRAM wait state),
//          HOLD (R_WB back high: the SRAM latches on this rising edge, address
//          and data still held). OEB stays high.
//   LOAD:  first writes the new home address (low 12 bits of the processor
//          data) into the bank register, which sets valid. Then OEB low, R_WB
//          high, and per word: ADDR (address out; one extra clock with the wait
//          state), SAMPLE (address held, word written into the bank).
//   SWAP:  STORE (if valid) followed by LOAD into the same bank.
// CE1B low and CE2H high for the whole command. done pulses for one clock at
// the end. Cycle counts: STORE 3 clocks per word (4 with the wait state),
// LOAD 2 per word (3), plus one clock to start LOAD and one for done.
//
// The address composition, the down counter, the control levels and the
// store/load order follow the chip description. The number of clocks per
// phase and the SRAM word layout {cfg, en, count} are this design's.
// The SRAM strobes are decoded from registered state and word counter.
module mkvc_sram_ctrl
  import mkvc_pkg::*;
#(
  parameter int unsigned NBANK = 4,
  localparam int unsigned BW   = (NBANK > 1) ? $clog2(NBANK) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             soft_rst,
  input  logic             wait_mem,
  // command
  input  logic             start,
  input  bank_op_e         op,
  input  logic [BW-1:0]    bank,
  input  logic [HOMEW-1:0] new_home,
  output logic             busy,
  output logic             done,
  // bank register of the selected bank
  output logic [BW-1:0]    sel_bank,
  input  logic [HOMEW-1:0] cur_home,
  input  logic             cur_valid,
  output logic             breg_wr,
  output logic [HOMEW-1:0] breg_home,
  // counter bank word port
  output logic [3:0]       st_idx,
  input  sram_word_t       st_word,
  output logic             ld_en,
  output logic [3:0]       ld_idx,
  output sram_word_t       ld_word,
  // SRAM pins
  output logic [MAW-1:0]   mem_addr,
  output logic [MDW-1:0]   mem_wdata,
  output logic             mem_wdrive,
  input  logic [MDW-1:0]   mem_rdata,
  output logic             mem_r_wb,
  output logic             mem_oeb,
  output logic             mem_ce1b,
  output logic             mem_ce2h
);

  typedef enum logic [3:0] {
    S_IDLE, S_ST_CHECK, S_ST_SETUP, S_ST_PULSE, S_ST_HOLD,
    S_LD_INIT, S_LD_ADDR, S_LD_WAIT, S_LD_SAMPLE, S_DONE
  } state_e;

  state_e           state;
  bank_op_e         op_q;
  logic [3:0]       wcnt;
  logic             pulse2;
  logic [HOMEW-1:0] home_q;
  sram_word_t       wdata_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      op_q     <= OP_STORE;
      sel_bank <= '0;
      wcnt     <= '0;
      pulse2   <= 1'b0;
      home_q   <= '0;
      wdata_q  <= '0;
    end else if (soft_rst) begin
      state    <= S_IDLE;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          op_q     <= op;
          sel_bank <= bank;
          home_q   <= new_home;
          wcnt     <= 4'hF;
          state    <= (op == OP_LOAD) ? S_LD_INIT : S_ST_CHECK;
        end
        S_ST_CHECK: state <= cur_valid ? S_ST_SETUP :
                             (op_q == OP_SWAP) ? S_LD_INIT : S_DONE;
        S_ST_SETUP: begin
          wdata_q <= st_word;
          pulse2  <= wait_mem;
          state   <= S_ST_PULSE;
        end
        S_ST_PULSE: begin
          pulse2 <= 1'b0;
          if (!pulse2) state <= S_ST_HOLD;
        end
        S_ST_HOLD: begin
          if (wcnt == 4'd0) begin
            wcnt  <= 4'hF;
            state <= (op_q == OP_SWAP) ? S_LD_INIT : S_DONE;
          end else begin
            wcnt  <= wcnt - 1'b1;
            state <= S_ST_SETUP;
          end
        end
        S_LD_INIT: state <= S_LD_ADDR;
        S_LD_ADDR: state <= wait_mem ? S_LD_WAIT : S_LD_SAMPLE;
        S_LD_WAIT: state <= S_LD_SAMPLE;
        S_LD_SAMPLE: begin
          if (wcnt == 4'd0) begin
            state <= S_DONE;
          end else begin
            wcnt  <= wcnt - 1'b1;
            state <= S_LD_ADDR;
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  logic in_store, in_load;
  assign in_store = state inside {S_ST_SETUP, S_ST_PULSE, S_ST_HOLD};
  assign in_load  = state inside {S_LD_ADDR, S_LD_WAIT, S_LD_SAMPLE};

  assign busy      = (state != S_IDLE);
  assign done      = (state == S_DONE);
  assign breg_wr   = (state == S_LD_INIT);
  assign breg_home = home_q;

  assign st_idx  = wcnt;
  assign ld_en   = (state == S_LD_SAMPLE);
  assign ld_idx  = wcnt;
  assign ld_word = mem_rdata;

  assign mem_addr   = {cur_home, wcnt};
  assign mem_wdata  = wdata_q;
  assign mem_wdrive = state inside {S_ST_PULSE, S_ST_HOLD};
  assign mem_r_wb   = (state != S_ST_PULSE);
  assign mem_oeb    = !in_load;
  assign mem_ce1b   = !(in_store || in_load);
  assign mem_ce2h   = in_store || in_load;

  // The bank register of a LOAD is written before any SRAM word is read
  assert property (@(posedge clk) disable iff (!rst_n)
    state == S_LD_INIT |=> cur_home == home_q);

endmodule
