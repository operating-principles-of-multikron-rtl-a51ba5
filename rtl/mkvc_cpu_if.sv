// mkvc_cpu_if: processor handshake of the MultiKron_vc.
//
// An interaction starts when READB or WRITEB is low together with STARTB low:
// the start is the first Node clock edge at which that combined request is
// seen after it was inactive, so either READB/WRITEB or STARTB may be the
// signal that is pulsed. With the CPU wait state enabled (CSR bit 13, taken
// from the WCPU pin at reset) address and data are sampled one clock after
// the start, giving the processor one more cycle of setup; otherwise they are
// sampled at the start edge. The captured access is handed to the core as a
// one-cycle req pulse; the core answers with done and the read data. ACKB is
// then driven low for one Node clock, or for as long as HOLDB is low, and the
// read data is presented (dout_en high) exactly while ACKB is low.
//
// Timing (no wait state): start edge at clock 0, req at clock 1, done at
// clock 2 or later, ACKB low from the next clock. The handshake signals and
// the single ACK cycle follow the chip description; the exact cycle count is
// this design's.
module mkvc_cpu_if
  import mkvc_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  // processor pins (active low)
  input  logic           readb,
  input  logic           writeb,
  input  logic           startb,
  input  logic           holdb,
  input  logic [AW-1:0]  addr_in,
  input  logic [DW-1:0]  din,
  input  logic           wait_cpu,
  output logic           ackb,
  output logic [DW-1:0]  dout,
  output logic           dout_en,
  // core side
  output logic           req_valid,
  output logic           req_write,
  output logic [AW-1:0]  req_addr,
  output logic [DW-1:0]  req_data,
  input  logic           done,
  input  logic [DW-1:0]  rdata
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_BUSY, S_ACK} state_e;
  state_e state;

  logic act, act_q, start;
  assign act   = !startb && (!readb || !writeb);
  assign start = act && !act_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      act_q     <= 1'b0;
      req_valid <= 1'b0;
      req_write <= 1'b0;
      req_addr  <= '0;
      req_data  <= '0;
      dout      <= '0;
    end else begin
      act_q     <= act;
      req_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          req_write <= !writeb;
          if (wait_cpu) begin
            state <= S_WAIT;
          end else begin
            req_addr  <= addr_in;
            req_data  <= din;
            req_valid <= 1'b1;
            state     <= S_BUSY;
          end
        end
        S_WAIT: begin
          req_addr  <= addr_in;
          req_data  <= din;
          req_valid <= 1'b1;
          state     <= S_BUSY;
        end
        S_BUSY: if (done) begin
          dout  <= rdata;
          state <= S_ACK;
        end
        S_ACK: if (holdb) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ackb    = (state != S_ACK);
  assign dout_en = (state == S_ACK) && !req_write;

  // READB/WRITEB (or STARTB) must be released before ACKB is asserted
  assert property (@(posedge clk) disable iff (!rst_n) state == S_ACK |-> !act);

  // The core answers only an access it was given
  assert property (@(posedge clk) disable iff (!rst_n) done |-> state == S_BUSY && !req_valid);

endmodule
