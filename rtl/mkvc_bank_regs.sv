// mkvc_bank_regs: the bank registers, one per counter bank.
//
// Each register holds the 12-bit home address of the counter bank that is
// currently active in that slot, i.e. the upper 12 bits of the SRAM address
// where the bank is stored, plus a valid bit. Writing a home address (by the
// processor, or by a LOAD/SWAP taking its new address) sets valid; only the
// separate invalidate command clears it. An invalid bank is not written back
// by STORE or by the store half of SWAP. Both resets clear home and valid.
// Behaviour follows the chip description; the reset values are this design's.
// Writes take effect at the clock edge; the outputs are the flops.
module mkvc_bank_regs
  import mkvc_pkg::*;
#(
  parameter int unsigned NBANK = 4,
  localparam int unsigned BW   = (NBANK > 1) ? $clog2(NBANK) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         soft_rst,
  input  logic                         wr_en,
  input  logic [BW-1:0]                wr_bank,
  input  logic [HOMEW-1:0]             wr_home,
  input  logic                         inv_en,
  input  logic [BW-1:0]                inv_bank,
  output logic [NBANK-1:0][HOMEW-1:0]  home,
  output logic [NBANK-1:0]             valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      home  <= '0;
      valid <= '0;
    end else if (soft_rst) begin
      home  <= '0;
      valid <= '0;
    end else begin
      if (inv_en) valid[inv_bank] <= 1'b0;
      if (wr_en) begin
        home[wr_bank]  <= wr_home;
        valid[wr_bank] <= 1'b1;
      end
    end
  end

endmodule
