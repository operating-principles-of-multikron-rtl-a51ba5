// mkvc_hi_reg: High Order 32-bit Register, the bridge to 32-bit processors.
//
// In 32-bit mode the upper half (bits 63:32) of every processor write is
// taken from this register instead of from data pins 32-63; in 64-bit mode
// the pins are used. On every processor read the upper half of the read data
// is copied into the register (cap_en), so a 32-bit processor fetches it with
// a second read. The register is also read and written directly (address x7).
// This follows the chip description; a direct read of the register itself
// does not capture (the core does not pulse cap_en for it), which is this
// design's choice. Both resets clear it. Updates happen at the clock edge.
module mkvc_hi_reg
  import mkvc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        soft_rst,
  input  logic        mode32,
  input  logic        wr_en,      // direct write (address x7)
  input  logic [31:0] wr_data,
  input  logic        cap_en,     // processor read completing
  input  logic [31:0] cap_data,   // bits 63:32 of the read data
  input  logic [31:0] pin_hi,     // bits 63:32 from the data pins
  output logic [31:0] hi,
  output logic [31:0] wdata_hi    // bits 63:32 the core should use for writes
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        hi <= '0;
    else if (soft_rst) hi <= '0;
    else if (wr_en)    hi <= wr_data;
    else if (cap_en)   hi <= cap_data;
  end

  assign wdata_hi = mode32 ? hi : pin_hi;

endmodule
