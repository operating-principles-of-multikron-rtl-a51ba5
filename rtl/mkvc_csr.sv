// mkvc_csr: Control and Status Register of the MultiKron_vc (16 bits).
//
// Bit 12 reports the SRAM wait state and bit 13 the CPU wait state. Both are
// read-only and are copied from the WMEM and WCPU pins on every Node clock
// while a hardware reset (RESETB low) or a software reset is in progress, so
// they hold the pin levels seen last during reset. Bit 14 reads 1 in 32-bit
// data mode. Writing a 1 to bit 14 selects 32-bit mode, writing a 1 to bit 15
// selects 64-bit mode (the reset default), writing 0 changes nothing. Other
// bits read 0 and ignore writes.
//
// Bit layout from the chip's CSR table. This design's choices: a write with
// both bits 14 and 15 set leaves the mode unchanged, and the mode flop is
// cleared by both resets. Writes take effect at the clock edge of wr_en.
module mkvc_csr
  import mkvc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,      // RESETB, asynchronous
  input  logic        soft_rst,   // software reset pulse
  input  logic        wcpu_pin,
  input  logic        wmem_pin,
  input  logic        wr_en,
  input  logic [15:0] wr_data,
  output logic [15:0] rd_data,
  output logic        mode32,
  output logic        wait_cpu,
  output logic        wait_mem
);

  // Wait-state bits follow the pins while either reset is active
  always_ff @(posedge clk) begin
    if (!rst_n || soft_rst) begin
      wait_cpu <= wcpu_pin;
      wait_mem <= wmem_pin;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          mode32 <= 1'b0;
    else if (soft_rst)   mode32 <= 1'b0;
    else if (wr_en) begin
      if (wr_data[14] && !wr_data[15])      mode32 <= 1'b1;
      else if (wr_data[15] && !wr_data[14]) mode32 <= 1'b0;
    end
  end

  assign rd_data = {1'b0, mode32, wait_cpu, wait_mem, 12'h000};

endmodule
