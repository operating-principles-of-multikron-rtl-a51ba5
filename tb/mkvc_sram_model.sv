// mkvc_sram_model: behavioural model of the dedicated counter SRAM
// (64K words of 40 bits, asynchronous, not clocked). Simulation only.
//
// Read: with CE1B low, CE2H high, OEB low and R_WB high, rdata follows the
// addressed word at once (zero access time). Write: with the chip enabled
// and OEB high, the word on wdata is latched at the rising edge of R_WB,
// using the address present at that moment. A two-state simulator has no
// high-impedance value, so a disabled output reads all ones.
// Every word starts at zero; peek/poke give testbenches direct access.
module mkvc_sram_model #(
  parameter int unsigned AW = 16,
  parameter int unsigned DW = 40
) (
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata,
  input  logic          r_wb,
  input  logic          oeb,
  input  logic          ce1b,
  input  logic          ce2h
);
  logic [DW-1:0] mem [2**AW];
  int writes = 0;

  initial for (int i = 0; i < 2**AW; i++) mem[i] = '0;

  logic sel;
  assign sel   = !ce1b && ce2h;
  assign rdata = (sel && !oeb && r_wb) ? mem[addr] : '1;

  always @(posedge r_wb) begin
    if (sel && oeb) begin
      mem[addr] = wdata;
      writes++;
    end
  end

  function automatic logic [DW-1:0] peek(input int a);
    return mem[a];
  endfunction

  function automatic void poke(input int a, input logic [DW-1:0] d);
    mem[a] = d;
  endfunction
endmodule
