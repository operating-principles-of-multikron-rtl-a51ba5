// mkvc_decoder: classifies a 12-bit MultiKron_vc word address.
//
// The address splits into a 4-bit command (bits 11:8), a 4-bit bank field b
// (bits 7:4) and a 4-bit counter or operation field n (bits 3:0). Command 0 is
// the general command with a sparse 8-bit operation; commands 1, 2 and 4 act
// on counter n of bank b; commands 3 and 5 are bank operations selected by
// the low field. Commands 6 to 15, unused command 0 operations and banks that
// are not built (b >= NBANK) decode to A_NONE. The map is the chip's address
// table; the enum that carries the result is this design's.
//
// Purely combinational: addr -> dec.
module mkvc_decoder
  import mkvc_pkg::*;
#(
  parameter int unsigned NBANK = 4
) (
  input  logic [AW-1:0] addr,
  output decoded_t      dec
);

  logic [3:0] cmd;
  assign cmd = addr[11:8];

  always_comb begin
    dec.bank = addr[7:4];
    dec.idx  = addr[3:0];
    dec.kind = A_NONE;
    unique case (cmd)
      4'h0: begin
        unique case (addr[7:0])
          8'h00:   dec.kind = A_SOFT_RESET;
          8'h01:   dec.kind = A_CSR;
          8'h02:   dec.kind = A_TS;
          8'h03:   dec.kind = A_TS_INC;
          8'h07:   dec.kind = A_HI_REG;
          default: dec.kind = A_NONE;
        endcase
      end
      4'h1: dec.kind = A_CNT32;
      4'h2: dec.kind = A_CNT_PAIR;
      4'h3: begin
        unique case (addr[3:0])
          4'h0:    dec.kind = A_CLEAR_BANK;
          4'h1:    dec.kind = A_INVALIDATE;
          4'h2:    dec.kind = A_BANK_REG;
          4'h3:    dec.kind = A_ENABLE_REG;
          4'h4:    dec.kind = A_CONFIG_REG;
          default: dec.kind = A_NONE;
        endcase
      end
      4'h4: dec.kind = A_CNT_NOCOPY;
      4'h5: begin
        unique case (addr[3:0])
          4'h1:    dec.kind = A_STORE;
          4'h2:    dec.kind = A_LOAD;
          4'h3:    dec.kind = A_SWAP;
          default: dec.kind = A_NONE;
        endcase
      end
      default: dec.kind = A_NONE;
    endcase
    // Bank-addressed commands on banks that are not built do nothing
    if (cmd != 4'h0 && {28'd0, addr[7:4]} >= NBANK) dec.kind = A_NONE;
  end

endmodule
