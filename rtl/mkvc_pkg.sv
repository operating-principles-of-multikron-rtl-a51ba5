// mkvc_pkg: types and constants shared by the MultiKron_vc virtual-counter chip.
//
// The chip is a memory-mapped performance counter device. A 12-bit word
// address selects a 4-bit command, a 4-bit bank field and a 4-bit counter or
// operation field. The 4-bit Configuration codes (counting source) and Enable
// codes follow the chip's register tables; the struct layouts, the decoded
// access enum and the SRAM word layout are this design's choices.
package mkvc_pkg;

  localparam int unsigned DW      = 64;  // processor data path
  localparam int unsigned AW      = 12;  // MultiKron address field
  localparam int unsigned CW      = 32;  // one resource counter
  localparam int unsigned TSW     = 56;  // timestamp width
  localparam int unsigned HOMEW   = 12;  // bank register (home address) width
  localparam int unsigned MAW     = 16;  // SRAM address width
  localparam int unsigned MDW     = 40;  // SRAM data width: counter + enable + config

  // Configuration field (counting source), one per counter
  typedef enum logic [3:0] {
    CFG_NOP       = 4'b0000,  // writing 0 leaves the field unchanged
    CFG_EXT1      = 4'b0001,  // 0001..0011: rising edges of the external signal
    CFG_EXT2      = 4'b0010,
    CFG_EXT3      = 4'b0011,
    CFG_SW1       = 4'b0100,  // 0100..0110: software increment
    CFG_SW2       = 4'b0101,
    CFG_SW3       = 4'b0110,
    CFG_DBL       = 4'b0111,  // odd: high half of 64-bit pair; even: software increment
    CFG_TS_G      = 4'b1000,  // Timestamp clock gated by EXT high
    CFG_NODE_G    = 4'b1001,  // Node clock gated by EXT high
    CFG_TS10_G    = 4'b1010,  // TSclk/10 gated by EXT high
    CFG_TS100_G   = 4'b1011,  // TSclk/100 gated by EXT high
    CFG_TS        = 4'b1100,  // Timestamp clock
    CFG_NODE      = 4'b1101,  // Node clock
    CFG_TS10      = 4'b1110,  // TSclk/10
    CFG_TS100     = 4'b1111   // TSclk/100 (reset default)
  } cfg_code_e;

  // Enable field: only the two low bits are decoded
  localparam logic [1:0] EN_NOP       = 2'b00;
  localparam logic [1:0] EN_DISABLE   = 2'b01;  // reset default
  localparam logic [1:0] EN_ENABLE    = 2'b10;
  localparam logic [1:0] EN_RST_EN    = 2'b11;

  // Decoded processor access
  typedef enum logic [4:0] {
    A_NONE,        // undefined address: reads return ones, writes ignored
    A_SOFT_RESET,  // x000 write
    A_CSR,         // x001
    A_TS,          // x002 (write only in test mode)
    A_TS_INC,      // x003 write, test mode only
    A_HI_REG,      // x007
    A_CNT32,       // x1bn: 32-bit counter, read with copy
    A_CNT_PAIR,    // x2bn: even n 64-bit pair, odd n 32-bit; read with copy
    A_CLEAR_BANK,  // x3b0 write
    A_INVALIDATE,  // x3b1 write
    A_BANK_REG,    // x3b2
    A_ENABLE_REG,  // x3b3
    A_CONFIG_REG,  // x3b4
    A_CNT_NOCOPY,  // x4bn: read without copy / software increment on write
    A_STORE,       // x5b1 write
    A_LOAD,        // x5b2 write
    A_SWAP         // x5b3 write
  } access_e;

  typedef struct packed {
    access_e     kind;
    logic [3:0]  bank;   // b field
    logic [3:0]  idx;    // n field (counter) or operation
  } decoded_t;

  // One SRAM word: a counter with its two 4-bit control fields
  typedef struct packed {
    logic [3:0]    cfg;
    logic [3:0]    en;
    logic [CW-1:0] count;
  } sram_word_t;

  typedef enum logic [1:0] {
    OP_STORE = 2'd1,
    OP_LOAD  = 2'd2,
    OP_SWAP  = 2'd3
  } bank_op_e;

endpackage
