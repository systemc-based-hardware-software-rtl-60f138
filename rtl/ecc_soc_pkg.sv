// Shared definitions of the ECC system-on-chip.
//
// Holds the operation codes of the modular arithmetic processor (MAP), the
// bit fields of its 32-bit control and status words, and the word address map
// of the system-bus slave (ecc_soc). The 161-bit operand width and the six
// 32-bit data words per operand follow the MAP port list; the codes, bit
// positions and addresses are this design's own choices, except that the
// multiplication code is 1 as in the reference driver.
package ecc_soc_pkg;

  // Operation codes, control word bits [2:0].
  typedef enum logic [2:0] {
    OP_NONE = 3'd0,
    OP_MUL  = 3'd1,
    OP_DIV  = 3'd2,
    OP_ADD  = 3'd3,
    OP_SUB  = 3'd4
  } map_op_e;

  // Operand-select codes, control word bits [4:3].
  typedef enum logic [1:0] {
    SEL_NONE = 2'd0,
    SEL_X    = 2'd1,
    SEL_Y    = 2'd2,
    SEL_M    = 2'd3
  } map_sel_e;

  localparam int CTRL_OP_LSB  = 0;
  localparam int CTRL_SEL_LSB = 3;
  localparam int CTRL_READ    = 5;
  localparam int STAT_DONE    = 0;

  localparam int MAP_WORDS    = 6;   // 6 x 32 bits carry one 161-bit operand

  // System-bus word addresses.
  localparam logic [7:0] A_MAP_CTRL   = 8'h00;
  localparam logic [7:0] A_MAP_STAT   = 8'h01;
  localparam logic [7:0] A_MAP_DATA   = 8'h02;  // 8'h02..8'h07: data_in0..5 / data_out0..5
  localparam logic [7:0] A_TMR_CTRL   = 8'h10;  // bit0 reset, bit1 start, bit2 stop
  localparam logic [7:0] A_TMR_COUNT  = 8'h11;
  localparam logic [7:0] A_SHA_CTRL   = 8'h20;  // bit0 reset_SHA1 (load H0), bit1 hash_compute
  localparam logic [7:0] A_SHA_STAT   = 8'h21;  // bit0 done, bit1 busy
  localparam logic [7:0] A_SHA_DIGEST = 8'h28;  // 8'h28..8'h2C: H0..H4
  localparam logic [7:0] A_SHA_BLOCK  = 8'h30;  // 8'h30..8'h3F: W0..W15 of the block
  localparam logic [7:0] A_IO1_DATA   = 8'h40;  // write = put_word, read = get_word
  localparam logic [7:0] A_IO1_STAT   = 8'h41;  // bit0 rx word available, bit1 tx full
  localparam logic [7:0] A_IO2_DATA   = 8'h50;
  localparam logic [7:0] A_IO2_STAT   = 8'h51;

endpackage
