// map: Modular Arithmetic Processor: modular arithmetic on 161-bit operands.
//
// The hardware accelerator of the ECC system: modular addition, subtraction,
// multiplication and division modulo a prime p, used by the processor's
// point-addition and point-doubling software. It is bus_interface (word
// registers to DATA_WIDTH-bit operands) in front of map_core (the four arithmetic
// units), as in the original design's structure of the MAP.
//
// The operand width of 161 bits (the original design's MAP signal width) covers the
// 160-bit prime p of the curve secp160r1 and also its 161-bit group order n,
// so the same unit serves curve arithmetic (mod p) and ECDSA signature
// arithmetic (mod n). The six 32-bit words carry 192 bits; bits above
// DATA_WIDTH are ignored on input and read as zero on output.
//
// Driver sequence, with the control fields of ecc_soc_pkg:
//   1. for each of x, y, m: put the six words on data_in0..5 and set the
//      operand-select field (one clock is enough)
//   2. write the opcode (OP_MUL, OP_DIV, OP_ADD, OP_SUB) with select = 0
//   3. poll ECC_status[STAT_DONE]
//   4. add the read bit to control and read data_out0..5 (z, word 0 lowest)
//   5. write control = 0
// Results: mul z = y*x mod m, div z = y/x mod m, add z = y+x mod m,
// sub z = y-x mod m. Inputs must be below m; m must be an odd prime for div.
// Latency from step 2 to done: 1 cycle of opcode decode plus the unit's own
// latency (add/sub 3, mul 3*bitlen(y)+3, div up to about 2*DATA_WIDTH+3).
module map
  import ecc_soc_pkg::*;
#(
  parameter int DATA_WIDTH = 161
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] ECC_control,
  input  logic [31:0] data_in  [MAP_WORDS],
  output logic [31:0] ECC_status,
  output logic [31:0] data_out [MAP_WORDS]
);
  map_op_e               sig_op;
  logic [DATA_WIDTH-1:0] sig_x, sig_y, sig_m, sig_z;
  logic                  sig_done;

  bus_interface #(.DATA_WIDTH(DATA_WIDTH)) u_bus_interface (
    .clk, .rst_n,
    .control (ECC_control),
    .data_in,
    .status  (ECC_status),
    .data_out,
    .opcode  (sig_op),
    .x (sig_x), .y (sig_y), .m (sig_m), .z (sig_z),
    .done    (sig_done)
  );

  map_core #(.DATA_WIDTH(DATA_WIDTH)) u_map_core (
    .clk, .rst_n,
    .opcode (sig_op),
    .x (sig_x), .y (sig_y), .m (sig_m),
    .z (sig_z), .done (sig_done)
  );
endmodule
