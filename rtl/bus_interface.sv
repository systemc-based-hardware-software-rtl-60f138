// bus_interface: word interface between the system bus side and map_core.
//
// The processor sees the MAP as one 32-bit control word, one 32-bit status
// word, six 32-bit input words and six 32-bit output words. This block turns
// them into the DATA_WIDTH-bit (161) operands, the opcode, and back:
//   operand      : while the operand-select field of control is X, Y or M,
//                  the six input words (data_in0 least significant) are
//                  captured into that operand register every clock
//   control_conv : the opcode field drives map_core (OP_NONE while an
//                  operand is being selected)
//   status_conv  : status bit STAT_DONE mirrors the core's done
//   result       : while the read bit of control is set, z appears on the
//                  six output words; otherwise they read zero
// A control word of zero (the driver's "clear") drops the opcode, which
// idles the core and clears done.
//
// Timing: an operand is in its register one clock after the select code and
// data are presented. Field positions are defined in ecc_soc_pkg and are this
// design's choice; the original design gives the port list, the sub-process names
// and the driver sequence (write x, y, m; set opcode; poll done; set read;
// read z; clear).
module bus_interface
  import ecc_soc_pkg::*;
#(
  parameter int DATA_WIDTH = 161
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [31:0]           control,
  input  logic [31:0]           data_in  [MAP_WORDS],
  output logic [31:0]           status,
  output logic [31:0]           data_out [MAP_WORDS],
  output map_op_e               opcode,
  output logic [DATA_WIDTH-1:0] x,
  output logic [DATA_WIDTH-1:0] y,
  output logic [DATA_WIDTH-1:0] m,
  input  logic [DATA_WIDTH-1:0] z,
  input  logic                  done
);
  localparam int BUS_BITS = 32 * MAP_WORDS;

  map_sel_e              sel;
  logic                  rd;
  logic [BUS_BITS-1:0]   map_input;
  logic [BUS_BITS-1:0]   z_wide;

  assign sel = map_sel_e'(control[CTRL_SEL_LSB +: 2]);
  assign rd  = control[CTRL_READ];

  always_comb begin
    for (int i = 0; i < MAP_WORDS; i++) map_input[32*i +: 32] = data_in[i];
  end

  // operand registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0;
      y <= '0;
      m <= '0;
    end else begin
      unique case (sel)
        SEL_X:   x <= map_input[DATA_WIDTH-1:0];
        SEL_Y:   y <= map_input[DATA_WIDTH-1:0];
        SEL_M:   m <= map_input[DATA_WIDTH-1:0];
        default: ;
      endcase
    end
  end

  // opcode and status conversion
  always_comb begin
    opcode = (sel == SEL_NONE) ? map_op_e'(control[CTRL_OP_LSB +: 3]) : OP_NONE;
    status = '0;
    status[STAT_DONE] = done;
  end

  // result words
  assign z_wide = BUS_BITS'(z);
  always_comb begin
    for (int i = 0; i < MAP_WORDS; i++) data_out[i] = rd ? z_wide[32*i +: 32] : 32'd0;
  end
endmodule
