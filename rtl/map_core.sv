// map_core: the processing core of the modular arithmetic processor.
//
// It holds the four arithmetic units (mod_div, mod_mul, mod_sub, mod_add)
// and three pieces of glue named in the original design: an enable decoder that
// raises the en input of the unit selected by the opcode, an output
// multiplexer that passes that unit's z, and a done multiplexer that passes
// its done. All four units share the operand buses x, y and m.
//
// Interface: opcode is a level (ecc_soc_pkg::map_op_e). While it holds a
// nonzero code the selected unit runs and then holds z/done; returning the
// opcode to OP_NONE clears done and idles the unit. Latency is that of the
// selected unit. The decoder is registered (one cycle from opcode to en), a
// choice of this design.
module map_core
  import ecc_soc_pkg::*;
#(
  parameter int DATA_WIDTH = 161
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  map_op_e               opcode,
  input  logic [DATA_WIDTH-1:0] x,
  input  logic [DATA_WIDTH-1:0] y,
  input  logic [DATA_WIDTH-1:0] m,
  output logic [DATA_WIDTH-1:0] z,
  output logic                  done
);
  logic en_div, en_mul, en_sub, en_add;
  logic done_div, done_mul, done_sub, done_add;
  logic [DATA_WIDTH-1:0] z_div, z_mul, z_sub, z_add;

  // enable decoder
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {en_div, en_mul, en_sub, en_add} <= '0;
    end else begin
      en_div <= (opcode == OP_DIV);
      en_mul <= (opcode == OP_MUL);
      en_sub <= (opcode == OP_SUB);
      en_add <= (opcode == OP_ADD);
    end
  end

  mod_div #(.DATA_WIDTH(DATA_WIDTH)) u_div (.clk, .rst_n, .en(en_div), .x, .y, .m, .z(z_div), .done(done_div));
  mod_mul #(.DATA_WIDTH(DATA_WIDTH)) u_mul (.clk, .rst_n, .en(en_mul), .x, .y, .m, .z(z_mul), .done(done_mul));
  mod_sub #(.DATA_WIDTH(DATA_WIDTH)) u_sub (.clk, .rst_n, .en(en_sub), .x, .y, .m, .z(z_sub), .done(done_sub));
  mod_add #(.DATA_WIDTH(DATA_WIDTH)) u_add (.clk, .rst_n, .en(en_add), .x, .y, .m, .z(z_add), .done(done_add));

  // at most one unit is enabled at a time
  a_one_unit: assert property (@(posedge clk) disable iff (!rst_n)
                               $onehot0({en_div, en_mul, en_sub, en_add}));

  // output and done multiplexers
  always_comb begin
    unique case (opcode)
      OP_DIV:  begin z = z_div; done = done_div; end
      OP_MUL:  begin z = z_mul; done = done_mul; end
      OP_SUB:  begin z = z_sub; done = done_sub; end
      OP_ADD:  begin z = z_add; done = done_add; end
      default: begin z = '0;    done = 1'b0;     end
    endcase
  end
endmodule
