// tb_map_core: self-checking testbench of the MAP core.
//
// Selects each of the four arithmetic units by opcode with random reduced
// operands modulo the secp160r1 prime, checks the multiplexed z against a
// wide-integer reference, checks that done and z read zero with OP_NONE,
// that done clears when the opcode returns to OP_NONE, and the multiply
// latency (one decode cycle plus 3*bitlen(y)+4 edges). Watchdog included.
module tb_map_core;
  import ecc_soc_pkg::*;
  localparam int DW = 161;
  localparam logic [DW-1:0] P = 161'hFFFFFFFF_FFFFFFFF_FFFFFFFF_FFFFFFFF_7FFFFFFF;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  map_op_e opcode = OP_NONE;
  logic [DW-1:0] x = '0, y = '0, m = P;
  logic [DW-1:0] z;
  logic done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  map_core #(.DATA_WIDTH(DW)) dut (.clk, .rst_n, .opcode, .x, .y, .m, .z, .done);

  function automatic logic [DW-1:0] rnd_mod(input logic [DW-1:0] q);
    logic [DW-1:0] r = '0;
    for (int i = 0; i < DW/32; i++) r[32*i +: 32] = $urandom;
    return r % q;
  endfunction

  function automatic int bitlen(input logic [DW-1:0] v);
    int l = 0;
    for (int i = 0; i < DW; i++) if (v[i]) l = i + 1;
    return l;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_op(input map_op_e op);
    logic [2*DW-1:0] w;
    logic [DW-1:0] e;
    int cyc = 0;
    x = rnd_mod(P); y = rnd_mod(P);
    if (op == OP_DIV && x == '0) x = 161'd7;
    @(negedge clk) opcode = op;
    do begin @(posedge clk); #1; cyc++; end while (!done && cyc < 2000);
    unique case (op)
      OP_MUL: w = ({DW'(0), y} * {DW'(0), x}) % {DW'(0), P};
      OP_ADD: w = ({DW'(0), y} + {DW'(0), x}) % {DW'(0), P};
      OP_SUB: w = ({DW'(0), y} + {DW'(0), P} - {DW'(0), x}) % {DW'(0), P};
      default: w = ({DW'(0), z} * {DW'(0), x}) % {DW'(0), P};  // div: z*x must give y
    endcase
    e = (op == OP_DIV) ? ((w[DW-1:0] == y) ? z : ~z) : w[DW-1:0];
    check(z == e, $sformatf("op %s z %h exp %h", op.name(), z, e));
    if (op == OP_MUL) check(cyc == 3 * bitlen(y) + 5, $sformatf("mul latency %0d", cyc));
    if (op == OP_ADD || op == OP_SUB) check(cyc == 5, $sformatf("add/sub latency %0d", cyc));
    @(negedge clk) opcode = OP_NONE;
    #1 check(!done && z == '0, "OP_NONE output");
    @(posedge clk); @(posedge clk); #1;
    check(!done, "done cleared");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 8; i++) begin
      run_op(OP_MUL); run_op(OP_DIV); run_op(OP_ADD); run_op(OP_SUB);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
