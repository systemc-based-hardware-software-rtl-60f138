// tb_map: self-checking testbench of the modular arithmetic processor.
//
// Runs the processor's driver sequence on the word ports for every
// operation: load x, y and m through data_in0..5 with the operand-select
// field, write the opcode, poll the done bit of the status word, set the
// read bit, read z from data_out0..5 and clear the control word. Operands
// are random and reduced modulo the secp160r1 prime; results are compared
// with wide-integer references (division: z*x mod p must equal y). Also
// checks the multiply latency seen by the poll loop. Watchdog included.
module tb_map;
  import ecc_soc_pkg::*;
  localparam int DW = 161;
  localparam logic [DW-1:0] P = 161'hFFFFFFFF_FFFFFFFF_FFFFFFFF_FFFFFFFF_7FFFFFFF;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [31:0] ECC_control = '0;
  logic [31:0] data_in [MAP_WORDS];
  logic [31:0] ECC_status;
  logic [31:0] data_out [MAP_WORDS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  map dut (.clk, .rst_n, .ECC_control, .data_in, .ECC_status, .data_out);

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

  task automatic map_write(input map_sel_e s, input logic [DW-1:0] v);
    logic [32*MAP_WORDS-1:0] vw = (32*MAP_WORDS)'(v);
    @(negedge clk);
    for (int i = 0; i < MAP_WORDS; i++) data_in[i] = vw[32*i +: 32];
    ECC_control = 32'(s) << CTRL_SEL_LSB;
    @(negedge clk) ECC_control = '0;
  endtask

  task automatic map_op(input map_op_e op, input logic [DW-1:0] yi, input logic [DW-1:0] xi,
                        output logic [DW-1:0] zo, output int cyc);
    logic [32*MAP_WORDS-1:0] zw;
    map_write(SEL_X, xi);
    map_write(SEL_Y, yi);
    map_write(SEL_M, P);
    @(negedge clk) ECC_control = 32'(op);
    cyc = 0;
    do begin @(negedge clk); cyc++; end while (!ECC_status[STAT_DONE] && cyc < 2000);
    ECC_control = 32'(op) | (32'd1 << CTRL_READ);
    #1 for (int i = 0; i < MAP_WORDS; i++) zw[32*i +: 32] = data_out[i];
    zo = DW'(zw);
    @(negedge clk) ECC_control = '0;
    #1 check(data_out[0] == 0, "outputs zero after clear");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] a, b, r;
    logic [2*DW-1:0] w;
    int cyc;
    foreach (data_in[i]) data_in[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 8; k++) begin
      a = rnd_mod(P); b = rnd_mod(P);
      if (b == '0) b = 161'd3;
      map_op(OP_MUL, a, b, r, cyc);
      w = ({DW'(0), a} * {DW'(0), b}) % {DW'(0), P};
      check(r == w[DW-1:0], $sformatf("mul %h", r));
      // decode edge + 3*bitlen(y)+4 unit edges, counted from the opcode write
      check(cyc == 3 * bitlen(a) + 5, $sformatf("mul latency %0d exp %0d", cyc, 3 * bitlen(a) + 5));
      map_op(OP_DIV, a, b, r, cyc);
      w = ({DW'(0), r} * {DW'(0), b}) % {DW'(0), P};
      check(w[DW-1:0] == a && r < P, $sformatf("div %h", r));
      map_op(OP_ADD, a, b, r, cyc);
      w = ({DW'(0), a} + {DW'(0), b}) % {DW'(0), P};
      check(r == w[DW-1:0], $sformatf("add %h", r));
      map_op(OP_SUB, a, b, r, cyc);
      w = ({DW'(0), a} + {DW'(0), P} - {DW'(0), b}) % {DW'(0), P};
      check(r == w[DW-1:0], $sformatf("sub %h", r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
