// tb_bus_interface: self-checking testbench of the MAP word interface.
//
// Plays the processor on the control/data_in words and the core on z/done.
// Checks that each operand-select code captures the six input words into
// x, y or m (word 0 least significant) and leaves the others alone, that
// the opcode passes only while no operand is selected, that the status
// word mirrors done, and that the result words show z only with the read
// bit set. Watchdog included.
module tb_bus_interface;
  import ecc_soc_pkg::*;
  localparam int DW = 161;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [31:0] control = '0;
  logic [31:0] data_in [MAP_WORDS];
  logic [31:0] status;
  logic [31:0] data_out [MAP_WORDS];
  map_op_e opcode;
  logic [DW-1:0] x, y, m;
  logic [DW-1:0] z = '0;
  logic done = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bus_interface #(.DATA_WIDTH(DW)) dut (.clk, .rst_n, .control, .data_in, .status, .data_out,
                                        .opcode, .x, .y, .m, .z, .done);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [DW-1:0] rnd();
    logic [DW-1:0] r = '0;
    for (int i = 0; i < DW/32; i++) r[32*i +: 32] = $urandom;
    return r;
  endfunction

  task automatic load(input map_sel_e s, input logic [DW-1:0] v);
    logic [32*MAP_WORDS-1:0] vw = (32*MAP_WORDS)'(v);
    @(negedge clk);
    for (int i = 0; i < MAP_WORDS; i++) data_in[i] = vw[32*i +: 32];
    control = 32'(s) << CTRL_SEL_LSB;
    #1 check(opcode == OP_NONE, "no opcode while selecting");
    @(negedge clk) control = '0;
    for (int i = 0; i < MAP_WORDS; i++) data_in[i] = $urandom;  // must not be captured
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] vx, vy, vm, vz;
    logic [32*MAP_WORDS-1:0] vzw;
    foreach (data_in[i]) data_in[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 5; k++) begin
      vx = rnd(); vy = rnd(); vm = rnd();
      load(SEL_X, vx);
      load(SEL_Y, vy);
      load(SEL_M, vm);
      @(negedge clk);
      check(x == vx && y == vy && m == vm, "operands captured");
      // opcode through, no read
      control = 32'(OP_MUL);
      #1 check(opcode == OP_MUL, "opcode passed");
      check(status[STAT_DONE] == 1'b0, "status not done");
      vz = rnd(); z = vz; done = 1'b1;
      #1 check(status[STAT_DONE] == 1'b1, "status done");
      check(data_out[0] == 0 && data_out[4] == 0, "no result without read");
      control = 32'(OP_MUL) | (32'd1 << CTRL_READ);
      #1 vzw = (32*MAP_WORDS)'(vz);
      for (int i = 0; i < MAP_WORDS; i++)
        check(data_out[i] == vzw[32*i +: 32], $sformatf("result word %0d", i));
      @(negedge clk) control = '0; done = 1'b0;
      #1 check(opcode == OP_NONE && x == vx, "clear keeps operands");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
