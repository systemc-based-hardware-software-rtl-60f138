// tb_mod_sub: self-checking testbench of mod_sub (z = y-x mod m).
//
// Drives the unit at its default 161-bit width with three moduli: the
// secp160r1 prime p = 2^160 - 2^31 - 1, the curve's 161-bit group order n
// and a small prime; and with edge-case and random reduced operands, and compares z with
// a reference computed here with wide integer arithmetic ((y + m - x) mod m at double width). It also
// checks the latency from en to done (4 clock edges after en rises) and that done and z are held
// while en stays high and done clears when en falls. A watchdog ends the run
// with a failure if the unit hangs.
module tb_mod_sub;
  localparam int DW = 161;
  localparam logic [DW-1:0] P = 161'hFFFFFFFF_FFFFFFFF_FFFFFFFF_FFFFFFFF_7FFFFFFF;
  // group order of secp160r1, a 161-bit prime
  localparam logic [DW-1:0] N = 161'h1_00000000_00000000_0001F4C8_F927AED3_CA752257;
  localparam int NRAND = 60;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic [DW-1:0] x = '0, y = '0, m = '0;
  logic [DW-1:0] z;
  logic done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mod_sub #(.DATA_WIDTH(DW)) dut (.clk, .rst_n, .en, .x, .y, .m, .z, .done);

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
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_one(input logic [DW-1:0] xi, input logic [DW-1:0] yi, input logic [DW-1:0] mi);
    int cyc = 0;
    logic [2*DW-1:0] ref_w;
    logic [DW-1:0] expect_z;
    int exp_cyc;
    @(negedge clk);
    x = xi; y = yi; m = mi; en = 1'b1;
    do begin
      @(posedge clk); #1;
      cyc++;
    end while (!done && cyc < 2000);
    ref_w = ({DW'(0), yi} + {DW'(0), mi} - {DW'(0), xi}) % {DW'(0), mi};
    expect_z = ref_w[DW-1:0];
    check(z == expect_z, $sformatf("z x=%h y=%h got %h exp %h", xi, yi, z, expect_z));
    exp_cyc = 4;
    check(cyc == exp_cyc, $sformatf("latency %0d exp %0d", cyc, exp_cyc));
    repeat (3) @(posedge clk);
    #1 check(done && z == expect_z, "done/z held while en high");
    @(negedge clk) en = 1'b0;
    @(posedge clk); #1;
    check(!done, "done cleared after en falls");
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_one(161'd0, 161'd0, P);
    run_one(P - 1, P - 1, P);
    run_one(161'd1, P - 1, P);
    run_one(P - 1, 161'd1, P);
    run_one(161'd2, 161'd3, P);
    run_one(161'd12345, P - 161'd77, P);
    for (int i = 0; i < NRAND; i++) run_one(rnd_mod(P), rnd_mod(P), P);
    // the 161-bit group order as modulus (full operand width)
    run_one(N - 1, N - 1, N);
    for (int i = 0; i < 10; i++) run_one(rnd_mod(N), rnd_mod(N), N);
    // a small odd prime modulus
    for (int i = 0; i < 10; i++) run_one(rnd_mod(161'd1000003), rnd_mod(161'd1000003), 161'd1000003);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
