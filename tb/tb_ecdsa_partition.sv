// tb_ecdsa_partition: ECDSA signing under different hardware/software splits of the MAP.
//
// The original design explores which modular operations to put in hardware,
// in eight partitionings: Arch. 1 all software; Arch. 2 division, Arch. 3
// multiplication, Arch. 4 subtraction, Arch. 5 addition, Arch. 6 addition and
// subtraction, Arch. 7 multiplication and division, Arch. 8 all four. This
// testbench plays the firmware of an ECDSA signature on secp160r1 for each
// split: operations in the hardware set run on the MAP through the bus,
// the others are computed in the testbench as the software would (taking no
// simulated time). For every split it
//   - checks that the signature (r, s) equals an independent reference;
//   - times the signing with the on-chip timer;
//   - counts the MAP register accesses by kind, the terms of the
//     communication-cycle estimate mu = sum(dIc + dIs + dIi + dIo) * c:
//     control writes, status reads, input-word writes, output-word reads,
//     and checks them against the driver sequence (per hardware operation:
//     18 input writes, 9 control writes, 6 output reads);
//   - reports mu with c = 2 (each access of this testbench's bus master
//     takes two clock cycles) and gamma = mu / T, where T is the timed
//     cycles. Status polls beyond the one that finds done are reported as
//     waiting time, not transfer.
// Software operations take no simulated time here, so T compares the
// hardware-side cost of each split, not the full run time of a processor.
// A watchdog ends a hung run. All parameters are at their defaults.
module tb_ecdsa_partition;
  import ecc_soc_pkg::*;
  localparam int DW = 161;
  localparam logic [DW-1:0] P  = 161'hFFFFFFFF_FFFFFFFF_FFFFFFFF_FFFFFFFF_7FFFFFFF;
  localparam logic [DW-1:0] A  = 161'hFFFFFFFF_FFFFFFFF_FFFFFFFF_FFFFFFFF_7FFFFFFC;
  localparam logic [DW-1:0] B  = 161'h1C97BEFC_54BD7A8B_65ACF89F_81D4D4AD_C565FA45;
  localparam logic [DW-1:0] GX = 161'h4A96B568_8EF57328_46646989_68C38BB9_13CBFC82;
  localparam logic [DW-1:0] GY = 161'h23A62855_3168947D_59DCC912_04235137_7AC5FB32;
  localparam logic [DW-1:0] N  = 161'h1_00000000_00000000_0001F4C8_F927AED3_CA752257;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [7:0]  bus_addr = '0;
  logic        bus_write = 1'b0, bus_read = 1'b0;
  logic [31:0] bus_writedata = '0, bus_readdata;
  logic        io1_tx_valid, io1_rx_ready, io2_tx_valid, io2_rx_ready;
  logic [31:0] io1_tx_data, io2_tx_data;

  logic [DW-1:0] cur_m = P;
  bit   hw [8];                 // indexed by map_op_e: operation runs on the MAP
  int   checks = 0, failures = 0;
  localparam int N_OPS_SIGN = 2376;  // MAP operations in one signing with this nonce
  localparam int C_ACCESS = 2;  // clock cycles per bus access in bus_wr/bus_rd below
  int   n_ctrl, n_stat, n_in, n_out, n_hw_ops, n_sw_ops;

  always #5 clk = ~clk;

  ecc_soc dut (
    .clk, .rst_n,
    .bus_addr, .bus_write, .bus_writedata, .bus_read, .bus_readdata,
    .io1_tx_valid, .io1_tx_data, .io1_tx_ready (1'b1), .io1_rx_valid (1'b0), .io1_rx_data (32'd0), .io1_rx_ready,
    .io2_tx_valid, .io2_tx_data, .io2_tx_ready (1'b1), .io2_rx_valid (1'b0), .io2_rx_data (32'd0), .io2_rx_ready
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- reference field and curve arithmetic ----------------
  function automatic logic [DW-1:0] rmul(input logic [DW-1:0] a, input logic [DW-1:0] b);
    logic [2*DW-1:0] w = ({DW'(0), a} * {DW'(0), b}) % {DW'(0), P};
    return w[DW-1:0];
  endfunction
  function automatic logic [DW-1:0] radd(input logic [DW-1:0] a, input logic [DW-1:0] b);
    logic [DW:0] s = {1'b0, a} + {1'b0, b};
    return (s >= {1'b0, P}) ? DW'(s - {1'b0, P}) : s[DW-1:0];
  endfunction
  function automatic logic [DW-1:0] rsub(input logic [DW-1:0] a, input logic [DW-1:0] b);
    return (a >= b) ? a - b : a - b + P;
  endfunction
  function automatic logic [DW-1:0] rinv(input logic [DW-1:0] a);
    logic [DW-1:0] e = P - 2, r = 161'd1, base = a;
    for (int i = 0; i < DW; i++) begin
      if (e[i]) r = rmul(r, base);
      base = rmul(base, base);
    end
    return r;
  endfunction
  function automatic logic [DW-1:0] nmul(input logic [DW-1:0] a, input logic [DW-1:0] b);
    logic [2*DW-1:0] w = ({DW'(0), a} * {DW'(0), b}) % {DW'(0), N};
    return w[DW-1:0];
  endfunction
  function automatic logic [DW-1:0] ninv(input logic [DW-1:0] a);
    logic [DW-1:0] e = N - 2, r = 161'd1, base = a;
    for (int i = 0; i < DW; i++) begin
      if (e[i]) r = nmul(r, base);
      base = nmul(base, base);
    end
    return r;
  endfunction
  function automatic bit on_curve(input logic [DW-1:0] x, input logic [DW-1:0] y);
    return rmul(y, y) == radd(radd(rmul(rmul(x, x), x), rmul(A, x)), B);
  endfunction
  task automatic ref_mult(input logic [DW-1:0] k, output logic [DW-1:0] qx, output logic [DW-1:0] qy);
    logic [DW-1:0] px = GX, py = GY, s, tx;
    bit inf = 1;
    for (int i = 0; i < DW; i++) begin
      if (k[i]) begin
        if (inf) begin qx = px; qy = py; inf = 0; end
        else begin
          s = rmul(rsub(py, qy), rinv(rsub(px, qx)));
          tx = rsub(rsub(rmul(s, s), qx), px);
          qy = rsub(rmul(s, rsub(qx, tx)), qy);
          qx = tx;
        end
      end
      s = rmul(radd(rmul(161'd3, rmul(px, px)), A), rinv(radd(py, py)));
      tx = rsub(rmul(s, s), radd(px, px));
      py = rsub(rmul(s, rsub(px, tx)), py);
      px = tx;
    end
  endtask

  // ---------------- bus firmware ----------------
  task automatic bus_wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    bus_addr = a; bus_writedata = d; bus_write = 1'b1;
    @(negedge clk);
    bus_write = 1'b0;
  endtask

  task automatic bus_rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    bus_addr = a; bus_read = 1'b1;
    #1 d = bus_readdata;
    @(negedge clk);
    bus_read = 1'b0;
  endtask

  task automatic map_write(input map_sel_e s, input logic [DW-1:0] v);
    logic [32*MAP_WORDS-1:0] vw = (32*MAP_WORDS)'(v);
    for (int i = 0; i < MAP_WORDS; i++) begin
      bus_wr(A_MAP_DATA + 8'(i), vw[32*i +: 32]);   n_in++;
    end
    bus_wr(A_MAP_CTRL, 32'(s) << CTRL_SEL_LSB);      n_ctrl++;
    bus_wr(A_MAP_CTRL, 32'd0);                       n_ctrl++;
  endtask

  // z = y (op) x mod cur_m. Operations in the hardware set go to the MAP with
  // the driver sequence; the others are done here in "software" (no cycles).
  task automatic map_op(input map_op_e op, input logic [DW-1:0] y, input logic [DW-1:0] x,
                        output logic [DW-1:0] z);
    logic [31:0] st, d;
    logic [32*MAP_WORDS-1:0] zw;
    logic [2*DW-1:0] wide;
    if (!hw[op]) begin
      unique case (op)
        OP_MUL: wide = ({DW'(0), y} * {DW'(0), x}) % {DW'(0), cur_m};
        OP_ADD: wide = ({DW'(0), y} + {DW'(0), x}) % {DW'(0), cur_m};
        OP_SUB: wide = ({DW'(0), y} + {DW'(0), cur_m} - {DW'(0), x}) % {DW'(0), cur_m};
        default: wide = ({DW'(0), y} * {DW'(0), (cur_m == N) ? ninv(x) : rinv(x)}) % {DW'(0), cur_m};
      endcase
      z = wide[DW-1:0];
      n_sw_ops++;
      return;
    end
    map_write(SEL_X, x);
    map_write(SEL_Y, y);
    map_write(SEL_M, cur_m);
    bus_wr(A_MAP_CTRL, 32'(op));                     n_ctrl++;
    bus_rd(A_MAP_STAT, st);                          n_stat++;
    while (!st[STAT_DONE]) begin
      bus_rd(A_MAP_STAT, st);                        n_stat++;
    end
    bus_wr(A_MAP_CTRL, 32'(op) | (32'd1 << CTRL_READ)); n_ctrl++;
    for (int i = 0; i < MAP_WORDS; i++) begin
      bus_rd(A_MAP_DATA + 8'(i), d);                 n_out++;
      zw[32*i +: 32] = d;
    end
    z = DW'(zw);
    bus_wr(A_MAP_CTRL, 32'd0);                       n_ctrl++;
    n_hw_ops++;
  endtask

  task automatic point_doubling(input logic [DW-1:0] qx, input logic [DW-1:0] qy,
                                output logic [DW-1:0] rx, output logic [DW-1:0] ry);
    logic [DW-1:0] s, t1, t2, t3, t4;
    map_op(OP_MUL, qx, qx, t1);
    map_op(OP_MUL, 161'd3, t1, t2);
    map_op(OP_ADD, t2, A, t3);
    map_op(OP_MUL, 161'd2, qy, t4);
    map_op(OP_DIV, t3, t4, s);
    map_op(OP_MUL, s, s, t1);
    map_op(OP_MUL, 161'd2, qx, t2);
    map_op(OP_SUB, t1, t2, rx);
    map_op(OP_SUB, qx, rx, t1);
    map_op(OP_MUL, s, t1, t2);
    map_op(OP_SUB, t2, qy, ry);
  endtask

  task automatic point_add(input logic [DW-1:0] ax, input logic [DW-1:0] ay,
                           input logic [DW-1:0] bx, input logic [DW-1:0] by,
                           output logic [DW-1:0] rx, output logic [DW-1:0] ry);
    logic [DW-1:0] s, t1, t2;
    map_op(OP_SUB, by, ay, t1);
    map_op(OP_SUB, bx, ax, t2);
    map_op(OP_DIV, t1, t2, s);
    map_op(OP_MUL, s, s, t1);
    map_op(OP_SUB, t1, ax, t2);
    map_op(OP_SUB, t2, bx, rx);
    map_op(OP_SUB, ax, rx, t1);
    map_op(OP_MUL, s, t1, t2);
    map_op(OP_SUB, t2, ay, ry);
  endtask

  // LSB-first point multiplication Q = k*(bx, by), k > 0
  task automatic point_multiply(input logic [DW-1:0] k, input logic [DW-1:0] bx, input logic [DW-1:0] by,
                                output logic [DW-1:0] qx, output logic [DW-1:0] qy);
    logic [DW-1:0] px = bx, py = by, tx, ty;
    bit inf = 1;
    int top = 0;
    cur_m = P;
    for (int i = 0; i < DW; i++) if (k[i]) top = i;
    for (int i = 0; i <= top; i++) begin
      if (k[i]) begin
        if (inf) begin qx = px; qy = py; inf = 0; end
        else begin point_add(qx, qy, px, py, tx, ty); qx = tx; qy = ty; end
      end
      if (i < top) begin point_doubling(px, py, tx, ty); px = tx; py = ty; end
    end
  endtask

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // message digest e, private key d, nonce k (fixed so the runs are comparable)
    logic [DW-1:0] e, d, k, x1, y1, r, t, sg, ex, ey, s_ref;
    logic [31:0]   w;
    int            tcount, mu, wait_cyc;
    logic [3:0]    split;      // {add, sub, mul, div} in hardware, as in the partitioning table
    logic [3:0]    splits [8];
    splits = '{4'b0000, 4'b0001, 4'b0010, 4'b0100, 4'b1000, 4'b1100, 4'b0011, 4'b1111};
    e = 161'h0_A9993E36_4706816A_BA3E2571_7850C26C_9CD0D89D;
    d = 161'h0_7A3C91E2_5B04D6F8_C1E9A2B7_3D58F016_94CB27E3;
    k = 161'h0_1B2C3D4E_5F607182_93A4B5C6_D7E8F901_12233445;
    ref_mult(k, ex, ey);
    s_ref = nmul(ninv(k), (e + nmul(d, ex)) % N);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 8; a++) begin
      string name;
      split = splits[a];
      name = $sformatf("Arch. %0d (%b)", a + 1, split);
      foreach (hw[i]) hw[i] = 0;
      hw[OP_ADD] = split[3];
      hw[OP_SUB] = split[2];
      hw[OP_MUL] = split[1];
      hw[OP_DIV] = split[0];
      n_ctrl = 0; n_stat = 0; n_in = 0; n_out = 0; n_hw_ops = 0; n_sw_ops = 0;
      bus_wr(A_TMR_CTRL, 32'h3);
      point_multiply(k, GX, GY, x1, y1);
      r = x1;
      cur_m = N;
      map_op(OP_MUL, d, r, t);
      map_op(OP_ADD, e, t, t);
      map_op(OP_DIV, t, k, sg);
      bus_wr(A_TMR_CTRL, 32'h4);
      bus_rd(A_TMR_COUNT, w);
      tcount = w;
      check(r == ex && sg == s_ref, $sformatf("%s: signature (%h, %h)", name, r, sg));
      check((n_hw_ops == 0) == (split == 0) && (n_sw_ops == 0) == (split == 4'hF),
            $sformatf("%s: split used", name));
      check(n_in == 18 * n_hw_ops && n_ctrl == 9 * n_hw_ops && n_out == 6 * n_hw_ops && n_stat >= n_hw_ops && n_hw_ops + n_sw_ops == N_OPS_SIGN,
            $sformatf("%s: access counts in=%0d ctrl=%0d out=%0d stat=%0d ops=%0d", name, n_in, n_ctrl, n_out, n_stat, n_hw_ops));
      // Transfers: every control, input and output access plus the one status
      // read that finds done; the other status reads are waiting, not transfer.
      mu = C_ACCESS * (n_ctrl + n_hw_ops + n_in + n_out);
      if (split == 0) tcount = 1;  // nothing timed: only software ran
      wait_cyc = C_ACCESS * (n_stat - n_hw_ops);
      check(mu + wait_cyc <= tcount, $sformatf("%s: accesses fit in measured time", name));
      $display("%-20s hw ops %5d  sw ops %5d  T = %7d cycles  mu = %7d  gamma = %5.2f %%  wait = %7d  (dIc %0d dIs %0d dIi %0d dIo %0d)",
               name, n_hw_ops, n_sw_ops, tcount, mu, 100.0 * mu / tcount, wait_cyc, n_ctrl, n_stat, n_in, n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
