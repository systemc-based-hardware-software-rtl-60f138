// tb_ecc_soc: end-to-end testbench of the ECC system-on-chip hardware.
//
// The testbench plays the processor's firmware on the system bus and an
// off-chip peer on the I/O streams. With every parameter at its default it:
//   1. checks 2G and 3G, then times one call of each MAP operation, one
//      point doubling and one point addition with the on-chip timer;
//   2. computes an ECDSA public key Q = d*G on secp160r1 with the MAP, using
//      the least-significant-bit-first point multiplication in affine
//      coordinates (point doubling and addition written as sequences of MAP
//      add/sub/mul/div calls), timed by the on-chip timer;
//   3. checks Q against a reference computed here with wide integer
//      arithmetic (inversion by Fermat's little theorem) and checks that Q
//      is on the curve; also checks (n-1)*G = -G for the group order n;
//   4. hashes "abc" with the SHA-1 unit and checks the standard digest;
//   5. signs that digest with ECDSA (MAP arithmetic modulo the group order
//      n) using the nonce of the secp160r1 example in the SEC "GEC 2" test
//      vectors; checks r against the value published there and s against
//      the reference; verifies the signature with the MAP (two point
//      multiplications and an addition) and checks that a tampered message
//      is rejected; signing and verification are timed;
//   6. sends Q out through IO1 to the peer, which stalls the stream at
//      times, and receives a reply from the peer;
//   7. pushes words through IO2, whose off-chip side is looped back, until
//      its transmit FIFO reports full, then reads all words back in order.
// Every mechanism (each MAP operation, done polling, point add/double, SHA
// block, timer run, tx stall, tx full, put/get) is counted, and one that
// never happened counts as a failure. A watchdog ends a hung run.
module tb_ecc_soc;
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
  logic        io1_tx_valid, io1_tx_ready, io1_rx_valid, io1_rx_ready;
  logic [31:0] io1_tx_data, io1_rx_data;
  logic        io2_tx_valid, io2_rx_ready;
  logic [31:0] io2_tx_data;

  logic [DW-1:0] cur_m = P;   // modulus the firmware loads into the MAP

  int checks = 0, failures = 0;
  int n_ecdsa_ok = 0, n_ecdsa_reject = 0;
  int n_mul = 0, n_div = 0, n_add = 0, n_sub = 0, n_poll_wait = 0;
  int n_padd = 0, n_pdbl = 0, n_sha = 0, n_timer = 0;
  int n_tx_stall = 0, n_tx_full = 0, n_put = 0, n_get = 0;

  always #5 clk = ~clk;

  ecc_soc dut (
    .clk, .rst_n,
    .bus_addr, .bus_write, .bus_writedata, .bus_read, .bus_readdata,
    .io1_tx_valid, .io1_tx_data, .io1_tx_ready, .io1_rx_valid, .io1_rx_data, .io1_rx_ready,
    .io2_tx_valid, .io2_tx_data, .io2_tx_ready (io2_rx_ready),
    .io2_rx_valid (io2_tx_valid), .io2_rx_data (io2_tx_data), .io2_rx_ready
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
    for (int i = 0; i < MAP_WORDS; i++)
      bus_wr(A_MAP_DATA + 8'(i), vw[32*i +: 32]);
    bus_wr(A_MAP_CTRL, 32'(s) << CTRL_SEL_LSB);
    bus_wr(A_MAP_CTRL, 32'd0);
  endtask

  // z = y (op) x mod P, as in the driver: write x, y, m; start; poll; read; clear
  task automatic map_op(input map_op_e op, input logic [DW-1:0] y, input logic [DW-1:0] x,
                        output logic [DW-1:0] z);
    logic [31:0] st, d;
    logic [32*MAP_WORDS-1:0] zw;
    map_write(SEL_X, x);
    map_write(SEL_Y, y);
    map_write(SEL_M, cur_m);
    bus_wr(A_MAP_CTRL, 32'(op));
    bus_rd(A_MAP_STAT, st);
    while (!st[STAT_DONE]) begin
      n_poll_wait++;
      bus_rd(A_MAP_STAT, st);
    end
    bus_wr(A_MAP_CTRL, 32'(op) | (32'd1 << CTRL_READ));
    for (int i = 0; i < MAP_WORDS; i++) begin
      bus_rd(A_MAP_DATA + 8'(i), d);
      zw[32*i +: 32] = d;
    end
    z = DW'(zw);
    bus_wr(A_MAP_CTRL, 32'd0);
    unique case (op)
      OP_MUL: n_mul++;
      OP_DIV: n_div++;
      OP_ADD: n_add++;
      OP_SUB: n_sub++;
      default: ;
    endcase
  endtask

  // on-chip timer: reset and start; stop and read the count
  task automatic tmr_go();
    bus_wr(A_TMR_CTRL, 32'h3);
  endtask

  task automatic tmr_read(output int c);
    logic [31:0] v;
    bus_wr(A_TMR_CTRL, 32'h4);
    bus_rd(A_TMR_COUNT, v);
    c = v;
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
    n_pdbl++;
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
    n_padd++;
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

  // ---------------- off-chip peer on IO1 ----------------
  logic [31:0] peer_rx [$];
  logic [31:0] peer_tx [$];
  // the peer changes its outputs on the falling edge and samples on the rising edge
  logic        peer_ready_q = 1'b0, peer_valid_q = 1'b0, peer_taken = 1'b0;
  logic [31:0] peer_data_q = '0;
  assign io1_tx_ready = peer_ready_q;
  assign io1_rx_valid = peer_valid_q;
  assign io1_rx_data  = peer_data_q;
  always @(posedge clk) begin
    if (io1_tx_valid && io1_tx_ready) peer_rx.push_back(io1_tx_data);
    if (io1_tx_valid && !io1_tx_ready) n_tx_stall++;
    peer_taken = peer_valid_q && io1_rx_ready;
  end
  always @(negedge clk) begin
    peer_ready_q = ($urandom % 4) != 0;
    if (peer_taken) begin
      void'(peer_tx.pop_front());
      peer_taken = 1'b0;
    end
    peer_valid_q = (peer_tx.size() > 0);
    peer_data_q  = (peer_tx.size() > 0) ? peer_tx[0] : 32'd0;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] d, k, e, r, sg, t, w1, u1, u2, x1, y1, x2, y2;
    logic [159:0]  dg;
    logic [DW-1:0] qx, qy, ex, ey, rx, ry, r2x, r2y;
    logic [31:0]   w, st;
    logic [31:0]   sent [$];
    int t0, t1, tcount, words;
    int c_op [4], c_pdbl, c_padd, c_sign, c_verify;
    logic [DW-1:0] zref [4];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // --- point doubling and addition on G
    point_doubling(GX, GY, r2x, r2y);
    check(on_curve(r2x, r2y), "2G on curve");
    ref_mult(161'd2, ex, ey);
    check(r2x == ex && r2y == ey, "2G matches reference");
    point_add(GX, GY, r2x, r2y, rx, ry);
    ref_mult(161'd3, ex, ey);
    check(rx == ex && ry == ey && on_curve(rx, ry), "3G matches reference");

    // --- one call of each MAP operation mod p, timed by the on-chip timer
    zref = '{rmul(GY, GX), rmul(GY, rinv(GX)), radd(GY, GX), rsub(GY, GX)};
    for (int i = 0; i < 4; i++) begin
      map_op_e op;
      op = map_op_e'(i + 1);
      tmr_go();
      map_op(op, GY, GX, t);
      tmr_read(c_op[i]);
      check(t == zref[i], $sformatf("timed %s", op.name()));
    end
    tmr_go();
    point_doubling(GX, GY, rx, ry);
    tmr_read(c_pdbl);
    tmr_go();
    point_add(GX, GY, rx, ry, x1, y1);
    tmr_read(c_padd);
    check(rx == r2x && ry == r2y, "timed doubling gives 2G");
    check(c_op[0] < c_pdbl && c_op[0] < c_padd, "timed operations ordered");

    // --- key deployment: Q = d*G, timed by the on-chip timer
    d = 161'h0_7A3C91E2_5B04D6F8_C1E9A2B7_3D58F016_94CB27E3;
    bus_wr(A_TMR_CTRL, 32'h3);          // reset + start
    t0 = int'($time / 10);
    point_multiply(d, GX, GY, qx, qy);
    bus_wr(A_TMR_CTRL, 32'h4);          // stop
    t1 = int'($time / 10);
    n_timer++;
    bus_rd(A_TMR_COUNT, w);
    tcount = w;
    // counts from the edge of the start write to the edge of the stop write
    check(tcount == t1 - t0, $sformatf("timer %0d exp %0d", tcount, t1 - t0));
    $display("point multiplication: %0d cycles by the on-chip timer", tcount);
    ref_mult(d, ex, ey);
    check(qx == ex && qy == ey, $sformatf("Q = d*G: got %h,%h exp %h,%h", qx, qy, ex, ey));
    check(on_curve(qx, qy), "Q on curve");

    // --- (n-1)*G = -G
    point_multiply(N - 1, GX, GY, rx, ry);
    check(rx == GX && ry == P - GY, "(n-1)*G = -G");

    // --- SHA-1 of "abc" (one padded block)
    bus_wr(A_SHA_CTRL, 32'h1);
    for (int i = 0; i < 16; i++)
      bus_wr(A_SHA_BLOCK + 8'(i), (i == 0) ? 32'h61626380 : (i == 15) ? 32'h18 : 32'h0);
    bus_wr(A_SHA_CTRL, 32'h2);
    do bus_rd(A_SHA_STAT, st); while (!st[0]);
    n_sha++;
    for (int i = 0; i < 5; i++) begin bus_rd(A_SHA_DIGEST + 8'(i), w); dg[159-32*i -: 32] = w; end
    check(dg == 160'hA9993E36_4706816A_BA3E2571_7850C26C_9CD0D89D, $sformatf("SHA-1 abc %h", dg));

    // --- ECDSA signature of the hashed message with key d (arithmetic mod n)
    e = DW'(dg);
    // nonce k of the secp160r1 ECDSA example in SEC "GEC 2" test vectors;
    // the r it gives there is 1176954224688105769566774212902092897866168635793
    k = 161'h0_7B012DB7_681A3F28_B9185C8B_2AC5D528_DECD52DA;
    tmr_go();
    point_multiply(k, GX, GY, x1, y1);
    r = x1;                                   // x1 < p < n, so x1 mod n = x1
    check(r == 161'h0_CE2873E5_BE449563_391FEB47_DDCBA2DC_16379191, $sformatf("r = %h, published example value", r));
    cur_m = N;
    map_op(OP_MUL, d, r, t);
    map_op(OP_ADD, e, t, t);
    map_op(OP_DIV, t, k, sg);                 // s = (e + d*r) / k mod n
    tmr_read(c_sign);
    check(r != 0 && sg != 0, "signature nonzero");
    check(sg == nmul(ninv(k), (e + nmul(d, r)) % N), $sformatf("s = %h", sg));

    // --- ECDSA verification of (r, s) against Q, then of a tampered message
    for (int pass = 0; pass < 2; pass++) begin
      logic [DW-1:0] ev;
      ev = (pass == 0) ? e : (e ^ 161'h1);
      cur_m = N;
      if (pass == 0) tmr_go();
      map_op(OP_DIV, 161'd1, sg, w1);         // w = 1/s mod n
      map_op(OP_MUL, ev, w1, u1);
      map_op(OP_MUL, r, w1, u2);
      point_multiply(u1, GX, GY, x1, y1);
      point_multiply(u2, qx, qy, x2, y2);
      point_add(x1, y1, x2, y2, rx, ry);
      if (pass == 0) tmr_read(c_verify);
      if (pass == 0) begin
        check(rx == r, "valid signature accepted");
        if (rx == r) n_ecdsa_ok++;
      end else begin
        check(rx != r, "tampered message rejected");
        if (rx != r) n_ecdsa_reject++;
      end
    end

    // --- send Q over IO1, receive a reply
    for (int i = 0; i < 5; i++) begin sent.push_back(qx[32*i +: 32]); sent.push_back(qy[32*i +: 32]); end
    foreach (sent[i]) begin
      do bus_rd(A_IO1_STAT, st); while (st[1]);
      bus_wr(A_IO1_DATA, sent[i]);
      n_put++;
    end
    repeat (100) @(posedge clk);
    check(peer_rx.size() == sent.size(), "peer got all words");
    foreach (sent[i]) check(i < peer_rx.size() && peer_rx[i] == sent[i], $sformatf("IO1 word %0d", i));
    for (int i = 0; i < 4; i++) peer_tx.push_back(32'hC0DE_0000 + i);
    repeat (10) @(posedge clk);
    for (int i = 0; i < 4; i++) begin
      bus_rd(A_IO1_STAT, st);
      check(st[0], "IO1 rx available");
      bus_rd(A_IO1_DATA, w);
      n_get++;
      check(w == 32'hC0DE_0000 + i, $sformatf("IO1 reply %0d = %h", i, w));
    end

    // --- IO2 looped back: fill until tx full, then drain in order
    words = 0;
    for (int i = 0; i < 100; i++) begin
      bus_rd(A_IO2_STAT, st);
      if (st[1]) begin n_tx_full++; break; end
      bus_wr(A_IO2_DATA, 32'h5000_0000 + words);
      words++; n_put++;
    end
    check(words == 32 && n_tx_full == 1, $sformatf("IO2 accepted %0d words before full", words));
    for (int i = 0; i < words; i++) begin
      do bus_rd(A_IO2_STAT, st); while (!st[0]);
      bus_rd(A_IO2_DATA, w);
      n_get++;
      check(w == 32'h5000_0000 + i, $sformatf("IO2 word %0d = %h", i, w));
    end

    // --- every mechanism must have happened
    $display("cycles by the on-chip timer: mod_mul %0d, mod_div %0d, mod_add %0d, mod_sub %0d, point doubling %0d, point addition %0d, ECDSA signing %0d, ECDSA verification %0d",
             c_op[0], c_op[1], c_op[2], c_op[3], c_pdbl, c_padd, c_sign, c_verify);
    $display("mechanisms: ecdsa_ok=%0d ecdsa_reject=%0d mul=%0d div=%0d add=%0d sub=%0d poll_wait=%0d padd=%0d pdbl=%0d sha=%0d timer=%0d tx_stall=%0d tx_full=%0d put=%0d get=%0d",
             n_ecdsa_ok, n_ecdsa_reject, n_mul, n_div, n_add, n_sub, n_poll_wait, n_padd, n_pdbl, n_sha, n_timer, n_tx_stall, n_tx_full, n_put, n_get);
    check(n_mul > 0, "mod_mul used");     check(n_div > 0, "mod_div used");
    check(n_add > 0, "mod_add used");     check(n_sub > 0, "mod_sub used");
    check(n_poll_wait > 0, "done polled"); check(n_padd > 0, "point add");
    check(n_pdbl > 0, "point double");    check(n_sha > 0, "SHA block");
    check(n_timer > 0, "timer run");      check(n_tx_stall > 0, "IO tx stall");
    check(n_tx_full > 0, "IO tx full");   check(n_put > 0 && n_get > 0, "IO put/get");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
