// tb_mutual_auth: the network mutual authentication protocol with the
// ECC system-on-chip as the user terminal.
//
// The protocol (after Aydos et al.) authenticates a user terminal and a
// server to each other with certificates signed by a certificate authority
// (CA), and agrees a session key:
//   initialization (off line): the terminal deploys its key pair
//     Q_u = d_u*G on the MAP and hashes e_u = H(Q_u, I_u, t_u) on the SHA
//     unit; the CA signs e_u with ECDSA, giving (r_u, s_u). The server gets
//     (e_s, r_s, s_s) the same way.
//   authentication / key agreement:
//     server -> terminal : Q_s
//     terminal -> server : Q_u, g_u                 (g_u a random challenge)
//     both               : Q_k = d_u*Q_s = d_s*Q_u  (ECDH), key Q_k.x
//     server -> terminal : C0 = E(Q_k.x, (e_s, (r_s, s_s), t_s, g_u, g_s))
//     terminal           : D(C0); is g_u present?
//     terminal -> server : C1 = E(Q_k.x, (e_u, (r_u, s_u), t_u, g_s))
//     server             : D(C1); are g_s and t_u valid? verify (r_u, s_u)
//     terminal           : verify (r_s, s_s) with the CA key Q_ca, else abort
//     both               : k_m = H(Q_k.x, g_s, g_u), the session key
// The terminal's firmware runs here on the system bus: every point
// multiplication and modular operation goes through the MAP, hashing
// through the SHA unit, and all protocol messages through IO1. The server
// and the CA are modelled in the testbench with wide integer arithmetic and
// a SHA-1 function of their own, and they talk to the terminal over the IO1
// streams. Random numbers (keys, challenges) come from $urandom, standing in
// for the software random number generator. E and D are an XOR stream
// cipher, done in software on both sides: word i is XORed with word i mod 5
// of Q_k.x and with i * 9E3779B9 (a placeholder keystream; the cipher's
// details are not part of the hardware).
//
// Two sessions run. In the first, both sides must accept and derive the
// same k_m. In the second, an intruder corrupts the server's certificate
// signature on the way; the terminal must reject it and abort.
// A watchdog ends a hung run. All parameters are at their defaults.
module tb_mutual_auth;
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
  int n_mul = 0, n_div = 0, n_add = 0, n_sub = 0, n_poll_wait = 0;
  int n_padd = 0, n_pdbl = 0, n_tx_stall = 0;
  int n_sha_blocks = 0, n_words_out = 0, n_words_in = 0;
  int n_accept = 0, n_abort = 0;

  always #5 clk = ~clk;

  ecc_soc dut (
    .clk, .rst_n,
    .bus_addr, .bus_write, .bus_writedata, .bus_read, .bus_readdata,
    .io1_tx_valid, .io1_tx_data, .io1_tx_ready, .io1_rx_valid, .io1_rx_data, .io1_rx_ready,
    .io2_tx_valid, .io2_tx_data, .io2_tx_ready (1'b1),
    .io2_rx_valid (1'b0), .io2_rx_data (32'd0), .io2_rx_ready
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

  // ---------------- references used by the server and the CA ----------------
  function automatic void ref_mult_pt(input logic [DW-1:0] k, input logic [DW-1:0] bx, input logic [DW-1:0] by,
                                      output logic [DW-1:0] qx, output logic [DW-1:0] qy);
    logic [DW-1:0] px, py, s, tx;
    bit inf;
    px = bx; py = by; inf = 1; qx = '0; qy = '0;
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
  endfunction

  function automatic logic [31:0] rol(input logic [31:0] v, input int s);
    return (v << s) | (v >> (32 - s));
  endfunction

  // SHA-1 padding of a whole-word message
  function automatic void sha_pad(ref logic [31:0] m [$]);
    int bits;
    bits = 32 * m.size();
    m.push_back(32'h8000_0000);
    while (m.size() % 16 != 14) m.push_back(32'd0);
    m.push_back(32'd0);
    m.push_back(32'(bits));
  endfunction

  function automatic logic [159:0] sha1_ref(input logic [31:0] msg [$]);
    logic [31:0] h [5];
    logic [31:0] w [80];
    logic [31:0] a, b, c, d, e, f, k, t;
    logic [31:0] m [$];
    h = '{32'h67452301, 32'hEFCDAB89, 32'h98BADCFE, 32'h10325476, 32'hC3D2E1F0};
    m = msg;
    sha_pad(m);
    for (int blk = 0; blk < m.size() / 16; blk++) begin
      for (int i = 0; i < 16; i++) w[i] = m[16*blk + i];
      for (int i = 16; i < 80; i++) w[i] = rol(w[i-3] ^ w[i-8] ^ w[i-14] ^ w[i-16], 1);
      a = h[0]; b = h[1]; c = h[2]; d = h[3]; e = h[4];
      for (int i = 0; i < 80; i++) begin
        if (i < 20)      begin f = (b & c) | (~b & d);          k = 32'h5A827999; end
        else if (i < 40) begin f = b ^ c ^ d;                   k = 32'h6ED9EBA1; end
        else if (i < 60) begin f = (b & c) | (b & d) | (c & d); k = 32'h8F1BBCDC; end
        else             begin f = b ^ c ^ d;                   k = 32'hCA62C1D6; end
        t = rol(a, 5) + f + e + k + w[i];
        e = d; d = c; c = rol(b, 30); b = a; a = t;
      end
      h[0] += a; h[1] += b; h[2] += c; h[3] += d; h[4] += e;
    end
    return {h[0], h[1], h[2], h[3], h[4]};
  endfunction

  // ECDSA signature by the CA (reference arithmetic)
  task automatic ca_sign(input logic [DW-1:0] dca, input logic [DW-1:0] e,
                         output logic [DW-1:0] r, output logic [DW-1:0] s);
    logic [DW-1:0] k, x, y;
    do begin
      k = rnd_scalar();
      ref_mult_pt(k, GX, GY, x, y);
      r = x;
      s = nmul(ninv(k), (e + nmul(dca, r)) % N);
    end while (r == 0 || s == 0);
  endtask

  function automatic bit ref_verify(input logic [DW-1:0] qx, input logic [DW-1:0] qy,
                                    input logic [DW-1:0] e, input logic [DW-1:0] r, input logic [DW-1:0] s);
    logic [DW-1:0] w, x1, y1, x2, y2, l, x3;
    if (r == 0 || s == 0 || r >= N || s >= N) return 0;
    w = ninv(s);
    ref_mult_pt(nmul(e % N, w), GX, GY, x1, y1);
    ref_mult_pt(nmul(r, w), qx, qy, x2, y2);
    if (x1 == x2) return 0;  // not reached with honest keys
    l = rmul(rsub(y2, y1), rinv(rsub(x2, x1)));
    x3 = rsub(rsub(rmul(l, l), x1), x2);
    return x3 == r;
  endfunction

  function automatic logic [DW-1:0] rnd_scalar();
    logic [DW-1:0] v;
    for (int i = 0; i < 6; i++) v = {v[DW-33:0], $urandom()};
    v = v % (N - 1);
    return v + 1;
  endfunction

  // ---------------- message words ----------------
  localparam int VW = 6;   // words per 161-bit value on the wire
  function automatic void put_val(ref logic [31:0] q [$], input logic [DW-1:0] v);
    logic [32*VW-1:0] x;
    x = (32*VW)'(v);
    for (int i = 0; i < VW; i++) q.push_back(x[32*i +: 32]);
  endfunction
  function automatic logic [DW-1:0] get_val(input logic [31:0] q [$], input int at);
    logic [32*VW-1:0] x;
    for (int i = 0; i < VW; i++) x[32*i +: 32] = q[at + i];
    return DW'(x);
  endfunction
  // 160-bit values as five words, most significant first, for hashing
  function automatic void put_h(ref logic [31:0] q [$], input logic [DW-1:0] v);
    for (int i = 4; i >= 0; i--) q.push_back(v[32*i +: 32]);
  endfunction

  function automatic void xor_cipher(ref logic [31:0] q [$], input logic [DW-1:0] key);
    foreach (q[i]) q[i] = q[i] ^ key[32*(i % 5) +: 32] ^ (32'(i) * 32'h9E3779B9);
  endfunction

  // ---------------- terminal firmware: SHA unit and IO1 ----------------
  task automatic fw_sha(input logic [31:0] msg [$], output logic [159:0] dg);
    logic [31:0] m [$];
    logic [31:0] st, w;
    m = msg;
    sha_pad(m);
    bus_wr(A_SHA_CTRL, 32'h1);
    for (int blk = 0; blk < m.size() / 16; blk++) begin
      for (int i = 0; i < 16; i++) bus_wr(A_SHA_BLOCK + 8'(i), m[16*blk + i]);
      bus_wr(A_SHA_CTRL, 32'h2);
      do bus_rd(A_SHA_STAT, st); while (!st[0]);
      n_sha_blocks++;
    end
    for (int i = 0; i < 5; i++) begin bus_rd(A_SHA_DIGEST + 8'(i), w); dg[159-32*i -: 32] = w; end
  endtask

  task automatic fw_send(input logic [31:0] q [$]);
    logic [31:0] st;
    foreach (q[i]) begin
      do bus_rd(A_IO1_STAT, st); while (st[1]);
      bus_wr(A_IO1_DATA, q[i]);
      n_words_out++;
    end
  endtask

  task automatic fw_recv(input int n, output logic [31:0] q [$]);
    logic [31:0] st, w;
    q = {};
    repeat (n) begin
      do bus_rd(A_IO1_STAT, st); while (!st[0]);
      bus_rd(A_IO1_DATA, w);
      q.push_back(w);
      n_words_in++;
    end
  endtask

  // terminal: ECDSA verification on the MAP
  task automatic fw_verify(input logic [DW-1:0] qx, input logic [DW-1:0] qy,
                           input logic [DW-1:0] e, input logic [DW-1:0] r, input logic [DW-1:0] s,
                           output bit ok);
    logic [DW-1:0] w1, u1, u2, x1, y1, x2, y2, rx, ry;
    if (r == 0 || s == 0 || r >= N || s >= N) begin ok = 0; return; end
    cur_m = N;
    map_op(OP_DIV, 161'd1, s, w1);
    map_op(OP_MUL, e % N, w1, u1);
    map_op(OP_MUL, r, w1, u2);
    point_multiply(u1, GX, GY, x1, y1);
    point_multiply(u2, qx, qy, x2, y2);
    point_add(x1, y1, x2, y2, rx, ry);
    ok = (rx == r);
  endtask

  // ---------------- the server, on the far side of IO1 ----------------
  logic [DW-1:0] dca, qcax, qcay;                 // CA keys
  logic [DW-1:0] ds, qsx, qsy, es, rs, ss;        // server keys and certificate
  logic [31:0]   ts, is_id, tu_expect;
  logic [DW-1:0] srv_qux, srv_quy, srv_km;
  bit            srv_accept, srv_done, corrupt;

  task automatic server_session();
    logic [31:0] q [$];
    logic [DW-1:0] kx, ky, gu, gs, eu, ru, su, gs_back;
    logic [31:0] tu;
    logic [159:0] km;
    srv_done = 0; srv_accept = 0;
    peer_rx = {};
    q = {};
    put_val(q, qsx); put_val(q, qsy);
    foreach (q[i]) peer_tx.push_back(q[i]);
    wait (peer_rx.size() >= 3 * VW);
    srv_qux = get_val(peer_rx, 0);
    srv_quy = get_val(peer_rx, VW);
    gu = get_val(peer_rx, 2 * VW);
    ref_mult_pt(ds, srv_qux, srv_quy, kx, ky);
    gs = rnd_scalar();
    q = {};
    put_val(q, es); put_val(q, rs); put_val(q, corrupt ? (ss ^ 161'h4) : ss);
    q.push_back(ts); put_val(q, gu); put_val(q, gs);
    xor_cipher(q, kx);
    foreach (q[i]) peer_tx.push_back(q[i]);
    if (corrupt) begin srv_done = 1; return; end  // the terminal aborts and sends nothing
    wait (peer_rx.size() >= 3 * VW + 4 * VW + 1);
    q = peer_rx[3 * VW : 7 * VW];
    xor_cipher(q, kx);
    eu = get_val(q, 0); ru = get_val(q, VW); su = get_val(q, 2 * VW);
    tu = q[3 * VW]; gs_back = get_val(q, 3 * VW + 1);
    srv_accept = (gs_back == gs) && (tu == tu_expect) && ref_verify(qcax, qcay, eu, ru, su);
    q = {};
    put_h(q, kx); put_h(q, gs); put_h(q, gu);
    km = sha1_ref(q);
    srv_km = DW'(km);
    srv_done = 1;
  endtask

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] du, qux, quy, eu, ru, su, gu, gs, kx, ky, es_t, rs_t, ss_t, gu_back;
    logic [31:0]   tu, iu, ts_t;
    logic [31:0]   msg [$], q [$];
    logic [159:0]  dg;
    bit            ok;

    // --- off-line set-up of the CA and the server (reference arithmetic)
    dca = rnd_scalar();
    ref_mult_pt(dca, GX, GY, qcax, qcay);
    ds = rnd_scalar();
    ref_mult_pt(ds, GX, GY, qsx, qsy);
    is_id = 32'h5E2F_0001; ts = 32'h2027_1231;
    msg = {}; put_h(msg, qsx); put_h(msg, qsy); msg.push_back(is_id); msg.push_back(ts);
    es = DW'(sha1_ref(msg));
    ca_sign(dca, es, rs, ss);
    check(ref_verify(qcax, qcay, es, rs, ss), "reference: server certificate verifies");

    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // --- terminal initialization: key deployment and hashing on the SoC
    du = rnd_scalar();
    iu = 32'h00C0_FFEE; tu = 32'h2027_0630; tu_expect = tu;
    point_multiply(du, GX, GY, qux, quy);
    ref_mult_pt(du, GX, GY, kx, ky);
    check(qux == kx && quy == ky, "terminal key pair Q_u = d_u*G");
    msg = {}; put_h(msg, qux); put_h(msg, quy); msg.push_back(iu); msg.push_back(tu);
    fw_sha(msg, dg);
    eu = DW'(dg);
    check(dg == sha1_ref(msg), "terminal hash e_u on the SHA unit");
    ca_sign(dca, eu, ru, su);             // CA signs over the secure channel

    for (int sess = 0; sess < 2; sess++) begin
      corrupt = (sess == 1);
      fork
        server_session();
        begin
          // receive Q_s; send Q_u and the challenge g_u
          fw_recv(2 * VW, q);
          check(get_val(q, 0) == qsx && get_val(q, VW) == qsy, $sformatf("session %0d: Q_s received", sess));
          gu = rnd_scalar();
          q = {};
          put_val(q, qux); put_val(q, quy); put_val(q, gu);
          fw_send(q);
          // ECDH on the MAP
          point_multiply(du, qsx, qsy, kx, ky);
          // C0: decrypt, look for g_u
          fw_recv(5 * VW + 1, q);
          xor_cipher(q, kx);
          es_t = get_val(q, 0); rs_t = get_val(q, VW); ss_t = get_val(q, 2 * VW);
          ts_t = q[3 * VW]; gu_back = get_val(q, 3 * VW + 1); gs = get_val(q, 4 * VW + 1);
          check(gu_back == gu, $sformatf("session %0d: g_u returned in C0", sess));
          // verify the server's certificate on the MAP before answering
          fw_verify(qcax, qcay, es_t, rs_t, ss_t, ok);
          if (!ok) begin
            n_abort++;
            check(sess == 1, $sformatf("session %0d: terminal aborts", sess));
          end else begin
            q = {};
            put_val(q, eu); put_val(q, ru); put_val(q, su); q.push_back(tu); put_val(q, gs);
            xor_cipher(q, kx);
            fw_send(q);
            msg = {}; put_h(msg, kx); put_h(msg, gs); put_h(msg, gu);
            fw_sha(msg, dg);
            wait (srv_done);
            check(srv_accept, $sformatf("session %0d: server accepts the terminal", sess));
            check(DW'(dg) == srv_km, $sformatf("session %0d: session keys agree %h / %h", sess, dg, srv_km));
            if (srv_accept && DW'(dg) == srv_km) n_accept++;
            check(sess == 0, $sformatf("session %0d: terminal accepts", sess));
          end
        end
      join
      repeat (5) @(posedge clk);
    end

    check(n_accept == 1 && n_abort == 1, "one accepted session, one aborted");
    $display("mechanisms: accept=%0d abort=%0d mul=%0d div=%0d add=%0d sub=%0d padd=%0d pdbl=%0d sha_blocks=%0d words_out=%0d words_in=%0d tx_stall=%0d",
             n_accept, n_abort, n_mul, n_div, n_add, n_sub, n_padd, n_pdbl, n_sha_blocks, n_words_out, n_words_in, n_tx_stall);
    check(n_mul > 0 && n_div > 0 && n_add > 0 && n_sub > 0 && n_padd > 0 && n_pdbl > 0, "all MAP operations used");
    check(n_sha_blocks == 3 && n_words_out > 0 && n_words_in > 0 && n_tx_stall > 0, "SHA and IO1 used, stalls seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
