// sha1: SHA-1 message-hashing accelerator (FIPS 180-1), one 512-bit block at a time.
//
// init loads the chaining value H0..H4 with the standard initial constants
// (the driver's reset_SHA1). start hashes the 16-word block on block_w
// (word 0 first, big-endian within the message) into the chaining value
// (hash_compute). Padding of the message is left to software.
//
// Inside, one round is done per clock cycle: a 16-word shift register holds
// the message schedule W, the next W is rotl1(W[t-3]^W[t-8]^W[t-14]^W[t-16]),
// and working registers a..e are updated by the round function and constant
// of the current round group (Ch, Parity, Maj, Parity). After round 79 the
// working registers are added into H.
//
// Timing: block_w is sampled on the clock edge where start is seen; busy is
// high for the 80 rounds plus one cycle for the final addition, after which
// done rises (81 cycles after start) and stays high until the next start or
// init. The original design specifies a hardware SHA unit with reset and compute
// functions and the SHA-1 standard; the one-round-per-cycle structure is
// this design's choice.
module sha1 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        start,
  input  logic [31:0] block_w [16],
  output logic [31:0] digest  [5],
  output logic        busy,
  output logic        done
);
  localparam logic [31:0] H_INIT [5] = '{32'h67452301, 32'hEFCDAB89, 32'h98BADCFE,
                                         32'h10325476, 32'hC3D2E1F0};

  logic [31:0] w_q [16];
  logic [31:0] a, b, c, d, e;
  logic [6:0]  t_q;
  logic        fin_q;

  logic [31:0] f, k, temp, w_next;

  always_comb begin
    if (t_q < 7'd20)      begin f = (b & c) | (~b & d);          k = 32'h5A827999; end
    else if (t_q < 7'd40) begin f = b ^ c ^ d;                   k = 32'h6ED9EBA1; end
    else if (t_q < 7'd60) begin f = (b & c) | (b & d) | (c & d); k = 32'h8F1BBCDC; end
    else                  begin f = b ^ c ^ d;                   k = 32'hCA62C1D6; end
    temp   = {a[26:0], a[31:27]} + f + e + k + w_q[0];
    w_next = w_q[13] ^ w_q[8] ^ w_q[2] ^ w_q[0];
    w_next = {w_next[30:0], w_next[31]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) w_q[i] <= '0;
      for (int i = 0; i < 5; i++) digest[i] <= H_INIT[i];
      {a, b, c, d, e} <= '0;
      t_q   <= '0;
      busy  <= 1'b0;
      fin_q <= 1'b0;
      done  <= 1'b0;
    end else if (init && !busy) begin
      for (int i = 0; i < 5; i++) digest[i] <= H_INIT[i];
      done <= 1'b0;
    end else if (start && !busy) begin
      for (int i = 0; i < 16; i++) w_q[i] <= block_w[i];
      {a, b, c, d, e} <= {digest[0], digest[1], digest[2], digest[3], digest[4]};
      t_q  <= '0;
      busy <= 1'b1;
      done <= 1'b0;
    end else if (busy && !fin_q) begin
      e <= d;
      d <= c;
      c <= {b[1:0], b[31:2]};
      b <= a;
      a <= temp;
      for (int i = 0; i < 15; i++) w_q[i] <= w_q[i+1];
      w_q[15] <= w_next;
      t_q <= t_q + 7'd1;
      if (t_q == 7'd79) fin_q <= 1'b1;
    end else if (fin_q) begin
      digest[0] <= digest[0] + a;
      digest[1] <= digest[1] + b;
      digest[2] <= digest[2] + c;
      digest[3] <= digest[3] + d;
      digest[4] <= digest[4] + e;
      fin_q <= 1'b0;
      busy  <= 1'b0;
      done  <= 1'b1;
    end
  end
endmodule
