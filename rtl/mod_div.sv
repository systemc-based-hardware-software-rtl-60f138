// mod_div: modular division, z = (y / x) mod m = y * x^-1 mod m, m an odd prime.
//
// Binary (shift-and-add) division in the style of the extended binary GCD.
// Registers A = x, B = m, U = y, V = 0 keep the invariants
//   y*A = U*x (mod m)   and   y*B = V*x (mod m).
// Every iteration (one clock cycle) halves A or B, or replaces the larger of
// two odd values by half their difference, and updates U or V the same way
// modulo m:
//   A even          : A = A/2,       U = U/2 mod m
//   else B even     : B = B/2,       V = V/2 mod m
//   else A > B      : A = (A-B)/2,   U = (U-V)/2 mod m
//   else            : B = (B-A)/2,   V = (V-U)/2 mod m
// It stops when A = B, which is then gcd(x, m) = 1, so U = y/x mod m.
// Halving modulo odd m is (t even) ? t/2 : (t + m)/2. At most about
// 2*DATA_WIDTH iterations are needed.
//
// Interface: en is a level; done rises after the loop (S0 load, one cycle
// per iteration, one cycle to write z) and z and done are held until en
// falls. x = 0 has no inverse: the unit then returns z = 0. Inputs must be
// reduced (x, y < m). The original design gives the unit's function, its
// add-and-shift family and the operand order (z = y/x); the algorithm
// chosen inside is this design's.
module mod_div #(
  parameter int DATA_WIDTH = 161
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic [DATA_WIDTH-1:0] x,
  input  logic [DATA_WIDTH-1:0] y,
  input  logic [DATA_WIDTH-1:0] m,
  output logic [DATA_WIDTH-1:0] z,
  output logic                  done
);
  typedef enum logic [2:0] {IDLE, S0, S1, S2, S3} state_e;
  state_e state;

  localparam int W = DATA_WIDTH + 1;
  logic [W-1:0] a_q, b_q, u_q, v_q, p_q;

  // (t / 2) mod p for t < p, p odd
  function automatic logic [W-1:0] half_mod(input logic [W-1:0] t, input logic [W-1:0] p);
    logic [W:0] s;
    s = t[0] ? ({1'b0, t} + {1'b0, p}) : {1'b0, t};
    return W'(s >> 1);
  endfunction

  // (s - t) mod p for s, t < p
  function automatic logic [W-1:0] sub_mod(input logic [W-1:0] s, input logic [W-1:0] t,
                                           input logic [W-1:0] p);
    return (s >= t) ? (s - t) : (s - t + p);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      a_q   <= '0;
      b_q   <= '0;
      u_q   <= '0;
      v_q   <= '0;
      p_q   <= '0;
      z     <= '0;
      done  <= 1'b0;
    end else if (!en) begin
      state <= IDLE;
      done  <= 1'b0;
    end else begin
      unique case (state)
        IDLE: state <= S0;
        S0: begin
          a_q   <= W'(x);
          b_q   <= W'(m);
          u_q   <= W'(y);
          v_q   <= '0;
          p_q   <= W'(m);
          state <= (x == '0) ? S3 : S1;
        end
        S1: begin
          if (a_q == b_q) state <= S2;
          else if (!a_q[0]) begin
            a_q <= a_q >> 1;
            u_q <= half_mod(u_q, p_q);
          end else if (!b_q[0]) begin
            b_q <= b_q >> 1;
            v_q <= half_mod(v_q, p_q);
          end else if (a_q > b_q) begin
            a_q <= (a_q - b_q) >> 1;
            u_q <= half_mod(sub_mod(u_q, v_q, p_q), p_q);
          end else begin
            b_q <= (b_q - a_q) >> 1;
            v_q <= half_mod(sub_mod(v_q, u_q, p_q), p_q);
          end
        end
        S2: begin
          z     <= u_q[DATA_WIDTH-1:0];
          done  <= 1'b1;
          state <= S2;
        end
        S3: begin
          z     <= '0;
          done  <= 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // handshake: done is only ever raised while en is held
  a_done_needs_en: assert property (@(posedge clk) disable iff (!rst_n) done |-> $past(en));
endmodule
