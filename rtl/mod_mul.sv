// mod_mul: interleaved (add-and-shift) modular multiplication, z = (y * x) mod m.
//
// The multiplier y is consumed one bit per iteration, least significant bit
// first. Each iteration takes three clock cycles, one per state of the
// original design's state machine:
//   S1  stop if A = 0, else U = U + V when A[0] = 1
//   S2  A = A / 2, V = 2V, and U = U - P when U >= P
//   S3  V = V - P when V >= P
// S0 loads U = 0, V = x, A = y, P = m; S4 writes z = U and raises done.
// U, V are DATA_WIDTH+1 bits wide so that U + V and 2V (both below 2m) fit.
//
// Interface: en is a level. Raising en starts an operation; done rises
// 3*L + 3 cycles later (L = bit length of y, 0 for y = 0) and z and done are
// held until en falls, which returns the unit to idle. Inputs must be
// reduced (x, y < m) and are sampled in S0. Holding done until en falls is
// this design's choice; the algorithm, states and register widths follow
// the original design.
module mod_mul #(
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
  typedef enum logic [2:0] {IDLE, S0, S1, S2, S3, S4} state_e;
  state_e state;

  logic [DATA_WIDTH:0] u_q, v_q, a_q, p_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      u_q   <= '0;
      v_q   <= '0;
      a_q   <= '0;
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
          u_q   <= '0;
          v_q   <= {1'b0, x};
          a_q   <= {1'b0, y};
          p_q   <= {1'b0, m};
          state <= S1;
        end
        S1: begin
          if (a_q == '0) state <= S4;
          else begin
            if (a_q[0]) u_q <= u_q + v_q;
            state <= S2;
          end
        end
        S2: begin
          a_q <= a_q >> 1;
          v_q <= v_q << 1;
          if (u_q >= p_q) u_q <= u_q - p_q;
          state <= S3;
        end
        S3: begin
          if (v_q >= p_q) v_q <= v_q - p_q;
          state <= S1;
        end
        S4: begin
          z    <= u_q[DATA_WIDTH-1:0];
          done <= 1'b1;
          // stays in S4, holding z and done, until en falls
        end
        default: state <= IDLE;
      endcase
    end
  end

  // handshake: done is only ever raised while en is held
  a_done_needs_en: assert property (@(posedge clk) disable iff (!rst_n) done |-> $past(en));
endmodule
