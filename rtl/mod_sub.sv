// mod_sub: modular subtraction, z = (y - x) mod m.
//
// S0 loads the operands, S1 forms the DATA_WIDTH+1-bit difference y - x,
// whose top bit is the borrow, S2 adds m back when there was a borrow and
// raises done. Inputs must be reduced (x, y < m). The operand order, y minus
// x, follows the driver's argument order (first argument y, second x).
//
// Interface: en is a level; done rises 3 cycles after en is first seen high
// and z and done are held until en falls. The state sequence is this
// design's choice; the original design names the unit and its ports.
module mod_sub #(
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
  typedef enum logic [1:0] {IDLE, S0, S1, S2} state_e;
  state_e state;

  logic [DATA_WIDTH:0] d_q, x_q, y_q, p_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      d_q   <= '0;
      x_q   <= '0;
      y_q   <= '0;
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
          x_q   <= {1'b0, x};
          y_q   <= {1'b0, y};
          p_q   <= {1'b0, m};
          state <= S1;
        end
        S1: begin
          d_q   <= y_q - x_q;
          state <= S2;
        end
        S2: begin
          if (!done) begin
            z    <= d_q[DATA_WIDTH] ? DATA_WIDTH'(d_q + p_q) : d_q[DATA_WIDTH-1:0];
            done <= 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // handshake: done is only ever raised while en is held
  a_done_needs_en: assert property (@(posedge clk) disable iff (!rst_n) done |-> $past(en));
endmodule
