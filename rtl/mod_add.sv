// mod_add: modular addition, z = (y + x) mod m.
//
// S0 loads the operands, S1 forms the DATA_WIDTH+1-bit sum, S2 subtracts m
// once if the sum is not below m and raises done. With reduced inputs
// (x, y < m) one subtraction is enough.
//
// Interface: en is a level; done rises 3 cycles after en is first seen high
// and z and done are held until en falls. The original design names the unit and its
// ports; the three-state sequence is this design's choice, made to match the
// other arithmetic units of the processor.
module mod_add #(
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

  logic [DATA_WIDTH:0] s_q, x_q, y_q, p_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      s_q   <= '0;
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
          s_q   <= y_q + x_q;
          state <= S2;
        end
        S2: begin
          if (!done) begin
            z    <= (s_q >= p_q) ? DATA_WIDTH'(s_q - p_q) : s_q[DATA_WIDTH-1:0];
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
