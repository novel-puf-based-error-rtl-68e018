// exp_datapath: registers and multiplier of the always-multiply right-to-left
// binary exponentiation, y = x^e.
//
// Two W-bit registers R0 and R1 start as 1 and x. For exponent bit e_i the
// Square state squares R_b and the Mult state multiplies R_b by R_{e_i}, with
// b = 1 - e_i, so every iteration does one squaring and one multiplication
// whatever the bit is. Result copies R0 to y and pulses y_valid. Arithmetic
// is modulo 2^W (this design's choice; the algorithm itself has no modulus).
// flush clears the secret registers and blocks the result.
//
// Interface: state comes from exp_fsm, e_i is the exponent bit of the current
// loop index and must be stable through Square and Mult. One operation per
// clock; y_valid is a one-cycle pulse after the Result state. Reset:
// asynchronous, active low.
module exp_datapath #(
  parameter int unsigned W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  puf_pkg::exp_state_e state,
  input  logic                e_i,
  input  logic                flush,
  input  logic [W-1:0]        x,
  output logic [W-1:0]        y,
  output logic                y_valid
);
  import puf_pkg::*;

  logic [W-1:0] r0, r1;
  logic [W-1:0] rb, rsq, rmul;

  assign rb   = e_i ? r0 : r1;          // R_b, b = 1 - e_i
  assign rsq  = W'(rb * rb);
  assign rmul = W'(r0 * r1);            // R_b * R_{e_i} is R0*R1 for either bit

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r0 <= '0; r1 <= '0; y <= '0; y_valid <= 1'b0;
    end else if (flush) begin
      r0 <= '0; r1 <= '0; y <= '0; y_valid <= 1'b0;
    end else begin
      y_valid <= 1'b0;
      case (state)
        S_INIT:   r0 <= W'(1);
        S_LOAD:   r1 <= x;
        S_SQUARE: if (e_i) r0 <= rsq; else r1 <= rsq;
        S_MULT:   if (e_i) r0 <= rmul; else r1 <= rmul;
        S_RESULT: begin y <= r0; y_valid <= 1'b1; end
        default:  ;
      endcase
    end
  end
endmodule
