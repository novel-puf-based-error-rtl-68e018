// exp_fsm: known-path controller of the always-multiply right-to-left binary
// exponentiation.
//
// States: Idle (S0), Init (S1, R0 <- 1), Load (S2, R1 <- x), Square (S3),
// Mult (S4) and Result (S5, y <- R0). After start the machine runs
// Init, Load, then Square/Mult once for every exponent bit i = 0..T-1, then
// Result and back to Idle. The path does not depend on the exponent bits, only
// on T, which is what makes its state sequence known in advance
// (2 + 2T + 1 states) and checkable by fsm_puf_checker. The loop index i is
// advanced in Mult; Mult returns to Square while i has not reached T-1.
// halt (the attack alarm) sends the machine to Idle and keeps it there.
// The binary state register encoding is this design's choice.
//
// Interface: state and i are the registers themselves. Reset: asynchronous,
// active low.
module exp_fsm #(
  parameter int unsigned T   = 256,
  localparam int unsigned IW = (T > 1) ? $clog2(T) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  halt,
  output puf_pkg::exp_state_e   state,
  output logic [IW-1:0]         i
);
  import puf_pkg::*;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      i     <= '0;
    end else if (halt) begin
      state <= S_IDLE;
      i     <= '0;
    end else begin
      unique case (state)
        S_IDLE:   if (start) state <= S_INIT;
        S_INIT:   begin state <= S_LOAD; i <= '0; end
        S_LOAD:   state <= S_SQUARE;
        S_SQUARE: state <= S_MULT;
        S_MULT: begin
          if (i == IW'(T - 1)) state <= S_RESULT;
          else begin
            state <= S_SQUARE;
            i     <= i + 1'b1;
          end
        end
        S_RESULT: state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end
endmodule
