// path_control: control unit of the known-path FSM checker.
//
// It keeps the position counter C of the state sequence. A start pulse while
// idle sets C to 1 on the next edge, the cycle in which the protected FSM is
// in the first state after Idle. C then advances once per clock up to
// K = sum CNT[g]*P[g], the length of the whole sequence, and drops back to 0.
// Sub-sequence g (repeated CNT[g] times, P[g] states long) is selected while
// CNT[0]P[0]+..+CNT[g-1]P[g-1] < C <= CNT[0]P[0]+..+CNT[g]P[g].
// The counter follows the start pulse and not the protected state register,
// so a fault in that register cannot move the checking window (this design's
// choice). stop clears the counter (used when the design halts).
//
// Interface: active = (C != 0); last = (C == K); sel is combinational from C.
// Reset: asynchronous, active low.
module path_control #(
  parameter int unsigned Q       = 3,
  parameter int unsigned P   [Q] = '{2, 2, 1},
  parameter int unsigned CNT [Q] = '{1, 256, 1},
  localparam int unsigned SEL_W  = (Q > 1) ? $clog2(Q) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             stop,
  output logic             active,
  output logic             last,
  output logic [SEL_W-1:0] sel,
  output logic [31:0]      count
);
  function automatic int unsigned seq_len();
    int unsigned s;
    s = 0;
    for (int g = 0; g < Q; g++) s += CNT[g] * P[g];
    return s;
  endfunction

  localparam int unsigned K = seq_len();

  logic [31:0] c_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                c_q <= '0;
    else if (stop)            c_q <= '0;
    else if (c_q == 0)         c_q <= start ? 32'd1 : 32'd0;
    else if (c_q == K)         c_q <= '0;
    else                       c_q <= c_q + 32'd1;
  end

  always_comb begin
    int unsigned acc;
    acc = 0;
    sel = '0;
    for (int g = 0; g < Q; g++) begin
      if (c_q > acc) sel = SEL_W'(g);
      acc += CNT[g] * P[g];
    end
  end

  assign active = (c_q != 0);
  assign last   = (c_q == K);
  assign count  = c_q;
endmodule
