// state_encoder: the state encoding function f that turns an FSM state into
// the N-bit PUF challenge.
//
// The detection argument for the PUF checker needs the challenges of any two
// states to look unrelated to the PUF, which by the arbiter delay model means
// that their internal parity vectors P = U*C (suffix XORs of the challenge)
// differ in N/2 positions. The encoder therefore picks, for state s, row
// (s+1) mod N of the N x N Sylvester-Hadamard matrix h as the target parity
// vector (any two distinct rows differ in exactly N/2 bits) and outputs the
// challenge whose suffix XORs equal it: code[i] = h[i] ^ h[i+1], code[N-1] =
// h[N-1]. Choosing Hadamard rows and working in the parity domain is this
// design's own reading of the "distance n/2" requirement.
//
// Interface: purely combinational. N must be a power of two; every one of the
// 2**STATE_W state values, legal or not, gets a code.
module state_encoder #(
  parameter int unsigned STATE_W = 3,
  parameter int unsigned N       = 8
) (
  input  logic [STATE_W-1:0] state,
  output logic [N-1:0]       code
);
  localparam int unsigned NS = 2 ** STATE_W;

  logic [N-1:0] table_q [NS];

  for (genvar s = 0; s < NS; s++) begin : g_state
    localparam int unsigned ROW = (s + 1) % N;
    for (genvar b = 0; b < N; b++) begin : g_bit
      if (b == N - 1) begin : g_last
        assign table_q[s][b] = puf_pkg::hadamard_bit(ROW, b);
      end else begin : g_mid
        assign table_q[s][b] = puf_pkg::hadamard_bit(ROW, b) ^ puf_pkg::hadamard_bit(ROW, b + 1);
      end
    end
  end

  assign code = table_q[state];
endmodule
