// fsm_puf_checker: PUF-based checking circuit for a known-path state machine.
//
// A known-path FSM walks through the same state sequence in every operation,
// independent of its data. The checker fingerprints that sequence: every
// clock the current state is encoded by f (state_encoder) and applied to an
// arbiter PUF, whose one-bit answer x is compared with the bit recorded for
// this position of the sequence. A fault that diverts the FSM makes about
// half of the following check bits wrong; more than L_THR violations in a run
// raise error. The recorded bits are stored compactly: the sequence is Q
// sub-sequences, sub-sequence g being P[g] states repeated CNT[g] times, and
// only P[g] bits are kept per sub-sequence (checksum_store), selected by the
// position counter (path_control).
//
// A run with enroll = 1 at its start records the bits instead of checking
// them; it must be a fault-free run. LEVELS > 1 adds independent PUFs, each
// with its own registers, and sums their violations (detection 1-2^-(t*d-L)).
// With SHARED_PUF = 1 the levels instead use one PUF (the same delays) and
// level d > 0 sees the state code through a secret permutation rho_d, i.e. a
// variant encoding of the states; each level still has its own registers.
// In silicon that is one PUF evaluated LEVELS times per state (time
// multiplexed); the model instantiates the same PUF once per level.
//
// Interface: start is the pulse that takes the FSM out of Idle; the first
// checked cycle is the next one. state is the FSM state register. active is
// high during the K checked cycles. Reset: asynchronous, active low; the
// fingerprint registers are not reset.
module fsm_puf_checker #(
  parameter int unsigned STATE_W  = 3,
  parameter int unsigned N        = 8,
  parameter int unsigned Q        = 3,
  parameter int unsigned P   [Q]  = '{2, 2, 1},
  parameter int unsigned CNT [Q]  = '{1, 256, 1},
  parameter int unsigned LEVELS   = 1,
  parameter int unsigned L_THR    = 1,
  parameter int unsigned SEED     = 11,
  parameter bit          SHARED_PUF = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               enroll,
  input  logic               stop,
  input  logic [STATE_W-1:0] state,
  output logic               active,
  output logic [7:0]         violations,
  output logic               error
);
  localparam int unsigned SEL_W = (Q > 1) ? $clog2(Q) : 1;

  logic [N-1:0]      code;
  logic [LEVELS-1:0] x;
  logic [LEVELS-1:0] w;
  logic [SEL_W-1:0]  sel;
  logic              last;
  logic [31:0]       count;
  logic              accept;
  logic              enrolling;

  assign accept = start && !active && !stop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      enrolling <= 1'b0;
    else if (accept) enrolling <= enroll;
  end

  state_encoder #(.STATE_W(STATE_W), .N(N)) u_f (
    .state(state), .code(code)
  );

  path_control #(.Q(Q), .P(P), .CNT(CNT)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(accept), .stop(stop),
    .active(active), .last(last), .sel(sel), .count(count)
  );

  localparam int unsigned LSW = (LEVELS > 1) ? $clog2(LEVELS) : 1;

  for (genvar d = 0; d < LEVELS; d++) begin : g_level
    logic [N-1:0] challenge;
    if (SHARED_PUF && d > 0) begin : g_variant
      permute_block #(.N(N), .T(LEVELS), .SEED(SEED + 7)) u_perm (
        .sel(LSW'(d)), .din(code), .dout(challenge)
      );
    end else begin : g_direct
      assign challenge = code;
    end
    puf_arbiter #(.N(N), .SEED(SHARED_PUF ? SEED : SEED + 1000 * d)) u_puf (
      .challenge(challenge), .response(x[d])
    );
    checksum_store #(.Q(Q), .P(P)) u_store (
      .clk(clk), .sel(sel), .shift(active), .write(enrolling),
      .din(x[d]), .w_o(w[d])
    );
  end

  mismatch_edn #(.LEVELS(LEVELS), .L_THR(L_THR)) u_edn (
    .clk(clk), .rst_n(rst_n), .clear(accept), .check(active && !enrolling),
    .x(x), .w(w), .violations(violations), .error(error)
  );

  // The position counter closes the window exactly after K cycles.
  assert property (@(posedge clk) disable iff (!rst_n) last |=> !active || $past(accept));
endmodule
