// puf_arbiter: behavioural model of the delay-based (arbiter) PUF.
//
// The physical part is a chain of N switch stages that a pulse races down on
// two paths; control bit c_i either passes the two paths straight or crosses
// them, and an arbiter flip-flop at the end decides which path won. Its
// behaviour is captured by the additive delay model used here:
//   R = 1 if  sum_i (-1)^p_i * y_i + y_{N+1} > 0,  else 0,
//   p_i = c_i ^ c_{i+1} ^ ... ^ c_N.
// The y terms are per-chip delay differences. The model fixes them at
// elaboration from SEED (one SEED = one manufactured die), drawing them from
// an approximately normal distribution, and is deterministic: arbiter
// metastability is not modelled. The delay model itself follows the
// literature on arbiter PUFs; the integer scale and the seeding are this
// design's own.
//
// Interface: challenge[i-1] is c_i, the control bit of stage i (stage 1 is
// next to the pulse source). response is purely combinational.
module puf_arbiter #(
  parameter int unsigned N    = 8,
  parameter int unsigned SEED = 1
) (
  input  logic [N-1:0] challenge,
  output logic         response
);
  localparam int unsigned SUM_W = puf_pkg::DELAY_W + $clog2(N + 2);

  logic signed [puf_pkg::DELAY_W-1:0] y [N+1];
  logic [N-1:0]                       p;
  logic signed [SUM_W-1:0]            sum;

  for (genvar g = 0; g <= N; g++) begin : g_y
    localparam int YV = puf_pkg::delay_weight(SEED, g);
    assign y[g] = puf_pkg::DELAY_W'(YV);
  end

  always_comb begin
    // Parity vector P = U C (suffix XOR of the challenge).
    p[N-1] = challenge[N-1];
    for (int i = N - 2; i >= 0; i--) p[i] = p[i+1] ^ challenge[i];
    sum = SUM_W'(y[N]);
    for (int i = 0; i < N; i++) begin
      if (p[i]) sum = sum - SUM_W'(y[i]);
      else      sum = sum + SUM_W'(y[i]);
    end
    response = (sum > 0);
  end
endmodule
