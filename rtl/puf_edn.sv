// puf_edn: PUF-based error detection network for concurrent error detection.
//
// A CED scheme computes a result twice, in the main branch and in a
// predictor, and an error detection network compares them. Here the
// comparison itself is made tamper-evident: the two N-bit results are XORed,
// which gives the zero vector when they agree, and the XOR is passed through
// T secret permutations rho_j into an arbiter PUF. Permuting zero gives zero,
// so a fault-free comparison always reproduces the PUF's answer to the
// all-zero challenge, recorded at enrolment. A non-zero XOR yields challenges
// whose answers disagree with the record about half the time; more than L_THR
// disagreements out of T flag the comparison. Tampering with the PUF wires
// themselves also changes its answers.
//
// The record holds T bits, one per permutation, all equal to PUF(0); the
// permutations are evaluated one per clock through a single PUF (this design's
// choice), so a comparison takes T cycles.
//
// Interface: valid (with main_res, pred_res) or enroll is accepted when ready
// is high; the XOR is captured then. done pulses one cycle after the last
// evaluation, with mismatch telling whether that comparison failed; error is
// sticky until reset. Reset: asynchronous, active low; the record is not reset.
module puf_edn #(
  parameter int unsigned N         = 32,
  parameter int unsigned T         = 8,
  parameter int unsigned L_THR     = 1,
  parameter int unsigned PUF_SEED  = 37,
  parameter int unsigned PERM_SEED = 41,
  localparam int unsigned SW       = (T > 1) ? $clog2(T) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         enroll,
  input  logic         valid,
  input  logic [N-1:0] main_res,
  input  logic [N-1:0] pred_res,
  output logic         ready,
  output logic         done,
  output logic         mismatch,
  output logic         error
);
  logic [T-1:0]  fingerprint;
  logic [N-1:0]  diff;
  logic [SW-1:0] j;
  logic [SW:0]   cnt;
  logic [SW:0]   cnt_next;
  logic          enrolling;
  logic          busy;
  logic [N-1:0]  challenge;
  logic          resp;
  logic          mism;

  permute_block #(.N(N), .T(T), .SEED(PERM_SEED)) u_perm (
    .sel(j), .din(diff), .dout(challenge)
  );

  puf_arbiter #(.N(N), .SEED(PUF_SEED)) u_puf (
    .challenge(challenge), .response(resp)
  );

  assign ready    = !busy;
  assign mism     = !enrolling && (resp != fingerprint[j]);
  assign cnt_next = cnt + (SW + 1)'(mism);

  always_ff @(posedge clk) begin
    if (busy && enrolling) fingerprint[j] <= resp;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; mismatch <= 1'b0; error <= 1'b0;
      diff <= '0; j <= '0; cnt <= '0; enrolling <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (enroll || valid) begin
          busy      <= 1'b1;
          enrolling <= enroll;
          diff      <= enroll ? '0 : (main_res ^ pred_res);
          j         <= '0;
          cnt       <= '0;
        end
      end else if (j == SW'(T - 1)) begin
        busy     <= 1'b0;
        done     <= 1'b1;
        mismatch <= cnt_next > (SW + 1)'(L_THR);
        if (cnt_next > (SW + 1)'(L_THR)) error <= 1'b1;
      end else begin
        j   <= j + 1'b1;
        cnt <= cnt_next;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) busy && enrolling |-> diff == '0)
    else $error("puf_edn: enrolment challenge is not zero");
endmodule
