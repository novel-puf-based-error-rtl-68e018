// mismatch_edn: the error detection network of the known-path FSM checker.
//
// In every checked cycle it compares the live PUF check bits x (one per
// checking level) with the stored bits w and adds the number of disagreements
// to a violation count. A small number of disagreements is tolerated because
// an arbiter PUF occasionally answers at random; once the count of the current
// run exceeds the threshold L_THR the sticky error flag is raised. clear
// (given at the start of each run) resets the count but not the flag; only
// reset clears the flag. The 8-bit saturating counter is this design's choice.
//
// Timing: the count and the flag update on the clock edge after the compared
// cycle. Reset: asynchronous, active low.
module mismatch_edn #(
  parameter int unsigned LEVELS = 1,
  parameter int unsigned L_THR  = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              check,
  input  logic [LEVELS-1:0] x,
  input  logic [LEVELS-1:0] w,
  output logic [7:0]        violations,
  output logic              error
);
  logic [8:0] cnt_next;

  always_comb begin
    cnt_next = {1'b0, violations};
    if (check) cnt_next = cnt_next + 9'($countones(x ^ w));
    if (cnt_next > 9'd255) cnt_next = 9'd255;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      violations <= '0;
      error      <= 1'b0;
    end else if (clear) begin
      violations <= '0;
    end else begin
      violations <= cnt_next[7:0];
      if (cnt_next > 9'(L_THR)) error <= 1'b1;
    end
  end
endmodule
