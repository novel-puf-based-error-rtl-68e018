// checksum_store: the fingerprint registers of the known-path FSM checker,
// with their decoder and output multiplexer.
//
// The state sequence of the protected FSM is split into Q sub-sequences;
// sub-sequence g has P[g] states and its PUF check bits live in a circular
// shift register of P[g] bits whose MSB feeds back into its LSB. The decoder
// lets only the register chosen by sel advance, so after a sub-sequence has
// been walked through a whole number of times its register is back where it
// started. The multiplexer presents the MSB of the chosen register, i.e. the
// check bit expected for the current state. During enrolment (write = 1) the
// fresh PUF bit din is shifted in instead of the recirculated MSB, so one
// fault-free run fills every register with the first state's bit at the MSB.
//
// The decoder drives clock enables of a single clock rather than gating the
// clock itself (this design's choice; same behaviour). The registers are not
// reset: they hold a secret that survives reset.
//
// Timing: w_o is combinational from sel and the registers; the shift takes
// effect at the next rising edge.
module checksum_store #(
  parameter int unsigned Q     = 3,
  parameter int unsigned P [Q] = '{2, 2, 1},
  localparam int unsigned SEL_W = (Q > 1) ? $clog2(Q) : 1
) (
  input  logic             clk,
  input  logic [SEL_W-1:0] sel,
  input  logic             shift,
  input  logic             write,
  input  logic             din,
  output logic             w_o
);
  logic [Q-1:0] msb;
  logic [Q-1:0] en;

  // Decoder: one enable per register.
  always_comb begin
    en = '0;
    if (shift && int'(sel) < int'(Q)) en[sel] = 1'b1;
  end

  for (genvar g = 0; g < Q; g++) begin : g_reg
    localparam int unsigned PL = P[g];
    logic [PL-1:0] r;
    logic          fb;
    assign fb     = write ? din : r[PL-1];
    assign msb[g] = r[PL-1];
    if (PL == 1) begin : g_one
      always_ff @(posedge clk) if (en[g]) r <= fb;
    end else begin : g_many
      always_ff @(posedge clk) if (en[g]) r <= {r[PL-2:0], fb};
    end
  end

  // Multiplexer.
  assign w_o = (int'(sel) < int'(Q)) ? msb[sel] : 1'b0;
endmodule
