// permute_block: applies one of T secret, pre-chosen bit permutations to an
// N-bit word.
//
// The permutations rho_0..rho_{T-1} are pure wiring. They are drawn at
// elaboration by a Fisher-Yates shuffle seeded with SEED, standing in for
// permutations chosen at random and kept secret by the designer; sel picks
// which one drives dout. A value of sel at or above T gives all zeros.
//
// Interface: combinational, dout[pos] = din[rho_sel(pos)]. N <= 256.
module permute_block #(
  parameter int unsigned N    = 64,
  parameter int unsigned T    = 8,
  parameter int unsigned SEED = 5,
  localparam int unsigned SW  = (T > 1) ? $clog2(T) : 1
) (
  input  logic [SW-1:0] sel,
  input  logic [N-1:0]  din,
  output logic [N-1:0]  dout
);
  logic [N-1:0] perm [T];

  for (genvar j = 0; j < T; j++) begin : g_perm
    for (genvar pos = 0; pos < N; pos++) begin : g_bit
      localparam int unsigned IDX = puf_pkg::perm_index(SEED, j, pos, N);
      assign perm[j][pos] = din[IDX];
    end
  end

  assign dout = (int'(sel) < int'(T)) ? perm[sel] : '0;
endmodule
