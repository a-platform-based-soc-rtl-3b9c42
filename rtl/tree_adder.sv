// tree_adder: combinational balanced adder tree.
//
// Adds N unsigned operands of IN_W bits in ceil(log2 N) levels of two-input
// adders, which is the "tree adder" drawn in every SAD functional unit and
// window calculator of the correlator.  Operands are padded with zeros up to
// the next power of two.  OUT_W must be wide enough for N*(2**IN_W-1).
module tree_adder #(
  parameter int unsigned N     = 9,
  parameter int unsigned IN_W  = 8,
  parameter int unsigned OUT_W = 12
) (
  input  logic [IN_W-1:0]  in  [N],
  output logic [OUT_W-1:0] sum
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 0;
  localparam int unsigned P      = 1 << LEVELS;

  logic [OUT_W-1:0] lvl [LEVELS+1][P];

  always_comb begin
    for (int l = 0; l <= LEVELS; l++)
      for (int i = 0; i < P; i++) lvl[l][i] = '0;
    for (int i = 0; i < N; i++) lvl[0][i] = OUT_W'(in[i]);
    for (int l = 1; l <= LEVELS; l++)
      for (int i = 0; i < (P >> l); i++)
        lvl[l][i] = lvl[l-1][2*i] + lvl[l-1][2*i+1];
    sum = lvl[LEVELS][0];
  end

endmodule
