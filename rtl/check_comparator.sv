// check_comparator: parallel comparator of the selection check.
//
// For every code position j it forms the complement ~r_j (NOT element) and
// two EXCLUSIVE-ORs, and signals a discrepancy
//     b_j = (r_j xor c_j) or (~r_j xor cn_j)
// where r is the code fed by the computer and c, cn are the two reading
// wires of that position.  Only the pairs (c, cn) = (r, ~r) give b_j = 0;
// a missing line (0, 0), two lines of different subsets (1, 1) and a line
// of the wrong subset (~r, r) all give b_j = 1.  error_o is the OR of all
// b_j.  This follows the logic diagram and truth table of the check
// circuitry exactly.  Purely combinational.
module check_comparator #(
  parameter int unsigned D = 1
) (
  input  logic [D-1:0] r_i,
  input  logic [D-1:0] c_i,
  input  logic [D-1:0] cn_i,
  output logic [D-1:0] b_o,
  output logic         error_o
);

  logic [D-1:0] rn;

  always_comb begin
    rn      = ~r_i;
    b_o     = (r_i ^ c_i) | (rn ^ cn_i);
    error_o = |b_o;
  end

endmodule
