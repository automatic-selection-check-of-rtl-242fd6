// check_encoder: the encoder plate of the selection check, built from one
// checking core per word line and 2D reading wires.
//
// Each reading wire is a many-input OR gate: it threads the checking cores of
// exactly those word lines that are its arguments, and the reading amplifier
// on it turns the induced pulse into a standard logic level.  For code
// position j there are two wires: c_o[j] threads the words whose subset code
// has bit j = 1, cn_o[j] those whose code has bit j = 0.  With SUBSET =
// SUBSET_ADDRESS this is the Method I encoder, turning the one-out-of-M word
// lines back into the binary address and its complement (2K OR gates of M/2
// inputs each).  With SUBSET_PARITY it is the two-wire plate of the parity
// check.  A correctly working decoder yields c = code, cn = ~code; no line
// yields c = cn = 0; lines from different subsets set both wires of a pair.
//
// The threading is fixed at elaboration: THREAD[j][l] says whether line l
// passes through wire c_j.  Purely combinational; the reading amplifiers
// are ideal thresholds.
module check_encoder
  import core_check_pkg::*;
#(
  parameter int unsigned K      = 12,
  parameter int unsigned M      = 2 ** K,
  parameter subset_e     SUBSET = SUBSET_PARITY,
  parameter int unsigned D      = code_width(SUBSET, K)
) (
  input  logic [M-1:0] word_i,
  output logic [D-1:0] c_o,
  output logic [D-1:0] cn_o
);

  logic [M-1:0] thread [D];

  for (genvar l = 0; l < M; l++) begin : g_line
    localparam int unsigned CODE = subset_code(SUBSET, l, K);
    for (genvar j = 0; j < D; j++) begin : g_pos
      assign thread[j][l] = 1'(CODE >> j);
    end
  end

  always_comb begin
    for (int unsigned j = 0; j < D; j++) begin
      c_o[j]  = |(word_i & thread[j]);
      cn_o[j] = |(word_i & ~thread[j]);
    end
  end

endmodule
