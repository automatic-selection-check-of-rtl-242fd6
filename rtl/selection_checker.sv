// selection_checker: complete selection-check circuitry of the memory, the
// encoder plate (check_encoder) feeding the parallel comparator
// (check_comparator).
//
// Method I: SUBSET = SUBSET_ADDRESS, code_i = the address register output.
//   Every addressing error (missing pulse, extra pulses, wrong pulse) is
//   caught, at the cost of 2K reading wires.
// Method II: SUBSET = SUBSET_PARITY (or SUBSET_ONES), code_i = the D
//   redundant positions sent by the computer with the address.  Only
//   selections from another subset are caught, with 2D reading wires; with
//   parity, D = 1 and the plate has two wires.
// The outputs are combinational and valid while the word lines carry the
// read current; the caller samples error_o at its check strobe.
module selection_checker
  import core_check_pkg::*;
#(
  parameter int unsigned K      = 12,
  parameter int unsigned M      = 2 ** K,
  parameter subset_e     SUBSET = SUBSET_PARITY,
  parameter int unsigned D      = code_width(SUBSET, K)
) (
  input  logic [M-1:0] word_i,
  input  logic [D-1:0] code_i,
  output logic [D-1:0] c_o,
  output logic [D-1:0] cn_o,
  output logic [D-1:0] b_o,
  output logic         error_o
);

  check_encoder #(.K(K), .M(M), .SUBSET(SUBSET), .D(D)) u_encoder (
    .word_i (word_i),
    .c_o    (c_o),
    .cn_o   (cn_o)
  );

  check_comparator #(.D(D)) u_comparator (
    .r_i     (code_i),
    .c_i     (c_o),
    .cn_i    (cn_o),
    .b_o     (b_o),
    .error_o (error_o)
  );

endmodule
