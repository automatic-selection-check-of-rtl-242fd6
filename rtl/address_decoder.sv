// address_decoder: decoding matrices, selection elements and word current
// drivers of a linear-selection memory, reduced to their logic function.
//
// Word line a_l carries a current pulse while drive_i is high exactly when
// l equals the binary address (a_l = 1 for l = sum r_j 2^j, else 0).  The
// analog side (magnetic switch cores, current amplitudes) is not modelled: a
// 1 on word_o[l] stands for a full-select current pulse on line l.
//
// fault_i makes the circuit fail in the three ways the selection check is
// meant to catch: addr_flip inverts decoder input bits (a wrong line is
// selected), drop_sel removes the pulse from the selected line, extra_en
// drives line extra_line as well.  With fault_i all zero the decoder is
// fault free.  The fault port is this design's test aid.  Purely
// combinational: one address comparator per word line.
module address_decoder
  import core_check_pkg::*;
#(
  parameter int unsigned K = 12,
  parameter int unsigned M = 2 ** K
) (
  input  logic         [K-1:0] addr_i,
  input  logic                 drive_i,   // word current pulse enable
  input  sel_fault_t           fault_i,
  output logic         [M-1:0] word_o
);

  logic [K-1:0] dec_addr;

  assign dec_addr = addr_i ^ fault_i.addr_flip[K-1:0];

  for (genvar l = 0; l < M; l++) begin : g_line
    assign word_o[l] = drive_i &&
                       (((dec_addr == K'(l)) && !fault_i.drop_sel) ||
                        (fault_i.extra_en && (fault_i.extra_line[K-1:0] == K'(l))));
  end

  initial begin
    assert (K <= ADDR_MAX_W) else $error("K exceeds the fault record width");
    assert (M == 2 ** K) else $error("M must be 2**K");
  end

endmodule
