// permanent_store: read-only store that shares the word lines of the
// working memory.
//
// One more core is placed on every word line.  Reading wire w stands for
// bit w of the stored word and threads only the cores of those words that
// hold a ONE in that bit, so a read current pulse on line l induces a pulse
// on exactly the wires of the ONE bits of word l.  The store needs no
// address circuits of its own; only the reading amplifiers (ideal
// thresholds here) are added.  data_o[w] is the OR, over all driven lines,
// of bit w of their stored words: combinational and valid while the word
// lines carry the read current.  The threading is given by the constant
// function core_check_pkg::pstore_word(l, K), the one place to edit to wire other
// contents; its default pattern is a placeholder.
module permanent_store
  import core_check_pkg::*;
#(
  parameter int unsigned K = 12,      // address bits
  parameter int unsigned M = 2 ** K,  // word lines
  parameter int unsigned W = 28       // reading wires (bits per stored word)
) (
  input  logic [M-1:0] word_i,
  output logic [W-1:0] data_o
);

  logic [W-1:0] picked [M];  // what line l puts on the reading wires

  for (genvar l = 0; l < M; l++) begin : g_line
    localparam logic [W-1:0] WORD = W'(pstore_word(l, K));
    assign picked[l] = word_i[l] ? WORD : '0;
  end

  or_tree #(.NUM(M), .W(W)) u_wires (.in_i(picked), .out_o(data_o));

endmodule
