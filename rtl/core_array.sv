// core_array: the word-organised core matrix of a linear-selection memory,
// M rows (words) by N columns (bits).
//
// The array is addressed only through its word lines, not through a binary
// address, so a faulty decoder reaches the wrong cores just as it would in
// the real memory.  During a read current pulse (read_i high) every core of
// every driven word is switched to ZERO; dout_o is the OR of those words,
// which is what the shared sense wires of a column pick up.  The cores are
// cleared on the rising clock edge that ends the read pulse (destructive
// read).  During a write pulse (write_i high) every driven word is loaded
// with din_i on the rising clock edge, standing for the digit currents that
// let the ONE cores switch.  A read and a write pulse never overlap in this
// design; if they did, the write wins.  The cores keep their state without
// power, so the array has no reset.  Each word is its own register; the
// sense wires are an or_tree over the words.
module core_array #(
  parameter int unsigned M = 4096,  // words (rows)
  parameter int unsigned N = 28     // bits per word (columns)
) (
  input  logic         clk,
  input  logic [M-1:0] word_i,
  input  logic         read_i,
  input  logic         write_i,
  input  logic [N-1:0] din_i,
  output logic [N-1:0] dout_o
);

  logic [N-1:0] sensed [M];  // what line l puts on the sense wires

  for (genvar l = 0; l < M; l++) begin : g_word
    logic [N-1:0] cores;
    always_ff @(posedge clk) begin
      if (word_i[l]) begin
        if (write_i)     cores <= din_i;
        else if (read_i) cores <= '0;
      end
    end
    assign sensed[l] = (read_i && word_i[l]) ? cores : '0;
  end

  or_tree #(.NUM(M), .W(N)) u_sense (.in_i(sensed), .out_o(dout_o));

endmodule
