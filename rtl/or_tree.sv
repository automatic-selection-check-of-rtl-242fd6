// or_tree: bitwise OR of NUM words of W bits, as a balanced tree of
// two-input OR gates.
//
// It stands for the many-input OR that a shared sense or reading wire forms
// when it passes through the cores of many word lines.  Level 0 holds the
// inputs (padded with zeros to a power of two); each higher level ORs pairs
// of the level below; the last level has one word.  Written as a generate
// tree, not a loop, so that synthesis needs no large loop unrolling.
// Purely combinational.
module or_tree #(
  parameter int unsigned NUM = 4096,  // words to combine
  parameter int unsigned W   = 28     // bits per word
) (
  input  logic [W-1:0] in_i [NUM],
  output logic [W-1:0] out_o
);

  localparam int unsigned LEV = (NUM > 1) ? $clog2(NUM) : 1;
  localparam int unsigned P   = 2 ** LEV;

  for (genvar lv = 0; lv <= LEV; lv++) begin : g_lv
    localparam int unsigned CNT = P >> lv;
    logic [W-1:0] v [CNT];
    for (genvar i = 0; i < CNT; i++) begin : g_n
      if (lv == 0) begin : g_leaf
        if (i < NUM) begin : g_in
          assign v[i] = in_i[i];
        end else begin : g_pad
          assign v[i] = '0;
        end
      end else begin : g_node
        assign v[i] = g_lv[lv-1].v[2*i] | g_lv[lv-1].v[2*i+1];
      end
    end
  end

  assign out_o = g_lv[LEV].v[0];

endmodule
