// address_register: holds the word address and the redundant check code for
// one memory cycle.
//
// The computer presents K address bits and D redundant bits (the code of the
// subset the address belongs to).  Both are captured on the rising clock edge
// while load_i is high and held until the next load, so the decoder and the
// comparator see stable values during the read and write current pulses.
// Separating the register from the decoder follows the list of parts of the
// addressing circuitry; the synchronous load and the reset to zero are this
// design's choices.
module address_register #(
  parameter int unsigned K = 12,  // address bits
  parameter int unsigned D = 1    // redundant code bits
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load_i,
  input  logic [K-1:0] addr_i,
  input  logic [D-1:0] red_i,
  output logic [K-1:0] addr_o,
  output logic [D-1:0] red_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_o <= '0;
      red_o  <= '0;
    end else if (load_i) begin
      addr_o <= addr_i;
      red_o  <= red_i;
    end
  end

endmodule
