// core_memory_top: linear-selection magnetic core memory with an automatic
// check of its addressing circuitry.
//
// Datapath: the address register holds K address bits and the D redundant
// bits sent by the computer; the decoder turns the address into a current
// pulse on one of M = 2^K word lines; the word lines drive the core array
// (N bits per word) and, through one extra core per line, three sets of
// reading wires:
//   * the Method II check plate (parity of the address by default, two
//     wires), compared with the redundant bits from the computer;
//   * the Method I check plate (2K wires re-encoding the address), compared
//     with the address register itself;
//   * a permanent store of PS_W bits per word line.
// memory_timing sequences each operation: load address, settle, read pulse
// (data, permanent store and both checks are captured at its end), write
// pulse (rewrite of the data read, or new data for a write).
//
// Interface: pulse start_i for one clock while busy_o is low, with op_i,
// addr_i, red_i and wdata_i valid in that clock.  Three clocks later done_o
// is high for one clock (the fourth and last clock of the operation); rdata_o
// (word read, before a write replaces it),
// pdata_o (permanent store word), sel_err_o / b_o (Method II check) and
// full_err_o / full_b_o (Method I check) then hold their values until the
// next operation's read pulse ends.  fault_i injects addressing faults into
// the decoder for testing; tie it to zero in use.
//
// The sizes follow the 4096-word, 28-bit memory that used the parity form
// of Method II.  Running Method I beside it, the permanent store's width
// and its contents (core_check_pkg::pstore_word, a placeholder pattern) are
// this design's choices.
module core_memory_top
  import core_check_pkg::*;
#(
  parameter int unsigned K         = 12,             // address bits
  parameter int unsigned N         = 28,             // bits per word
  parameter subset_e     SUBSET    = SUBSET_PARITY,  // Method II subsets
  parameter int unsigned D         = code_width(SUBSET, K),
  parameter int unsigned PS_W      = 28,             // permanent store bits
  parameter int unsigned M         = 2 ** K
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start_i,
  input  mem_op_e         op_i,
  input  logic [K-1:0]    addr_i,
  input  logic [D-1:0]    red_i,
  input  logic [N-1:0]    wdata_i,
  input  sel_fault_t      fault_i,
  output logic            busy_o,
  output logic            done_o,
  output logic [N-1:0]    rdata_o,
  output logic [PS_W-1:0] pdata_o,
  output logic            sel_err_o,
  output logic [D-1:0]    b_o,
  output logic            full_err_o,
  output logic [K-1:0]    full_b_o,
  output logic [D-1:0]    c_o,       // Method II reading wires, live
  output logic [D-1:0]    cn_o,
  output logic [K-1:0]    full_c_o,  // Method I reading wires, live
  output logic [K-1:0]    full_cn_o
);

  logic         load, read_p, write_p, strobe;
  logic [K-1:0] addr_q;
  logic [D-1:0] red_q;
  mem_op_e      op_q;
  logic [N-1:0] wdata_q;
  logic [M-1:0] word;
  logic [N-1:0] sense;
  logic [PS_W-1:0] ps_sense;
  logic [D-1:0] b2;
  logic         err2;
  logic [K-1:0] b1;
  logic         err1;

  memory_timing u_timing (
    .clk      (clk),
    .rst_n    (rst_n),
    .start_i  (start_i),
    .busy_o   (busy_o),
    .load_o   (load),
    .read_o   (read_p),
    .strobe_o (strobe),
    .write_o  (write_p),
    .done_o   (done_o)
  );

  address_register #(.K(K), .D(D)) u_addr_reg (
    .clk    (clk),
    .rst_n  (rst_n),
    .load_i (load),
    .addr_i (addr_i),
    .red_i  (red_i),
    .addr_o (addr_q),
    .red_o  (red_q)
  );

  // Operation and write data travel with the address.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q    <= OP_READ;
      wdata_q <= '0;
    end else if (load) begin
      op_q    <= op_i;
      wdata_q <= wdata_i;
    end
  end

  address_decoder #(.K(K), .M(M)) u_decoder (
    .addr_i  (addr_q),
    .drive_i (read_p || write_p),
    .fault_i (fault_i),
    .word_o  (word)
  );

  core_array #(.M(M), .N(N)) u_array (
    .clk     (clk),
    .word_i  (word),
    .read_i  (read_p),
    .write_i (write_p),
    .din_i   ((op_q == OP_WRITE) ? wdata_q : rdata_o),
    .dout_o  (sense)
  );

  permanent_store #(.K(K), .M(M), .W(PS_W)) u_pstore (
    .word_i (word),
    .data_o (ps_sense)
  );

  // Method II: subset code sent by the computer.
  selection_checker #(.K(K), .M(M), .SUBSET(SUBSET), .D(D)) u_check_ii (
    .word_i  (word),
    .code_i  (red_q),
    .c_o     (c_o),
    .cn_o    (cn_o),
    .b_o     (b2),
    .error_o (err2)
  );

  // Method I: the address itself, re-encoded from the word lines.
  selection_checker #(.K(K), .M(M), .SUBSET(SUBSET_ADDRESS), .D(K)) u_check_i (
    .word_i  (word),
    .code_i  (addr_q),
    .c_o     (full_c_o),
    .cn_o    (full_cn_o),
    .b_o     (b1),
    .error_o (err1)
  );

  // Capture at the end of the read current pulse.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata_o    <= '0;
      pdata_o    <= '0;
      sel_err_o  <= 1'b0;
      b_o        <= '0;
      full_err_o <= 1'b0;
      full_b_o   <= '0;
    end else if (strobe) begin
      rdata_o    <= sense;
      pdata_o    <= ps_sense;
      sel_err_o  <= err2;
      b_o        <= b2;
      full_err_o <= err1;
      full_b_o   <= b1;
    end
  end

endmodule
