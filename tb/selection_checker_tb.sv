// selection_checker_tb: a 7-bit address decoder drives a Method I checker
// (address code) and a Method II checker (parity code).  Every address is
// tried fault free and with each fault kind; the expected verdicts follow
// from the set of lines actually driven: Method I flags anything but the
// single addressed line, Method II flags a missing line or any line whose
// parity differs from that of the address.  Also counts how often each
// method missed a fault, to show Method II's partial coverage.
module selection_checker_tb;
  import core_check_pkg::*;
  localparam int unsigned K = 7;
  localparam int unsigned M = 2 ** K;

  logic [K-1:0] addr;
  sel_fault_t fault;
  logic [M-1:0] word;
  logic [K-1:0] c1, cn1, b1;
  logic e1;
  logic [0:0] par, c2, cn2, b2;
  logic e2;
  int checks = 0, failures = 0, missed_ii = 0, missed_i = 0, faults = 0;

  address_decoder #(.K(K), .M(M)) u_dec (.addr_i(addr), .drive_i(1'b1), .fault_i(fault), .word_o(word));
  selection_checker #(.K(K), .M(M), .SUBSET(SUBSET_ADDRESS), .D(K)) u_i
    (.word_i(word), .code_i(addr), .c_o(c1), .cn_o(cn1), .b_o(b1), .error_o(e1));
  selection_checker #(.K(K), .M(M), .SUBSET(SUBSET_PARITY), .D(1)) u_ii
    (.word_i(word), .code_i(par), .c_o(c2), .cn_o(cn2), .b_o(b2), .error_o(e2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(string what);
    bit exp1, exp2, seen_other;
    #1;
    exp1 = (word != (M'(1) << addr));
    seen_other = 1'b0;
    for (int l = 0; l < M; l++)
      if (word[l] && ($countones(K'(l)) % 2) != int'(par)) seen_other = 1'b1;
    exp2 = (word == '0) || seen_other;
    checks++;
    if (e1 !== exp1 || e2 !== exp2) begin
      failures++;
      $display("FAIL %s addr=%0d: method I %b/%b method II %b/%b", what, addr, e1, exp1, e2, exp2);
    end
    if (fault != '0) begin
      faults++;
      if (!e1) missed_i++;
      if (!e2) missed_ii++;
    end
  endtask

  initial begin
    for (int a = 0; a < M; a++) begin
      addr = K'(a); par = 1'($countones(addr) % 2);
      fault = '0; run("fault free");
      fault.drop_sel = 1'b1; run("missing line");
      fault = '0; fault.extra_en = 1'b1; fault.extra_line = 16'($urandom_range(0, M - 1)); run("extra line");
      fault = '0; fault.addr_flip = 16'(1 << $urandom_range(0, K - 1)); run("one input bit");
      fault = '0; fault.addr_flip = 16'(3 << $urandom_range(0, K - 2)); run("two input bits");
      fault = '0; fault.drop_sel = 1'b1; fault.extra_en = 1'b1;
      fault.extra_line = 16'((a + 1) % M); run("wrong line");
    end
    // Method I must miss nothing; Method II must miss some (same-parity faults).
    checks++;
    if (missed_i != 0 || missed_ii == 0 || missed_ii == faults) failures++;
    $display("faults %0d, missed by method I %0d, by method II %0d", faults, missed_i, missed_ii);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
