// address_decoder_tb: drives every address of an 8-bit decoder with and
// without current, and with each kind of injected fault, and compares the
// word lines with a one-hot vector built by shifting.
module address_decoder_tb;
  import core_check_pkg::*;
  localparam int unsigned K = 8;
  localparam int unsigned M = 2 ** K;

  logic [K-1:0] addr;
  logic drive;
  sel_fault_t fault;
  logic [M-1:0] word, exp_word;
  int checks = 0, failures = 0;

  address_decoder #(.K(K), .M(M)) dut (.addr_i(addr), .drive_i(drive),
                                       .fault_i(fault), .word_o(word));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    #1;
    checks++;
    if (word !== exp_word) begin
      failures++;
      $display("FAIL %s addr=%0d: got %h expected %h", what, addr, word, exp_word);
    end
  endtask

  initial begin
    for (int a = 0; a < M; a++) begin
      addr = K'(a); fault = '0;
      drive = 1'b0; exp_word = '0; check("no current");
      drive = 1'b1; exp_word = M'(1) << a; check("select");
      fault.drop_sel = 1'b1; exp_word = '0; check("drop");
      fault = '0; fault.extra_en = 1'b1; fault.extra_line = 16'($urandom_range(0, M - 1));
      exp_word = (M'(1) << a) | (M'(1) << fault.extra_line); check("extra");
      fault = '0; fault.addr_flip = 16'($urandom_range(1, M - 1));
      exp_word = M'(1) << (a ^ int'(fault.addr_flip)); check("flip");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
