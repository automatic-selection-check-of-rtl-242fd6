// check_encoder_tb: three encoder plates on a 6-bit address (the address
// itself, its parity, its number of ONEs) see random sets of driven word
// lines: none, one, two or three lines.  The expected wire levels are worked
// out per line from the line number's bits.
module check_encoder_tb;
  import core_check_pkg::*;
  localparam int unsigned K  = 6;
  localparam int unsigned M  = 2 ** K;
  localparam int unsigned DA = K;  // address code
  localparam int unsigned DP = 1;  // parity code
  localparam int unsigned DO = 3;  // ones-count code, 0..6

  logic [M-1:0] word;
  logic [DA-1:0] ca, cna, ea, ena;
  logic [DP-1:0] cp, cnp, ep, enp;
  logic [DO-1:0] co, cno, eo, eno;
  int checks = 0, failures = 0;

  check_encoder #(.K(K), .M(M), .SUBSET(SUBSET_ADDRESS), .D(DA)) u_a (.word_i(word), .c_o(ca), .cn_o(cna));
  check_encoder #(.K(K), .M(M), .SUBSET(SUBSET_PARITY),  .D(DP)) u_p (.word_i(word), .c_o(cp), .cn_o(cnp));
  check_encoder #(.K(K), .M(M), .SUBSET(SUBSET_ONES),    .D(DO)) u_o (.word_i(word), .c_o(co), .cn_o(cno));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s word=%h: got %h expected %h", what, word, got, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < 400; t++) begin
      automatic int n = (t < M) ? 1 : $urandom_range(0, 3);
      word = '0;
      if (t < M) word[t] = 1'b1;
      else for (int i = 0; i < n; i++) word[$urandom_range(0, M - 1)] = 1'b1;
      ea = '0; ena = '0; ep = '0; enp = '0; eo = '0; eno = '0;
      for (int l = 0; l < M; l++) if (word[l]) begin
        automatic logic [K-1:0] a = K'(l);
        automatic int ones = $countones(a);
        ea |= a;  ena |= ~a;
        ep |= DP'(ones % 2); enp |= ~DP'(ones % 2);
        eo |= DO'(ones); eno |= ~DO'(ones);
      end
      #1;
      expect_eq("address c",  16'(ca), 16'(ea));
      expect_eq("address cn", 16'(cna), 16'(ena));
      expect_eq("parity c",   16'(cp), 16'(ep));
      expect_eq("parity cn",  16'(cnp), 16'(enp));
      expect_eq("ones c",     16'(co), 16'(eo));
      expect_eq("ones cn",    16'(cno), 16'(eno));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
