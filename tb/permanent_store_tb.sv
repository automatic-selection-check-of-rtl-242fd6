// permanent_store_tb: a 6-bit, 16-wire permanent store is read on every line
// and on random pairs of lines.  The expected word of line l is the
// placeholder pattern: bit w is bit (w mod K) of l, inverted when w div K
// is odd; a pair reads as the OR of its two words.
module permanent_store_tb;
  localparam int unsigned K = 6;
  localparam int unsigned M = 2 ** K;
  localparam int unsigned W = 16;

  logic [M-1:0] word;
  logic [W-1:0] data;
  int checks = 0, failures = 0;

  permanent_store #(.K(K), .M(M), .W(W)) dut (.word_i(word), .data_o(data));

  function automatic logic [W-1:0] stored(int l);
    logic [2*K-1:0] pair = {~K'(l), K'(l)};
    logic [W-1:0] v;
    for (int w = 0; w < W; w++) v[w] = pair[w % (2 * K)];
    return v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(logic [W-1:0] exp);
    #1;
    checks++;
    if (data !== exp) begin
      failures++;
      $display("FAIL word=%h: got %h expected %h", word, data, exp);
    end
  endtask

  initial begin
    word = '0; expect_eq('0);
    for (int l = 0; l < M; l++) begin word = M'(1) << l; expect_eq(stored(l)); end
    for (int i = 0; i < 50; i++) begin
      automatic int a = $urandom_range(0, M - 1), b = $urandom_range(0, M - 1);
      word = (M'(1) << a) | (M'(1) << b);
      expect_eq(stored(a) | stored(b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
