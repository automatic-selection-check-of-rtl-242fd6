// core_array_tb: writes random words into a 32-word, 16-bit core array
// through one-hot word lines, reads them back, checks that a read clears
// the word (destructive read), and that two driven lines read as the OR of
// both words.  A shadow array in the testbench is the reference.
module core_array_tb;
  localparam int unsigned M = 32;
  localparam int unsigned N = 16;

  logic clk = 1'b0;
  logic [M-1:0] word = '0;
  logic rd = 1'b0, wr = 1'b0;
  logic [N-1:0] din = '0, dout;
  logic [N-1:0] shadow [M];
  int checks = 0, failures = 0;

  core_array #(.M(M), .N(N)) dut (.clk, .word_i(word), .read_i(rd), .write_i(wr),
                                  .din_i(din), .dout_o(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_word(int l, logic [N-1:0] d);
    @(negedge clk); word = M'(1) << l; wr = 1'b1; din = d;
    @(negedge clk); wr = 1'b0; word = '0;
    shadow[l] = d;
  endtask

  // Read pulse on the given lines; returns the sensed value.
  task automatic read_lines(logic [M-1:0] lines, output logic [N-1:0] q);
    @(negedge clk); word = lines; rd = 1'b1;
    #1 q = dout;
    @(negedge clk); rd = 1'b0; word = '0;
    for (int l = 0; l < M; l++) if (lines[l]) shadow[l] = '0;
  endtask

  task automatic expect_eq(string what, logic [N-1:0] got, logic [N-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [N-1:0] q;
    int a, b;
    for (int l = 0; l < M; l++) write_word(l, N'($urandom));
    // Read and rewrite, as a memory read cycle does.
    for (int l = 0; l < M; l++) begin
      automatic logic [N-1:0] v = shadow[l];
      read_lines(M'(1) << l, q);
      expect_eq("read", q, v);
      read_lines(M'(1) << l, q);
      expect_eq("read after destructive read", q, '0);
      write_word(l, v);
      read_lines(M'(1) << l, q);
      expect_eq("read after rewrite", q, v);
      write_word(l, v);
    end
    // No current: nothing sensed.
    @(negedge clk); word = '1; #1 expect_eq("no read pulse", dout, '0);
    word = '0;
    // Two lines driven: the sense wires see the OR.
    for (int i = 0; i < 20; i++) begin
      logic [N-1:0] va, vb;
      a = $urandom_range(0, M - 1);
      b = (a + $urandom_range(1, M - 1)) % M;
      va = shadow[a]; vb = shadow[b];
      read_lines((M'(1) << a) | (M'(1) << b), q);
      expect_eq("double selection", q, va | vb);
      write_word(a, va); write_word(b, vb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
