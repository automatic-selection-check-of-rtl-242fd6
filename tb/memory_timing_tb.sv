// memory_timing_tb: issues back-to-back and spaced start requests and checks
// the phase sequence load, settle, read (with strobe), write (with done),
// the four-clock length of an operation, and that start is ignored while
// busy.
module memory_timing_tb;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, load, rd, strobe, wr, done;
  int checks = 0, failures = 0;

  memory_timing dut (.clk, .rst_n, .start_i(start), .busy_o(busy), .load_o(load),
                     .read_o(rd), .strobe_o(strobe), .write_o(wr), .done_o(done));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_phase(string what, logic [5:0] got, logic [5:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: {busy,load,read,strobe,write,done}=%b expected %b", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    expect_phase("reset", {busy, load, rd, strobe, wr, done}, 6'b000000);
    rst_n = 1'b1;
    for (int op = 0; op < 50; op++) begin
      automatic int gap = $urandom_range(0, 3);
      repeat (gap) @(negedge clk);
      start = 1'b1;
      #1 expect_phase("accept", {busy, load, rd, strobe, wr, done}, 6'b010000);
      @(negedge clk);
      start = 1'($urandom_range(0, 1));  // ignored while busy
      expect_phase("settle", {busy, load, rd, strobe, wr, done}, 6'b100000);
      @(negedge clk);
      expect_phase("read", {busy, load, rd, strobe, wr, done}, 6'b101100);
      @(negedge clk);
      expect_phase("write", {busy, load, rd, strobe, wr, done}, 6'b100011);
      start = 1'b0;
      @(negedge clk);
      expect_phase("idle", {busy, load, rd, strobe, wr, done}, 6'b000000);
    end
    // Latency: clocks from accepted start to done.
    begin
      automatic int n = 0;
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      n = 1;
      while (!done) begin @(negedge clk); n++; end
      checks++;
      if (n != 3) begin failures++; $display("FAIL latency %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
