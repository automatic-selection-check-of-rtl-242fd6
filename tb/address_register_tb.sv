// address_register_tb: checks reset, load and hold of the address register
// (K = 12 address bits, D = 1 redundant bit) against a shadow copy kept by
// the testbench.
module address_register_tb;
  localparam int unsigned K = 12;
  localparam int unsigned D = 1;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [K-1:0] addr_i = '0, addr_o, exp_addr;
  logic [D-1:0] red_i = '0, red_o, exp_red;
  int checks = 0, failures = 0;

  address_register #(.K(K), .D(D)) dut (.clk, .rst_n, .load_i(load), .addr_i,
                                       .red_i, .addr_o, .red_o);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (addr_o !== exp_addr || red_o !== exp_red) begin
      failures++;
      $display("FAIL %s: addr %h/%h red %b/%b", what, addr_o, exp_addr, red_o, exp_red);
    end
  endtask

  initial begin
    exp_addr = '0; exp_red = '0;
    repeat (2) @(posedge clk);
    #1 check("reset");
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      load   = ($urandom_range(0, 2) == 0);
      addr_i = K'($urandom);
      red_i  = D'($urandom);
      if (load) begin exp_addr = addr_i; exp_red = red_i; end
      @(posedge clk); #1;
      check(load ? "load" : "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
