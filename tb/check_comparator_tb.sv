// check_comparator_tb: the one-position comparator is run through the eight
// rows of the truth table of the check (r, c, cn -> b), typed in here as the
// reference; a 5-position comparator is then checked with random inputs
// against "error unless c = r and cn = ~r".
module check_comparator_tb;
  logic [0:0] r1, c1, cn1, b1;
  logic e1;
  logic [4:0] r5, c5, cn5, b5;
  logic e5;
  int checks = 0, failures = 0;

  // Rows {r, c, cn, b} of the truth table.
  localparam logic [3:0] TABLE [8] = '{4'b0_00_1, 4'b0_01_0, 4'b0_10_1, 4'b0_11_1,
                                       4'b1_00_1, 4'b1_01_1, 4'b1_10_0, 4'b1_11_1};

  check_comparator #(.D(1)) u1 (.r_i(r1), .c_i(c1), .cn_i(cn1), .b_o(b1), .error_o(e1));
  check_comparator #(.D(5)) u5 (.r_i(r5), .c_i(c5), .cn_i(cn5), .b_o(b5), .error_o(e5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {r1, c1, cn1} = TABLE[i][3:1];
      #1;
      checks++;
      if (b1 !== TABLE[i][0] || e1 !== TABLE[i][0]) begin
        failures++;
        $display("FAIL table row %0d: b=%b error=%b", i, b1, e1);
      end
    end
    for (int i = 0; i < 500; i++) begin
      logic [4:0] exp_b;
      r5 = 5'($urandom);
      case ($urandom_range(0, 3))
        0: begin c5 = r5; cn5 = ~r5; end                    // correct selection
        1: begin c5 = r5 ^ 5'($urandom); cn5 = ~r5; end
        2: begin c5 = r5; cn5 = ~r5 | 5'($urandom); end
        default: begin c5 = 5'($urandom); cn5 = 5'($urandom); end
      endcase
      for (int j = 0; j < 5; j++) exp_b[j] = !(c5[j] == r5[j] && cn5[j] == !r5[j]);
      #1;
      checks++;
      if (b5 !== exp_b || e5 !== (exp_b != 0)) begin
        failures++;
        $display("FAIL r=%b c=%b cn=%b: b=%b exp %b", r5, c5, cn5, b5, exp_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
