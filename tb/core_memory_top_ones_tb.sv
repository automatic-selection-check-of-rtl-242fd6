// core_memory_top_ones_tb: end-to-end test of the checked core memory with
// the finer Method II check, where the subsets are the addresses with the
// same number of ONEs (64 words of 10 bits, 3 redundant bits carrying the
// ONEs count 0..6).  Same reference model, checks and mechanism counts as
// core_memory_top_tb; a fault escapes this check only when every driven
// line has the ONEs count of the intended address.
module core_memory_top_ones_tb;
  import core_check_pkg::*;
  localparam int unsigned K    = 6;
  localparam int unsigned M    = 2 ** K;
  localparam int unsigned N    = 10;
  localparam int unsigned PS_W = 12;
  localparam int unsigned OPS  = 3000;
  localparam subset_e     SUB  = SUBSET_ONES;
  localparam int unsigned D    = 3;
  localparam int unsigned NCODES = K + 1;  // ONEs counts 0..K

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  mem_op_e op = OP_READ;
  logic [K-1:0] addr = '0;
  logic [D-1:0] red = '0;
  logic [N-1:0] wdata = '0, rdata;
  sel_fault_t fault = '0;
  logic busy, done, sel_err, full_err;
  logic [PS_W-1:0] pdata;
  logic [D-1:0] b, c, cn;
  logic [K-1:0] full_b, full_c, full_cn;

  core_memory_top #(.K(K), .N(N), .SUBSET(SUB), .D(D), .PS_W(PS_W)) dut (
    .clk, .rst_n, .start_i(start), .op_i(op), .addr_i(addr), .red_i(red),
    .wdata_i(wdata), .fault_i(fault), .busy_o(busy), .done_o(done),
    .rdata_o(rdata), .pdata_o(pdata), .sel_err_o(sel_err), .b_o(b),
    .full_err_o(full_err), .full_b_o(full_b), .c_o(c), .cn_o(cn),
    .full_c_o(full_c), .full_cn_o(full_cn));

  logic [N-1:0] shadow [M];
  logic [M-1:0] known = '0;  // words written since power-up
  int checks = 0, failures = 0;
  // Mechanism counters.
  int n_read = 0, n_write = 0, n_restore = 0, n_pstore = 0;
  int n_i_detect = 0, n_ii_detect = 0, n_ii_miss = 0, n_red_wrong = 0;
  int n_drop = 0, n_extra = 0, n_wrongline = 0, n_busy_ignored = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (OPS * 8 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [PS_W-1:0] pstore_word(int l);
    logic [2*K-1:0] pair = {~K'(l), K'(l)};
    logic [PS_W-1:0] v;
    for (int w = 0; w < PS_W; w++) v[w] = pair[w % (2 * K)];
    return v;
  endfunction

  // Subset code of address l, worked out here from the ONEs of l.
  function automatic int code(int l);
    int ones = $countones(K'(l));
    return (SUB == SUBSET_PARITY) ? ones % 2 : ones;
  endfunction

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s (addr %0d fault %h): got %h expected %h", what, addr, fault, got, exp);
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never occurred: %s", what); end
  endtask

  // One memory operation with reference checking.
  task automatic mem_op(mem_op_e o, int a, logic [N-1:0] d, sel_fault_t f, bit red_ok);
    logic [M-1:0] lines;
    logic [N-1:0] exp_r;
    logic [PS_W-1:0] exp_p;
    bit exp_i, exp_ii;
    int cycles;
    int da;
    @(negedge clk);
    op = o; addr = K'(a); wdata = d; fault = f;
    red = D'(red_ok ? code(a) : (code(a) + $urandom_range(1, NCODES - 1)) % NCODES);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    // Lines the faulty decoder will drive.
    da = a ^ int'(f.addr_flip[K-1:0]);
    lines = f.drop_sel ? '0 : (M'(1) << da);
    if (f.extra_en) lines[f.extra_line[K-1:0]] = 1'b1;
    exp_r = '0; exp_p = '0; exp_ii = (lines == '0);
    for (int l = 0; l < M; l++) if (lines[l]) begin
      exp_r |= shadow[l];
      exp_p |= pstore_word(l);
      if (code(l) != int'(red)) exp_ii = 1'b1;
    end
    exp_i = (lines != (M'(1) << a));
    // A start while busy must be ignored.
    if ($urandom_range(0, 9) == 0) begin start = 1'b1; n_busy_ignored++; end
    cycles = 1;
    while (!done) begin @(negedge clk); start = 1'b0; cycles++; end
    expect_eq("latency", cycles, 3);
    if ((lines & ~known) == '0) expect_eq("read data", 32'(rdata), 32'(exp_r));
    expect_eq("permanent store", 32'(pdata), 32'(exp_p));
    expect_eq("method I error", full_err, exp_i);
    expect_eq("method II error", sel_err, exp_ii);
    for (int l = 0; l < M; l++) if (lines[l]) begin
      shadow[l] = (o == OP_WRITE) ? d : rdata;
      if (o == OP_WRITE) known[l] = 1'b1;
    end
    // Tally.
    if (o == OP_WRITE) n_write++; else n_read++;
    if (exp_p != '0) n_pstore++;
    if (f != '0 || !red_ok) begin
      if (full_err) n_i_detect++;
      if (sel_err) n_ii_detect++; else n_ii_miss++;
    end
    if (!red_ok) n_red_wrong++;
    if (f.drop_sel) n_drop++;
    if (f.extra_en) n_extra++;
    if (f.addr_flip != '0) n_wrongline++;
    @(negedge clk);
    expect_eq("idle after done", busy, 0);
  endtask

  initial begin
    automatic sel_fault_t nf = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Fill the memory.
    for (int a = 0; a < M; a++) mem_op(OP_WRITE, a, N'($urandom), nf, 1'b1);
    // Read twice: the second read shows the first one was rewritten.
    for (int a = 0; a < M; a++) begin
      automatic logic [N-1:0] v = shadow[a];
      mem_op(OP_READ, a, '0, nf, 1'b1);
      mem_op(OP_READ, a, '0, nf, 1'b1);
      expect_eq("restored after read", 32'(rdata), 32'(v));
      n_restore++;
    end
    // Random traffic with occasional faults.
    for (int i = 0; i < OPS; i++) begin
      automatic sel_fault_t f = '0;
      automatic bit red_ok = 1'b1;
      case ($urandom_range(0, 9))
        0: f.drop_sel = 1'b1;
        1: begin f.extra_en = 1'b1; f.extra_line = 16'($urandom_range(0, M - 1)); end
        2: f.addr_flip = 16'($urandom_range(1, M - 1));
        3: red_ok = 1'b0;
        default: ;
      endcase
      mem_op($urandom_range(0, 1) ? OP_WRITE : OP_READ, $urandom_range(0, M - 1),
             N'($urandom), f, red_ok);
    end
    $display("reads %0d writes %0d restores %0d pstore %0d", n_read, n_write, n_restore, n_pstore);
    $display("faults: missing %0d extra %0d wrong line %0d wrong redundant bit %0d",
             n_drop, n_extra, n_wrongline, n_red_wrong);
    $display("detected by method I %0d, by method II %0d, missed by method II %0d, busy starts %0d",
             n_i_detect, n_ii_detect, n_ii_miss, n_busy_ignored);
    need("read", n_read);                 need("write", n_write);
    need("rewrite after read", n_restore); need("permanent store read", n_pstore);
    need("method I detection", n_i_detect); need("method II detection", n_ii_detect);
    need("method II miss", n_ii_miss);     need("wrong redundant bit", n_red_wrong);
    need("missing line", n_drop);          need("extra line", n_extra);
    need("wrong line", n_wrongline);       need("start while busy", n_busy_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
