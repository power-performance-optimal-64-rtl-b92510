// Self-checking testbench of ling_sum_precompute.
// For every bit i the selecting carry sits at bit j, the highest bit below i
// whose column the sparse tree computes. The expected S0(i) and S1(i) are
// bit i of the integer sum of the operands' bits j+1 .. i, with a carry
// input of 0, respectively of t(j) (the conventional carry out of bit j when
// its Ling carry H(j) is 1). Sparseness 2 (default), 1 and 4 are tested.
module tb_ling_sum_precompute;
  localparam int unsigned W = 64;

  logic [W-1:0] a, b, g, t, d;
  logic [W-1:0] s0_2, s1_2, s0_1, s1_1, s0_4, s1_4;
  int checks = 0, failures = 0;
  logic clk = 0;
  int cycles = 0;

  assign g = a & b;
  assign t = a | b;
  assign d = a ^ b;

  ling_sum_precompute                               dut2 (.g(g), .t(t), .d(d), .s0(s0_2), .s1(s1_2));
  ling_sum_precompute #(.WIDTH(64), .SPARSENESS(1)) dut1 (.g(g), .t(t), .d(d), .s0(s0_1), .s1(s1_1));
  ling_sum_precompute #(.WIDTH(64), .SPARSENESS(4)) dut4 (.g(g), .t(t), .d(d), .s0(s0_4), .s1(s1_4));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 100000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic logic slice_sum_bit(input logic [W-1:0] va, input logic [W-1:0] vb,
                                         input int lo, input int i, input logic cin);
    logic [W:0] s;
    s = {1'b0, va >> lo} + {1'b0, vb >> lo} + {{W{1'b0}}, cin};
    return s[i-lo];
  endfunction

  task automatic check_sp(input int sp, input logic [W-1:0] s0, input logic [W-1:0] s1);
    for (int i = 0; i < W; i++) begin
      int   lo;
      logic tj, e0, e1;
      lo = (i / sp) * sp;            // selecting carry at bit lo-1
      tj = (lo == 0) ? 1'b0 : t[lo-1];
      e0 = slice_sum_bit(a, b, lo, i, 1'b0);
      e1 = slice_sum_bit(a, b, lo, i, tj);
      checks++;
      if (s0[i] !== e0 || s1[i] !== e1) begin
        failures++;
        if (failures < 10)
          $display("sp=%0d bit %0d a=%h b=%h s0=%b/%b s1=%b/%b", sp, i, a, b, s0[i], e0, s1[i], e1);
      end
    end
  endtask

  task automatic check_vec(input logic [W-1:0] va, input logic [W-1:0] vb);
    a = va; b = vb;
    #1;
    check_sp(2, s0_2, s1_2);
    check_sp(1, s0_1, s1_1);
    check_sp(4, s0_4, s1_4);
  endtask

  initial begin
    check_vec('0, '0);
    check_vec('1, '1);
    check_vec('1, '0);
    check_vec(64'hAAAA_AAAA_AAAA_AAAA, 64'h5555_5555_5555_5555);
    check_vec(64'h3333_3333_3333_3333, 64'h1111_1111_1111_1111);
    for (int n = 0; n < 300; n++) check_vec({$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
