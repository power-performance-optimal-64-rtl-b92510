// Self-checking testbench of ling_sparse_tree, the sparse radix-4 carry tree.
// The default 64-bit tree with sparseness 2 is tested, next to 64-bit trees
// with sparseness 1 and 4 and a 16-bit tree. Every output Ling carry H(i)
// is compared with a bit-serial evaluation of H(i) = g(i) + t(i-1) H(i-1),
// and the conventional carry t(i) H(i) with the carry bit of the integer sum
// of the operands' low bits.
module tb_ling_sparse_tree;
  localparam int unsigned W = 64;

  logic [W-1:0]   a, b, g, t;
  logic [W/2-1:0] h2;
  logic [W-1:0]   h1;
  logic [W/4-1:0] h4;
  logic [7:0]     h16;
  int checks = 0, failures = 0;
  logic clk = 0;
  int cycles = 0;

  assign g = a & b;
  assign t = a | b;

  ling_sparse_tree                                 dut  (.g(g), .t(t), .h(h2));
  ling_sparse_tree #(.WIDTH(64), .SPARSENESS(1))   dut1 (.g(g), .t(t), .h(h1));
  ling_sparse_tree #(.WIDTH(64), .SPARSENESS(4))   dut4 (.g(g), .t(t), .h(h4));
  ling_sparse_tree #(.WIDTH(16), .SPARSENESS(2))   dut16(.g(g[15:0]), .t(t[15:0]), .h(h16));

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

  task automatic check_one(input string name, input int pos, input logic got,
                           input logic [W-1:0] ref_h, input logic ref_c);
    checks++;
    if (got !== ref_h[pos] || (t[pos] & got) !== ref_c) begin
      failures++;
      if (failures < 10)
        $display("%s H%0d a=%h b=%h got=%b ref=%b carry=%b", name, pos, a, b, got, ref_h[pos], ref_c);
    end
  endtask

  task automatic check_vec(input logic [W-1:0] va, input logic [W-1:0] vb);
    logic [W-1:0] ref_h, ref_h16;
    logic [W:0]   c;   // c[i+1]: carry out of bit i
    a = va; b = vb;
    #1;
    ref_h[0] = va[0] & vb[0];
    for (int i = 1; i < W; i++)
      ref_h[i] = (va[i] & vb[i]) | ((va[i-1] | vb[i-1]) & ref_h[i-1]);
    ref_h16 = ref_h;  // the low 16 bits need no carry from above
    for (int i = 0; i < W; i++) begin
      logic [W:0] s;
      logic [W-1:0] mask;
      mask = (i == W - 1) ? '1 : ((64'd1 << (i + 1)) - 1);
      s = {1'b0, va & mask} + {1'b0, vb & mask};
      c[i+1] = s[i+1];
    end
    for (int k = 0; k < W / 2; k++) check_one("S2", 2 * k + 1, h2[k], ref_h, c[2*k+2]);
    for (int k = 0; k < W;     k++) check_one("S1", k, h1[k], ref_h, c[k+1]);
    for (int k = 0; k < W / 4; k++) check_one("S4", 4 * k + 3, h4[k], ref_h, c[4*k+4]);
    for (int k = 0; k < 8;     k++) check_one("W16", 2 * k + 1, h16[k], ref_h16, c[2*k+2]);
  endtask

  initial begin
    check_vec('0, '0);
    check_vec('1, 64'd1);
    check_vec(64'h7FFF_FFFF_FFFF_FFFF, 64'd1);
    check_vec(64'hFFFF_FFFF_FFFF_FFFE, 64'd1);
    check_vec(64'h5555_5555_5555_5555, 64'hAAAA_AAAA_AAAA_AAAB);
    for (int p = 0; p < W; p++) check_vec(~(64'd1 << p), 64'd1 << (p / 2));
    for (int n = 0; n < 300; n++) begin
      logic [W-1:0] ra;
      ra = {$urandom, $urandom};
      check_vec(ra, {$urandom, $urandom});
      check_vec(ra, ~ra ^ (64'd1 << ($urandom % 64)));  // long transmit chains
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
