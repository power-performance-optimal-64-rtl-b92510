// Self-checking testbench of ling_sum_select.
// Random candidate sums and carries: each sum bit must equal S1 when the
// carry of its column pair is set and S0 otherwise (the two lowest bits
// always S0), and the carry out must be t(63) & H(63). Every carry is
// toggled alone at least once, so a multiplexer wired to the wrong carry
// is caught.
module tb_ling_sum_select;
  localparam int unsigned W = 64;

  logic [W-1:0]   s0, s1, sum;
  logic [W/2-1:0] h;
  logic           t_msb, cout;
  int checks = 0, failures = 0;
  logic clk = 0;
  int cycles = 0;

  ling_sum_select dut (.s0(s0), .s1(s1), .h(h), .t_msb(t_msb), .sum(sum), .cout(cout));

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

  task automatic check_vec(input logic [W-1:0] v0, input logic [W-1:0] v1,
                           input logic [W/2-1:0] vh, input logic vt);
    logic [W-1:0] exp_sum;
    s0 = v0; s1 = v1; h = vh; t_msb = vt;
    #1;
    // H1 steers bits 2 and 3, H3 bits 4 and 5, ..., H61 bits 62 and 63
    exp_sum[1:0] = v0[1:0];
    for (int p = 1; p < W / 2; p++) begin
      exp_sum[2*p]   = vh[p-1] ? v1[2*p]   : v0[2*p];
      exp_sum[2*p+1] = vh[p-1] ? v1[2*p+1] : v0[2*p+1];
    end
    checks++;
    if (sum !== exp_sum || cout !== (vt & vh[W/2-1])) begin
      failures++;
      if (failures < 10) $display("h=%h sum=%h exp=%h cout=%b", vh, sum, exp_sum, cout);
    end
  endtask

  initial begin
    for (int k = 0; k < W / 2; k++) begin
      check_vec('0, '1, 32'd1 << k, 1'b1);
      check_vec('1, '0, 32'd1 << k, 1'b0);
    end
    for (int n = 0; n < 500; n++)
      check_vec({$urandom, $urandom}, {$urandom, $urandom}, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
