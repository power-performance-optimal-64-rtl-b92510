// Self-checking testbench of ling_pg, the bit generate/transmit stage.
// Drives directed and random 64-bit operands and checks g, t and the half
// sum bit by bit against the truth table of a one-bit addition.
module tb_ling_pg;
  localparam int unsigned W = 64;

  logic [W-1:0] a, b, g, t, d;
  int checks = 0, failures = 0;
  logic clk = 0;
  int cycles = 0;

  ling_pg #(.WIDTH(W)) dut (.a(a), .b(b), .g(g), .t(t), .d(d));

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

  task automatic check_vec(input logic [W-1:0] va, input logic [W-1:0] vb);
    a = va; b = vb;
    #1;
    for (int i = 0; i < W; i++) begin
      // one-bit sum of a(i)+b(i): {carry, sum}
      logic [1:0] s2;
      s2 = {1'b0, va[i]} + {1'b0, vb[i]};
      checks++;
      if (g[i] !== s2[1] || d[i] !== s2[0] || t[i] !== (s2 != 2'd0)) begin
        failures++;
        if (failures < 10) $display("bit %0d a=%b b=%b: g=%b t=%b d=%b", i, va[i], vb[i], g[i], t[i], d[i]);
      end
    end
  endtask

  initial begin
    check_vec('0, '0);
    check_vec('1, '0);
    check_vec('0, '1);
    check_vec('1, '1);
    check_vec(64'hAAAA_AAAA_AAAA_AAAA, 64'h5555_5555_CCCC_3333);
    for (int n = 0; n < 200; n++) check_vec({$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
