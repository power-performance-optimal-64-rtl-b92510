// End-to-end testbench of ling_adder64 at its default parameters (64 bits,
// sparseness 2).
// A new operand pair is presented every cycle, sometimes with in_valid low.
// After each rising edge {cout, sum} is compared with the 65-bit integer
// sum of the operands presented before that edge, out_valid must follow
// in_valid with one cycle of latency, and the result must hold while
// in_valid is low. Directed vectors cover the worst carry chains; the rest
// are random, partly with long transmit runs.
// Mechanism counters (each must occur at least once):
//   sel_even  an even bit chooses its S1 sum (H(i-1) = 1)
//   sel_odd   an odd bit chooses its S1 sum (H(i-2) = 1)
//   long_carry a carry generated below bit 16 reaches bit 63 (needs the
//             third, 64-bit-span tree level)
//   carry_out the adder overflows (cout = 1)
//   hold      in_valid low keeps the previous result
module tb_ling_adder64;
  localparam int unsigned W = 64;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         in_valid;
  logic [W-1:0] a, b;
  logic         out_valid;
  logic [W-1:0] sum;
  logic         cout;

  int checks = 0, failures = 0, cycles = 0;
  int n_sel_even = 0, n_sel_odd = 0, n_long = 0, n_cout = 0, n_hold = 0;

  ling_adder64 dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
    .out_valid(out_valid), .sum(sum), .cout(cout)
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles++;
    if (cycles > 20000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // Count which mechanisms an operand pair exercises (reference model only).
  // The carry into bit i is c(i) = bit i of (a+b)^a^b, and the Ling carry
  // is H(i) = g(i) + c(i).
  localparam logic [W-1:0] SEL_MASK = 64'h2AAA_AAAA_AAAA_AAAA;  // H1, H3, ..., H61
  function automatic void count_mechanisms(input logic [W-1:0] va, input logic [W-1:0] vb);
    logic [W:0]   full;
    logic [W-1:0] c, hh, t;
    full = {1'b0, va} + {1'b0, vb};
    c    = full[W-1:0] ^ va ^ vb;
    t    = va | vb;
    hh   = (va & vb) | c;
    // H(i-1) steers even bit i and H(i-2) odd bit i+1: the same carries
    n_sel_even += $countones(hh & SEL_MASK);
    n_sel_odd  += $countones(hh & SEL_MASK);
    // a carry into bit 16 carried on by every transmit from bit 16 to 62
    if (c[16] && (&t[62:16])) n_long++;
    if (full[W]) n_cout++;
  endfunction

  localparam logic [W-1:0] DIR_A [8] = '{
    64'h0, 64'hFFFF_FFFF_FFFF_FFFF, 64'h7FFF_FFFF_FFFF_FFFF, 64'h1234,
    64'hFFFF_FFFF_FFFF_FFFF, 64'h5555_5555_5555_5555, 64'h5555_5555_5555_5555,
    64'h8000_0000_0000_0000};
  localparam logic [W-1:0] DIR_B [8] = '{
    64'h0, 64'h1, 64'h1, 64'h5678,
    64'hFFFF_FFFF_FFFF_FFFF, 64'hAAAA_AAAA_AAAA_AAAA, 64'hAAAA_AAAA_AAAA_AAAB,
    64'h8000_0000_0000_0000};

  logic [W:0] expected;
  logic       exp_valid;

  task automatic step(input logic v, input logic [W-1:0] va, input logic [W-1:0] vb);
    logic [W:0] prev;
    @(negedge clk);
    in_valid = v; a = va; b = vb;
    if (v) count_mechanisms(va, vb);
    prev = expected;
    if (v) expected = {1'b0, va} + {1'b0, vb};
    @(posedge clk);
    #1;
    checks++;
    if (out_valid !== v) begin
      failures++;
      $display("out_valid=%b expected %b", out_valid, v);
    end
    if (exp_valid || v) begin
      checks++;
      if ({cout, sum} !== expected) begin
        failures++;
        if (failures < 10) $display("a=%h b=%h got %b_%h expected %b_%h", va, vb, cout, sum, expected[W], expected[W-1:0]);
      end
      if (!v && {cout, sum} === prev) n_hold++;
    end
    if (v) exp_valid = 1'b1;
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; a = '0; b = '0;
    expected = '0; exp_valid = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (out_valid !== 1'b0 || sum !== '0 || cout !== 1'b0) begin
      failures++;
      $display("reset state wrong");
    end
    rst_n = 1'b1;

    // directed vectors first, then random ones
    for (int n = 0; n < 8 + W + 3000; n++) begin
      logic         v;
      logic [W-1:0] va, vb;
      v  = 1'b1;
      va = {$urandom, $urandom};
      vb = {$urandom, $urandom};
      if (n < 8) begin
        va = DIR_A[n];
        vb = DIR_B[n];
        v  = (n != 3);
      end else if (n < 8 + W) begin
        va = ~(64'd1 << (n - 8));   // carry chain ending at bit n-8
        vb = 64'd1;
      end else begin
        if (n % 3 == 1) vb = ~va ^ (64'd1 << ($urandom % 64));  // long transmit runs
        v = ($urandom % 8) != 0;
      end
      step(v, va, vb);
    end

    $display("mechanisms: sel_even=%0d sel_odd=%0d long_carry=%0d carry_out=%0d hold=%0d",
             n_sel_even, n_sel_odd, n_long, n_cout, n_hold);
    checks++; if (n_sel_even == 0) begin failures++; $display("sel_even never happened"); end
    checks++; if (n_sel_odd  == 0) begin failures++; $display("sel_odd never happened"); end
    checks++; if (n_long     == 0) begin failures++; $display("long_carry never happened"); end
    checks++; if (n_cout     == 0) begin failures++; $display("carry_out never happened"); end
    checks++; if (n_hold     == 0) begin failures++; $display("hold never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
