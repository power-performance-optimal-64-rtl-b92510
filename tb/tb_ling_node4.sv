// Self-checking testbench of ling_node4, the radix-4 Ling prefix node.
// Applies all 256 combinations of the four input groups and compares with
// a group merge done one group at a time, from the top group downwards:
// a group's pseudo carry counts if every group above it transmits.
module tb_ling_node4;
  import ling_pkg::*;

  ling_grp_t [3:0] grp_in;
  ling_grp_t       grp_out;
  int checks = 0, failures = 0;
  logic clk = 0;
  int cycles = 0;

  ling_node4 dut (.grp_in(grp_in), .grp_out(grp_out));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 10000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      logic exp_h, pass;
      grp_in = v[7:0];
      #1;
      exp_h = 1'b0;
      pass  = 1'b1;
      for (int m = 3; m >= 0; m--) begin
        if (pass && grp_in[m].h) exp_h = 1'b1;
        pass = pass & grp_in[m].i;
      end
      checks++;
      if (grp_out.h !== exp_h || grp_out.i !== pass) begin
        failures++;
        $display("in=%b out h=%b i=%b expected h=%b i=%b", v[7:0], grp_out.h, grp_out.i, exp_h, pass);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
