// tb_fp32_mul: checks the single-precision multiplier against a double-
// precision reference rounded back to fp32: random operands, exact small
// integers, signed zeros, overflow, underflow, infinities and NaN.
module tb_fp32_mul;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp32_mul dut (.a, .b, .y);

  task automatic check(input logic [31:0] exp_y, input string what);
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL %s: %h * %h = %h, expected %h", what, a, b, y, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // exact integer products
    a = 32'h40C0_0000; b = 32'h4100_0000; check(32'h4240_0000, "6*8");
    a = 32'hBF80_0000; b = 32'h40E0_0000; check(32'hC0E0_0000, "-1*7");
    a = 32'h4000_0000; b = 32'hC0A0_0000; check(32'hC120_0000, "2*-5");
    // zeros
    a = 32'h0000_0000; b = 32'hC0A0_0000; check(32'h8000_0000, "0*-5");
    a = 32'h0000_0001; b = 32'h3F80_0000; check(32'h0000_0000, "subnormal*1");
    // overflow / underflow
    a = 32'h7F00_0000; b = 32'h4100_0000; check(32'h7F80_0000, "overflow");
    a = 32'h0080_0000; b = 32'h3E80_0000; check(32'h0000_0000, "underflow");
    // specials
    a = 32'h7F80_0000; b = 32'hC000_0000; check(32'hFF80_0000, "inf*-2");
    a = 32'h7F80_0000; b = 32'h0000_0000; check(32'h7FC0_0000, "inf*0");
    a = 32'h7FC0_0001; b = 32'h3F80_0000; check(32'h7FC0_0000, "nan*1");
    // ties: (1+2^-23)*(1+2^-1) has bits beyond 24 -> check against reference
    repeat (4000) begin
      a = rand_fp(64, 190);
      b = rand_fp(64, 190);
      check(ref_mul(a, b), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
