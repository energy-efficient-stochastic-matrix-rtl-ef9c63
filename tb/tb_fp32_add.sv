// tb_fp32_add: checks the single-precision adder against a double-precision
// reference rounded back to fp32: random additions and subtractions with
// close exponents (cancellation), far exponents (sticky bits), signed zeros,
// exact cancellation, overflow and special values.
module tb_fp32_add;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp32_add dut (.a, .b, .y);

  task automatic check(input logic [31:0] exp_y, input string what);
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL %s: %h + %h = %h, expected %h", what, a, b, y, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 32'h3F80_0000; b = 32'h4000_0000; check(32'h4040_0000, "1+2");
    a = 32'h4040_0000; b = 32'hC080_0000; check(32'hBF80_0000, "3-4");
    a = 32'h40A0_0000; b = 32'hC0A0_0000; check(32'h0000_0000, "5-5");
    a = 32'h8000_0000; b = 32'h8000_0000; check(32'h8000_0000, "-0+-0");
    a = 32'h0000_0000; b = 32'h8000_0000; check(32'h0000_0000, "0+-0");
    a = 32'h0000_0000; b = 32'hC0E0_0000; check(32'hC0E0_0000, "0+-7");
    a = 32'h4B80_0000; b = 32'h3F80_0000; check(32'h4B80_0000, "2^24+1 tie to even");
    a = 32'h4B80_0000; b = 32'h4040_0000; check(32'h4B80_0002, "2^24+3 tie to even up");
    a = 32'h7F7F_FFFF; b = 32'h7F7F_FFFF; check(32'h7F80_0000, "overflow");
    a = 32'h7F80_0000; b = 32'hFF80_0000; check(32'h7FC0_0000, "inf-inf");
    a = 32'h7F80_0000; b = 32'h4000_0000; check(32'h7F80_0000, "inf+2");
    a = 32'h0080_0001; b = 32'h8080_0000; check(32'h0000_0000, "underflow to zero");
    repeat (3000) begin
      a = rand_fp(100, 120);
      b = rand_fp(100, 120);
      check(ref_add(a, b), "random");
    end
    repeat (3000) begin
      a = rand_fp(110, 112);
      b = rand_fp(110, 112);
      b[31] = ~a[31];
      check(ref_add(a, b), "cancel");
    end
    repeat (1000) begin   // beyond the alignment range: result is a or a+-ulp
      a = rand_fp(140, 150);
      b = rand_fp(100, 108);
      check(from_real(to_real(a) + to_real(b)), "far");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
