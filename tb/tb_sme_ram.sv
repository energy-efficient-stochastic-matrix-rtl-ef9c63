// tb_sme_ram: random writes and two-port reads against a model array;
// checks the one-cycle registered read latency and that a read of the word
// being written returns the old contents.
module tb_sme_ram;
  localparam int W = 40, D = 48, AW = $clog2(D);
  logic clk = 0, we;
  logic [AW-1:0] wa, ra, rb;
  logic [W-1:0]  wd, qa, qb;
  logic [W-1:0]  model [D];
  logic [W-1:0]  exp_a, exp_b;
  int checks = 0, failures = 0;

  sme_ram #(.WIDTH(W), .DEPTH(D)) dut (.clk, .we, .wa, .wd, .ra, .qa, .rb, .qb);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wa = 0; wd = 0; ra = 0; rb = 0;
    // fill
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      we = 1; wa = AW'(i); wd = {$urandom, $urandom};
      model[i] = wd;
    end
    @(negedge clk); we = 0;
    repeat (1000) begin
      @(negedge clk);
      we = $urandom_range(0, 1);
      wa = AW'($urandom_range(0, D - 1));
      wd = {$urandom, $urandom};
      ra = ($urandom_range(0, 3) == 0) ? wa : AW'($urandom_range(0, D - 1));
      rb = AW'($urandom_range(0, D - 1));
      exp_a = model[ra];
      exp_b = model[rb];
      @(posedge clk);
      if (we) model[wa] = wd;
      #1;
      checks += 2;
      if (qa !== exp_a) begin failures++; $display("FAIL qa addr %0d: %h vs %h", ra, qa, exp_a); end
      if (qb !== exp_b) begin failures++; $display("FAIL qb addr %0d: %h vs %h", rb, qb, exp_b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
