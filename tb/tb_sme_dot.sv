// tb_sme_dot: runs R += diag(W V^T) on random W with +-1 V, first with the
// "first" flag (R taken as 0) and then accumulating; compares each R[i]
// with a reference that sums the lane products in the same balanced tree
// order, and checks one row per clock and the done pulse.
module tb_sme_dot;
  import sme_pkg::*;
  import fp_ref_pkg::*;
  localparam int NB = 8, AW = 5, NMAX = 1 << AW;

  logic clk = 0, rst_n = 0, start = 0, first = 0;
  logic [AW:0] n_rows = 0;
  logic [AW-1:0] rd_addr, wr_addr;
  fp32_t w_row [NB], v_row [NB];
  fp32_t r_old, r_new;
  logic wr_en, done, busy;
  fp32_t wm [NMAX][NB], vm [NMAX][NB], rm [NMAX], r0 [NMAX];
  int checks = 0, failures = 0;

  sme_dot #(.NB(NB), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    for (int b = 0; b < NB; b++) begin
      w_row[b] <= wm[rd_addr][b];
      v_row[b] <= vm[rd_addr][b];
    end
    r_old <= rm[rd_addr];
    if (wr_en) rm[wr_addr] <= r_new;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp32_t tree_sum(input fp32_t p [NB]);
    fp32_t t [NB];
    int n = NB;
    t = p;
    while (n > 1) begin
      for (int k = 0; k < n / 2; k++) t[k] = ref_add(t[2*k], t[2*k+1]);
      n = n / 2;
    end
    return t[0];
  endfunction

  task automatic run(input int n, input bit fst);
    int cyc, nwr;
    fp32_t p [NB];
    for (int i = 0; i < NMAX; i++) begin
      for (int b = 0; b < NB; b++) begin
        wm[i][b] = rand_fp(118, 132);
        vm[i][b] = $urandom_range(0, 1) ? 32'hBF80_0000 : 32'h3F80_0000;
      end
      r0[i] = rm[i];
    end
    @(negedge clk);
    n_rows = (AW+1)'(n); first = fst; start = 1;
    @(negedge clk); start = 0;
    cyc = 1; nwr = 0;
    while (!done && cyc < 1000) begin
      @(posedge clk); #1; cyc++;
      if (wr_en) nwr++;
    end
    checks += 2;
    if (nwr != n) begin failures++; $display("FAIL %0d writes", nwr); end
    if (cyc != n + 2) begin failures++; $display("FAIL done at %0d", cyc); end
    @(posedge clk); #1;
    for (int i = 0; i < n; i++) begin
      for (int b = 0; b < NB; b++) p[b] = ref_mul(wm[i][b], vm[i][b]);
      checks++;
      if (rm[i] !== ref_add(fst ? 32'h0 : r0[i], tree_sum(p))) begin
        failures++; $display("FAIL R[%0d] = %h", i, rm[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < NMAX; i++) rm[i] = 32'h4120_0000;  // stale contents
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(NMAX, 1'b1);
    run(NMAX, 1'b0);
    run(9, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
