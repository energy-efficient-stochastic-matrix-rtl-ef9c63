// tb_sme_spmm: runs the CSR sparse-times-dense kernel on the 8-node, 22
// non-zero example matrix and on a random matrix with empty rows, in plain
// (Y = A*X) and Chebyshev (Y = 2*A*X - Z) mode. The memories are modelled
// here with one cycle of read latency. Every result lane is compared with a
// reference that performs the same rounded multiplies and adds in the same
// order; the run time is checked against 5 cycles per row plus 3 per
// non-zero.
module tb_sme_spmm;
  import sme_pkg::*;
  import fp_ref_pkg::*;
  localparam int NB = 4, AW = 5, EW = 8, NMAX = 1 << AW, EMAX = 1 << EW;

  logic clk = 0, rst_n = 0, start = 0;
  spmm_mode_e mode = SPMM_PLAIN;
  logic [AW:0] n_rows = 0;
  logic [AW-1:0] rp_addr, x_addr, z_addr, wr_addr;
  logic [EW-1:0] csr_addr;
  logic [EW:0]   rp_lo, rp_hi;
  logic [AW-1:0] csr_col;
  fp32_t csr_val;
  fp32_t x_row [NB], z_row [NB], y_row [NB];
  logic wr_en, done, busy;

  int    rp [NMAX+1];
  int    col [EMAX];
  fp32_t val [EMAX];
  fp32_t xm [NMAX][NB], zm [NMAX][NB], ym [NMAX][NB];
  int checks = 0, failures = 0;
  int empty_rows_seen = 0;

  sme_spmm #(.NB(NB), .AW(AW), .EW(EW)) dut (.*);

  always #5 clk = ~clk;

  // memory models, one cycle read latency
  always_ff @(posedge clk) begin
    rp_lo   <= (EW+1)'(rp[rp_addr]);
    rp_hi   <= (EW+1)'(rp[rp_addr + 1]);
    csr_col <= AW'(col[csr_addr]);
    csr_val <= val[csr_addr];
    for (int b = 0; b < NB; b++) begin
      x_row[b] <= xm[x_addr][b];
      z_row[b] <= zm[z_addr][b];
    end
    if (wr_en) for (int b = 0; b < NB; b++) ym[wr_addr][b] <= y_row[b];
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp32_t small_fp();   // values of moderate range
    return rand_fp(120, 130);
  endfunction

  task automatic run(input int n, input spmm_mode_e md);
    int cyc, nnz;
    fp32_t acc, e;
    for (int i = 0; i < n; i++)
      for (int b = 0; b < NB; b++) begin
        xm[i][b] = small_fp();
        zm[i][b] = small_fp();
        ym[i][b] = 32'h1234_5678;
      end
    @(negedge clk);
    n_rows = (AW+1)'(n); mode = md; start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done && cyc < 10000) begin @(posedge clk); #1; cyc++; end
    nnz = rp[n] - rp[0];
    checks++;
    if (cyc != 5 * n + 3 * nnz + 1) begin
      failures++; $display("FAIL cycles %0d, expected %0d", cyc, 5 * n + 3 * nnz + 1);
    end
    for (int i = 0; i < n; i++) begin
      if (rp[i] == rp[i+1]) empty_rows_seen++;
      for (int b = 0; b < NB; b++) begin
        acc = 32'h0000_0000;
        for (int j = rp[i]; j < rp[i+1]; j++) acc = ref_add(acc, ref_mul(val[j], xm[col[j]][b]));
        e = (md == SPMM_CHEB) ? ref_add(ref_mul(32'h4000_0000, acc), {~zm[i][b][31], zm[i][b][30:0]}) : acc;
        checks++;
        if (ym[i][b] !== e) begin
          failures++; $display("FAIL row %0d lane %0d: %h expected %h", i, b, ym[i][b], e);
        end
      end
    end
  endtask

  initial begin
    int ex_rp  [9]  = '{0, 3, 5, 8, 11, 14, 17, 20, 22};
    int ex_col [22] = '{0,2,6,1,3,2,3,7,0,4,5,1,6,7,0,1,2,1,2,4,2,5};
    int ex_val [22] = '{6,8,1,6,7,2,2,5,8,5,7,2,4,6,2,6,8,1,5,7,7,8};
    int k;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // example matrix of the CSR figure
    for (int i = 0; i < 9; i++) rp[i] = ex_rp[i];
    for (int j = 0; j < 22; j++) begin
      col[j] = ex_col[j];
      val[j] = from_real(real'(ex_val[j]));
    end
    run(8, SPMM_PLAIN);
    run(8, SPMM_CHEB);
    // random matrix, about a third of the rows empty
    k = 0;
    for (int i = 0; i < 20; i++) begin
      rp[i] = k;
      if ($urandom_range(0, 2) != 0)
        repeat ($urandom_range(1, 6)) begin
          col[k] = $urandom_range(0, 19);
          val[k] = rand_fp(124, 130);
          k++;
        end
    end
    rp[20] = k;
    run(20, SPMM_CHEB);
    run(20, SPMM_PLAIN);
    checks++;
    if (empty_rows_seen == 0) begin failures++; $display("FAIL no empty row exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
