// tb_sme_top: end-to-end test of the estimator at its default sizes.
//
// Loads the 8-node, 22 non-zero example graph in CSR form through the host
// port, writes the Chebyshev coefficients and a seed, and runs:
//   run 1: nc = 5, 2 test-vector blocks (RNG, plain and Chebyshev SPMM, AXPY,
//          pointer swaps, DOT with R cleared and then accumulated);
//   run 2: 10 nodes of which two have no edges, nc = 1 (no Chebyshev loop),
//          1 block, seed 0 (replaced inside by the generator's default).
// A reference model in this file repeats the whole computation (xorshift64*
// test vectors, rounded fp32 products and sums in the hardware's order) and
// every R[i] read back through the host port is compared with it. It also
// counts how often each mechanism happened and fails for any that never did.
module tb_sme_top;
  import sme_pkg::*;
  import fp_ref_pkg::*;

  localparam int NB = 8, N_MAX = 1024, NC_MAX = 63;
  localparam int AW = $clog2(N_MAX), CW = $clog2(NC_MAX + 1);

  logic clk = 0, rst_n = 0;
  logic host_we = 0, seed_load = 0, start = 0;
  host_sel_e host_sel = HSEL_ROWPTR;
  logic [31:0] host_addr = 0;
  logic [63:0] host_wdata = 0, seed = 0;
  logic [AW:0] n_rows = 0;
  logic [CW-1:0] nc = 0;
  logic [15:0] n_blocks = 0;
  logic busy, done;
  logic [AW-1:0] host_raddr = 0;
  fp32_t host_rdata;

  sme_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- mechanism counters
  int n_rng = 0, n_spmm_plain = 0, n_spmm_cheb = 0, n_axpy = 0;
  int n_dot_first = 0, n_dot_acc = 0, n_swap = 0, n_empty_row = 0, n_zero_seed = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.rng_start) n_rng++;
    if (dut.spmm_start && dut.spmm_mode == SPMM_PLAIN) n_spmm_plain++;
    if (dut.spmm_start && dut.spmm_mode == SPMM_CHEB) n_spmm_cheb++;
    if (dut.axpy_start) n_axpy++;
    if (dut.dot_start && dut.dot_first) n_dot_first++;
    if (dut.dot_start && !dut.dot_first) n_dot_acc++;
    if (dut.u_ctrl.state.name() == "C_AXPYC" && dut.axpy_done) n_swap++;
    if (dut.u_spmm.state.name() == "S_PTR" && dut.rp_lo == dut.rp_hi) n_empty_row++;
    if (seed_load && seed == 0) n_zero_seed++;
  end

  // ---------------------------------------------------------- graph and model
  int    rp [N_MAX + 1];
  int    col [];
  fp32_t val [];
  fp32_t coefs [NC_MAX + 1];
  fp32_t Vm [][NB], M0 [][NB], M1 [][NB], Wm [][NB], Tm [][NB];
  fp32_t Rm [];
  logic [63:0] xs;

  task automatic host_write(input host_sel_e sel, input int addr, input logic [63:0] d);
    @(negedge clk);
    host_we = 1; host_sel = sel; host_addr = addr; host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask

  function automatic fp32_t neg(input fp32_t a);
    return {~a[31], a[30:0]};
  endfunction

  // T = A * X  (rounded products and sums in CSR order)
  task automatic ref_spmv(input int n, ref fp32_t X [][NB], ref fp32_t T [][NB]);
    for (int i = 0; i < n; i++)
      for (int b = 0; b < NB; b++) begin
        fp32_t acc = 32'h0;
        for (int j = rp[i]; j < rp[i+1]; j++) acc = ref_add(acc, ref_mul(val[j], X[col[j]][b]));
        T[i][b] = acc;
      end
  endtask

  task automatic ref_run(input int n, input int ncv, input int nbl);
    fp32_t p [NB];
    Vm = new[n]; M0 = new[n]; M1 = new[n]; Wm = new[n]; Tm = new[n]; Rm = new[n];
    for (int blk = 0; blk < nbl; blk++) begin
      for (int i = 0; i < n; i++) begin
        logic [63:0] rs;
        xs = xs_step(xs);
        rs = xs * XS_K;
        for (int b = 0; b < NB; b++) begin
          Vm[i][b] = rs[b] ? from_real(-1.0) : from_real(1.0);
          M0[i][b] = Vm[i][b];
          Wm[i][b] = ref_mul(coefs[0], Vm[i][b]);
        end
      end
      ref_spmv(n, Vm, M1);
      for (int i = 0; i < n; i++)
        for (int b = 0; b < NB; b++) Wm[i][b] = ref_add(ref_mul(coefs[1], M1[i][b]), Wm[i][b]);
      for (int m = 2; m <= ncv; m++) begin
        ref_spmv(n, M1, Tm);
        for (int i = 0; i < n; i++)
          for (int b = 0; b < NB; b++) begin
            M0[i][b] = ref_add(ref_mul(from_real(2.0), Tm[i][b]), neg(M0[i][b]));
            Wm[i][b] = ref_add(ref_mul(coefs[m], M0[i][b]), Wm[i][b]);
          end
        begin
          fp32_t tmp [][NB];
          tmp = M0; M0 = M1; M1 = tmp;
        end
      end
      for (int i = 0; i < n; i++) begin
        int w;
        for (int b = 0; b < NB; b++) p[b] = ref_mul(Wm[i][b], Vm[i][b]);
        w = NB;
        while (w > 1) begin
          for (int k = 0; k < w / 2; k++) p[k] = ref_add(p[2*k], p[2*k+1]);
          w = w / 2;
        end
        Rm[i] = ref_add((blk == 0) ? 32'h0 : Rm[i], p[0]);
      end
    end
  endtask

  task automatic run_and_check(input int n, input int ncv, input int nbl, input logic [63:0] sd);
    longint t0;
    @(negedge clk); seed = sd; seed_load = 1;
    @(negedge clk); seed_load = 0;
    xs = (sd == 0) ? 64'hDECA_FBAD : sd;
    ref_run(n, ncv, nbl);
    @(negedge clk);
    n_rows = (AW+1)'(n); nc = CW'(ncv); n_blocks = 16'(nbl); start = 1;
    @(negedge clk); start = 0;
    t0 = cycles;
    while (!done) @(posedge clk);
    $display("run n=%0d nc=%0d blocks=%0d: %0d cycles", n, ncv, nbl, cycles - t0);
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL busy after done"); end
    for (int i = 0; i < n; i++) begin
      host_raddr = AW'(i);
      @(negedge clk);
      checks++;
      if (host_rdata !== Rm[i]) begin
        failures++;
        $display("FAIL R[%0d] = %h (%f), expected %h (%f)", i, host_rdata, to_real(host_rdata),
                 Rm[i], to_real(Rm[i]));
      end
    end
    for (int i = 0; i < n; i++)
      $display("  node %0d: estimate diag f(A) = %f", i, to_real(Rm[i]) / (nbl * NB));
  endtask

  task automatic count_check(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
    else $display("  %-26s %0d", what, n);
  endtask

  initial begin
    int ex_rp  [9]  = '{0, 3, 5, 8, 11, 14, 17, 20, 22};
    int ex_col [22] = '{0,2,6,1,3,2,3,7,0,4,5,1,6,7,0,1,2,1,2,4,2,5};
    int ex_val [22] = '{6,8,1,6,7,2,2,5,8,5,7,2,4,6,2,6,8,1,5,7,7,8};
    repeat (3) @(posedge clk);
    rst_n = 1;

    // graph: example matrix, scaled by 1/16 to keep the recursion in range
    col = new[22]; val = new[22];
    for (int i = 0; i < 9; i++) rp[i] = ex_rp[i];
    rp[9] = 22; rp[10] = 22;                 // nodes 8 and 9: no edges
    for (int i = 0; i <= 10; i++) host_write(HSEL_ROWPTR, i, 64'(rp[i]));
    for (int j = 0; j < 22; j++) begin
      col[j] = ex_col[j];
      val[j] = from_real(real'(ex_val[j]) / 16.0);
      host_write(HSEL_CSR, j, {val[j], 32'(col[j])});
    end
    // example coefficients c[m] = 1/m!
    for (int m = 0; m <= NC_MAX; m++) begin
      real f = 1.0;
      for (int k = 2; k <= m; k++) f = f / k;
      coefs[m] = from_real(f);
      host_write(HSEL_COEF, m, 64'(coefs[m]));
    end

    run_and_check(8, 5, 2, 64'h0123_4567_89AB_CDEF);
    run_and_check(10, 1, 1, 64'h0);

    count_check("RNG passes", n_rng);
    count_check("SPMM plain", n_spmm_plain);
    count_check("SPMM Chebyshev", n_spmm_cheb);
    count_check("AXPY", n_axpy);
    count_check("DOT clearing R", n_dot_first);
    count_check("DOT accumulating R", n_dot_acc);
    count_check("pointer swaps", n_swap);
    count_check("empty CSR rows", n_empty_row);
    count_check("zero-seed substitute", n_zero_seed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
