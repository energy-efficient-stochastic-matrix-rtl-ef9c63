// tb_sme_capacity: runs the estimator at its default sizes on a random graph
// that fills the whole on-chip storage: N_MAX = 1024 nodes and NNZ_MAX =
// 16384 non-zeros (16 per node, random columns, values in +-[1/64, 1/32)).
// One block of 8 test vectors with a Chebyshev order of 4 is computed and
// every R[i] is compared with the reference model, which repeats the whole
// computation with the same rounding and ordering as the hardware.
module tb_sme_capacity;
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
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
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
      if (host_rdata !== Rm[i] && failures < 10) $display("FAIL R[%0d]", i);
      if (host_rdata !== Rm[i]) begin
        failures++;
        $display("FAIL R[%0d] = %h (%f), expected %h (%f)", i, host_rdata, to_real(host_rdata),
                 Rm[i], to_real(Rm[i]));
      end
    end
  endtask

  initial begin
    localparam int NNZ_MAX = 16384, DEG = NNZ_MAX / N_MAX;
    repeat (3) @(posedge clk);
    rst_n = 1;
    col = new[NNZ_MAX]; val = new[NNZ_MAX];
    for (int i = 0; i <= N_MAX; i++) begin
      rp[i] = i * DEG;
      host_write(HSEL_ROWPTR, i, 64'(rp[i]));
    end
    for (int j = 0; j < NNZ_MAX; j++) begin
      col[j] = $urandom_range(0, N_MAX - 1);
      val[j] = rand_fp(121, 121);
      if ($urandom_range(0, 1) == 1) val[j][31] = 1'b1;
      host_write(HSEL_CSR, j, {val[j], 32'(col[j])});
    end
    for (int m = 0; m <= 4; m++) begin
      coefs[m] = from_real(1.0 / (m + 1));
      host_write(HSEL_COEF, m, 64'(coefs[m]));
    end
    run_and_check(N_MAX, 4, 1, 64'hFEED_FACE_CAFE_BEEF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
