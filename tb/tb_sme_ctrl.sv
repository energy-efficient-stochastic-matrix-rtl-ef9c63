// tb_sme_ctrl: drives the sequencer with stand-in kernels that answer each
// start pulse with a done pulse after a random delay. Every kernel launch is
// recorded (kernel, SPMM mode, coefficient, bank selects, first flag) and
// compared with the expected loop nest: per block RNG, SPMM plain, AXPY c[1],
// then (SPMM Chebyshev, AXPY c[m], swap) for m = 2..nc, then DOT. Runs
// several (nc, n_blocks) settings including nc = 1 (no Chebyshev loop).
module tb_sme_ctrl;
  import sme_pkg::*;
  localparam int NC_MAX = 15, BW = 8, CW = 4;

  logic clk = 0, rst_n = 0, start = 0;
  logic coef_we = 0;
  logic [CW-1:0] coef_addr = 0, nc = 0;
  fp32_t coef_wdata = 0;
  logic [BW-1:0] n_blocks = 0;
  logic busy, done;
  kernel_e kernel;
  logic rng_start, spmm_start, axpy_start, dot_start, dot_first;
  logic rng_done = 0, spmm_done = 0, axpy_done = 0, dot_done = 0;
  spmm_mode_e spmm_mode;
  fp32_t coef;
  bank_e m0_bank, m1_bank, x_bank, z_bank, y_bank;
  logic [BW-1:0] block_idx;
  logic [CW-1:0] cheb_idx;
  int checks = 0, failures = 0;
  int pending = -1;           // cycles until done, -1 = none
  kernel_e pend_k;
  int swaps = 0;

  sme_ctrl #(.NC_MAX(NC_MAX), .BW(BW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stand-in kernels
  always @(posedge clk) begin
    rng_done <= 0; spmm_done <= 0; axpy_done <= 0; dot_done <= 0;
    if (!rst_n) pending = -1;
    else if (rng_start || spmm_start || axpy_start || dot_start) begin
      pending = $urandom_range(1, 6);
      pend_k = rng_start ? K_RNG : spmm_start ? K_SPMM : axpy_start ? K_AXPY : K_DOT;
    end else if (pending > 0) pending--;
    else if (pending == 0) begin
      pending = -1;
      case (pend_k)
        K_RNG:  rng_done  <= 1;
        K_SPMM: spmm_done <= 1;
        K_AXPY: axpy_done <= 1;
        default: dot_done <= 1;
      endcase
    end
  end

  function automatic fp32_t cval(input int m);
    return fp32_t'(32'h4000_0000 + m * 32'h1000);
  endfunction

  // expected launch: compare at a start pulse
  task automatic expect_launch(input kernel_e k, input spmm_mode_e md, input fp32_t cf,
                               input bank_e xb, input bank_e zb, input bank_e yb,
                               input bank_e m0b, input bit fst, input bit chk_banks);
    int guard = 0;
    while (!(rng_start || spmm_start || axpy_start || dot_start) && guard < 100) begin
      @(posedge clk); #1; guard++;
    end
    checks++;
    if (kernel != k) begin failures++; $display("FAIL kernel %s expected %s", kernel.name(), k.name()); return; end
    if ((k == K_RNG && !rng_start) || (k == K_SPMM && !spmm_start) ||
        (k == K_AXPY && !axpy_start) || (k == K_DOT && !dot_start)) begin
      failures++; $display("FAIL wrong start pulse for %s", k.name());
    end
    if (k == K_SPMM) begin checks++; if (spmm_mode != md) begin failures++; $display("FAIL spmm mode"); end end
    if (k == K_RNG || k == K_AXPY) begin checks++; if (coef != cf) begin failures++; $display("FAIL coef %h expected %h", coef, cf); end end
    if (k == K_DOT) begin checks++; if (dot_first != fst) begin failures++; $display("FAIL dot_first"); end end
    if (k == K_RNG) begin checks++; if (m0_bank != m0b) begin failures++; $display("FAIL rng m0 bank"); end end
    if (chk_banks) begin
      checks++;
      if (x_bank != xb || (k != K_DOT && y_bank != yb) || z_bank != zb) begin
        failures++; $display("FAIL banks x=%0d z=%0d y=%0d expected %0d %0d %0d", x_bank, z_bank, y_bank, xb, zb, yb);
      end
    end
    @(posedge clk); #1;
  endtask

  task automatic run(input int ncv, input int nbl);
    bank_e m0, m1, tmp;
    @(negedge clk); nc = CW'(ncv); n_blocks = BW'(nbl); start = 1;
    @(negedge clk); start = 0;
    for (int blk = 0; blk < nbl; blk++) begin
      m0 = BANK_MA; m1 = BANK_MB;
      expect_launch(K_RNG, SPMM_PLAIN, cval(0), BANK_V, BANK_V, BANK_V, m0, 0, 0);
      expect_launch(K_SPMM, SPMM_PLAIN, 0, BANK_V, m0, m1, m0, 0, 1);
      expect_launch(K_AXPY, SPMM_PLAIN, cval(1), m1, BANK_W, BANK_W, m0, 0, 1);
      for (int m = 2; m <= ncv; m++) begin
        expect_launch(K_SPMM, SPMM_CHEB, 0, m1, m0, m0, m0, 0, 1);
        expect_launch(K_AXPY, SPMM_PLAIN, cval(m), m0, BANK_W, BANK_W, m0, 0, 1);
        tmp = m0; m0 = m1; m1 = tmp;
        swaps++;
      end
      expect_launch(K_DOT, SPMM_PLAIN, 0, BANK_W, BANK_V, BANK_W, m0, blk == 0, 1);
    end
    begin
      int guard = 0;
      while (!done && guard < 100) begin @(posedge clk); #1; guard++; end
      checks++;
      if (!done) begin failures++; $display("FAIL no done"); end
      @(posedge clk); #1;
      checks++;
      if (busy) begin failures++; $display("FAIL busy after done"); end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m <= NC_MAX; m++) begin
      @(negedge clk); coef_we = 1; coef_addr = CW'(m); coef_wdata = cval(m);
    end
    @(negedge clk); coef_we = 0;
    run(1, 1);
    run(4, 2);
    run(5, 3);
    run(NC_MAX, 1);
    checks++;
    if (swaps == 0) begin failures++; $display("FAIL no swap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
