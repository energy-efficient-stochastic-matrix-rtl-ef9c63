// tb_sme_axpy: runs W = c*X + W over random blocks with memory models of one
// cycle read latency; compares every lane with a rounded multiply-then-add
// reference, checks that every row is written exactly once, in order, one
// per clock, and the position of the done pulse.
module tb_sme_axpy;
  import sme_pkg::*;
  import fp_ref_pkg::*;
  localparam int NB = 4, AW = 5, NMAX = 1 << AW;

  logic clk = 0, rst_n = 0, start = 0;
  logic [AW:0] n_rows = 0;
  fp32_t c = 0;
  logic [AW-1:0] rd_addr, wr_addr;
  fp32_t x_row [NB], y_row [NB], w_row [NB];
  logic wr_en, done, busy;
  fp32_t xm [NMAX][NB], wm [NMAX][NB], w0 [NMAX][NB];
  int checks = 0, failures = 0;

  sme_axpy #(.NB(NB), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    for (int b = 0; b < NB; b++) begin
      x_row[b] <= xm[rd_addr][b];
      y_row[b] <= wm[rd_addr][b];
    end
    if (wr_en) for (int b = 0; b < NB; b++) wm[wr_addr][b] <= w_row[b];
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int n, input fp32_t cc);
    int cyc, nwr, last_wr;
    for (int i = 0; i < NMAX; i++)
      for (int b = 0; b < NB; b++) begin
        xm[i][b] = rand_fp(118, 132);
        wm[i][b] = rand_fp(118, 132);
        w0[i][b] = wm[i][b];
      end
    @(negedge clk);
    n_rows = (AW+1)'(n); c = cc; start = 1;
    @(negedge clk); start = 0;
    cyc = 1; nwr = 0; last_wr = -1;
    while (!done && cyc < 1000) begin
      @(posedge clk); #1; cyc++;
      if (wr_en) begin
        checks++;
        if (wr_addr != AW'(nwr)) begin failures++; $display("FAIL write order %0d", wr_addr); end
        nwr++; last_wr = cyc;
      end
    end
    checks += 3;
    if (nwr != n) begin failures++; $display("FAIL %0d writes for %0d rows", nwr, n); end
    if (last_wr != n + 1) begin failures++; $display("FAIL last write at %0d", last_wr); end
    if (cyc != n + 2) begin failures++; $display("FAIL done at %0d", cyc); end
    @(posedge clk); #1;
    for (int i = 0; i < NMAX; i++)
      for (int b = 0; b < NB; b++) begin
        checks++;
        if (wm[i][b] !== ((i < n) ? ref_add(ref_mul(cc, xm[i][b]), w0[i][b]) : w0[i][b])) begin
          failures++; $display("FAIL row %0d lane %0d: %h", i, b, wm[i][b]);
        end
      end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(1, 32'h3F00_0000);
    run(17, 32'hBE4C_CCCD);
    run(NMAX, rand_fp(120, 128));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
