// tb_sme_rng: loads a seed, runs passes of the Rademacher generator and
// compares every written row (V = +-1, W = +-c0) with an xorshift64*
// reference; checks one row per clock, the done pulse, that the state
// carries over between passes and the zero-seed substitute.
module tb_sme_rng;
  import sme_pkg::*;
  import fp_ref_pkg::*;
  localparam int NB = 8, AW = 6;

  logic clk = 0, rst_n = 0, seed_load = 0, start = 0;
  logic [63:0] seed = 0;
  logic [AW:0] n_rows = 0;
  fp32_t c0 = 0;
  logic wr_en, done, busy;
  logic [AW-1:0] wr_addr;
  fp32_t v_row [NB], w_row [NB];
  int checks = 0, failures = 0;
  logic [63:0] ref_x;

  sme_rng #(.NB(NB), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_pass(input int rows, input fp32_t c);
    logic [63:0] rs;
    int first_cyc, cyc, nwr;
    bit saw_done;
    @(negedge clk);
    n_rows = (AW+1)'(rows); c0 = c; start = 1;
    @(negedge clk); start = 0;
    cyc = 0; nwr = 0; first_cyc = -1; saw_done = 0;
    while (!saw_done && cyc < 200) begin
      @(posedge clk); #1; cyc++;
      if (wr_en) begin
        if (first_cyc < 0) first_cyc = cyc;
        ref_x = xs_step(ref_x);
        rs = ref_x * XS_K;
        checks++;
        if (wr_addr != AW'(nwr) || cyc != first_cyc + nwr) begin
          failures++; $display("FAIL row order/rate: addr %0d cyc %0d", wr_addr, cyc);
        end
        for (int b = 0; b < NB; b++) begin
          checks += 2;
          if (v_row[b] !== (rs[b] ? 32'hBF80_0000 : 32'h3F80_0000)) begin
            failures++; $display("FAIL v row %0d lane %0d: %h", nwr, b, v_row[b]);
          end
          if (w_row[b] !== {c[31] ^ rs[b], c[30:0]}) begin
            failures++; $display("FAIL w row %0d lane %0d: %h", nwr, b, w_row[b]);
          end
        end
        nwr++;
      end
      if (done) begin
        saw_done = 1;
        checks++;
        if (!wr_en) begin failures++; $display("FAIL done not with last row"); end
      end
    end
    checks++;
    if (nwr != rows) begin failures++; $display("FAIL wrote %0d rows, expected %0d", nwr, rows); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); seed = 64'h0123_4567_89AB_CDEF; seed_load = 1;
    @(negedge clk); seed_load = 0;
    ref_x = 64'h0123_4567_89AB_CDEF;
    run_pass(5, 32'h3F00_0000);      // c0 = 0.5
    run_pass(17, 32'hC040_0000);     // c0 = -3, state carries over
    @(negedge clk); seed = 0; seed_load = 1;
    @(negedge clk); seed_load = 0;
    ref_x = 64'hDECA_FBAD;
    run_pass(3, 32'h3F80_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
