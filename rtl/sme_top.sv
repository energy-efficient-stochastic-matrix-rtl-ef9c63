// sme_top: stochastic matrix-function estimator (SME) accelerator.
//
// Estimates the diagonal of f(A) for the adjacency matrix A of a graph, for
// example the subgraph centralities diag(e^A), without forming f(A): it
// draws Ns random +-1 test vectors in blocks of NB, computes W = f(A) V with
// the Chebyshev recursion (sparse A times a dense block, then scaled
// additions), and accumulates R[i] += sum_b W[i][b] V[i][b]. The host divides
// R by Ns to obtain the estimate. The kernels, the CSR storage of A, the
// xorshift64* Rademacher generator and the loop nest follow the published design;
// keeping all arrays in on-chip buffers, the one-kernel-at-a-time schedule
// and the host port below are this design's own.
//
// Parts: sme_ctrl (loop nest and pointer swap), sme_rng (V, M0, W init),
// sme_spmm (CSR SPMM), sme_axpy (W += c*M), sme_dot (R += diag(W V^T)), and
// sme_ram buffers: four vector banks V, MA, MB, W of NB fp32 per node (MA/MB
// hold M0/M1 in turns), the result R, row_ptr and the {value, column} array.
//
// Host port (use while busy is low): host_we writes host_wdata at host_addr
// into row_ptr (HSEL_ROWPTR, an index into the non-zero array), the CSR
// array (HSEL_CSR: column in [31:0], fp32 value in [63:32]) or the
// coefficient file (HSEL_COEF: c[addr], fp32). seed_load loads the RNG seed.
// start runs n_blocks blocks on rows 0..n_rows-1 with coefficients c[0..nc]
// (nc >= 1); done pulses at the end. host_rdata returns R[host_raddr] one
// cycle after the address is presented.
module sme_top
  import sme_pkg::*;
#(
  parameter int unsigned NB      = 8,       // test vectors per block (Nb)
  parameter int unsigned N_MAX   = 1024,    // graph nodes
  parameter int unsigned NNZ_MAX = 16384,   // non-zeros of A
  parameter int unsigned NC_MAX  = 63,      // highest Chebyshev index
  parameter int unsigned BW      = 16,      // block counter width
  localparam int unsigned AW     = $clog2(N_MAX),
  localparam int unsigned EW     = $clog2(NNZ_MAX),
  localparam int unsigned CW     = $clog2(NC_MAX + 1),
  localparam int unsigned RPW    = $clog2(N_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // host load port
  input  logic          host_we,
  input  host_sel_e     host_sel,
  input  logic [31:0]   host_addr,
  input  logic [63:0]   host_wdata,
  input  logic          seed_load,
  input  logic [63:0]   seed,
  // run control
  input  logic          start,
  input  logic [AW:0]   n_rows,
  input  logic [CW-1:0] nc,
  input  logic [BW-1:0] n_blocks,
  output logic          busy,
  output logic          done,
  // result read port
  input  logic [AW-1:0] host_raddr,
  output fp32_t         host_rdata
);

  localparam int unsigned VW = NB * 32;

  // ------------------------------------------------------------ controller
  kernel_e       kernel;
  logic          rng_start, rng_done, spmm_start, spmm_done;
  logic          axpy_start, axpy_done, dot_start, dot_done, dot_first;
  spmm_mode_e    spmm_mode;
  fp32_t         coef;
  bank_e         m0_bank, m1_bank, x_bank, z_bank, y_bank;
  logic [BW-1:0] block_idx;
  logic [CW-1:0] cheb_idx;

  sme_ctrl #(.NC_MAX(NC_MAX), .BW(BW)) u_ctrl (
    .clk, .rst_n,
    .coef_we    (host_we && host_sel == HSEL_COEF),
    .coef_addr  (host_addr[CW-1:0]),
    .coef_wdata (host_wdata[31:0]),
    .start, .nc, .n_blocks, .busy, .done,
    .kernel, .rng_start, .rng_done, .spmm_start, .spmm_mode, .spmm_done,
    .axpy_start, .axpy_done, .dot_start, .dot_first, .dot_done,
    .coef, .m0_bank, .m1_bank, .x_bank, .z_bank, .y_bank,
    .block_idx, .cheb_idx
  );

  // ------------------------------------------------------------ CSR arrays
  logic [RPW-1:0] rp_ra, rp_rb;
  logic [EW:0]    rp_lo, rp_hi;
  logic [AW-1:0]  spmm_rp_addr;
  logic [EW-1:0]  csr_addr;
  logic [AW+31:0] csr_q, csr_q_unused;

  assign rp_ra = RPW'(spmm_rp_addr);
  assign rp_rb = RPW'(spmm_rp_addr) + 1'b1;

  sme_ram #(.WIDTH(EW + 1), .DEPTH(N_MAX + 1)) u_rowptr (
    .clk,
    .we (host_we && host_sel == HSEL_ROWPTR && !busy),
    .wa (host_addr[RPW-1:0]),
    .wd (host_wdata[EW:0]),
    .ra (rp_ra), .qa (rp_lo),
    .rb (rp_rb), .qb (rp_hi)
  );

  sme_ram #(.WIDTH(AW + 32), .DEPTH(NNZ_MAX)) u_csr (
    .clk,
    .we (host_we && host_sel == HSEL_CSR && !busy),
    .wa (host_addr[EW-1:0]),
    .wd ({host_wdata[63:32], host_wdata[AW-1:0]}),
    .ra (csr_addr), .qa (csr_q),
    .rb (csr_addr), .qb (csr_q_unused)
  );

  // ------------------------------------------------------------ vector banks
  logic [AW-1:0] bank_ra, bank_rb;
  logic [VW-1:0] bank_qa [4], bank_qb [4];
  logic          bank_we [4];
  logic [AW-1:0] bank_wa [4];
  logic [VW-1:0] bank_wd [4];

  for (genvar k = 0; k < 4; k++) begin : g_bank
    sme_ram #(.WIDTH(VW), .DEPTH(N_MAX)) u_bank (
      .clk,
      .we (bank_we[k]), .wa (bank_wa[k]), .wd (bank_wd[k]),
      .ra (bank_ra), .qa (bank_qa[k]),
      .rb (bank_rb), .qb (bank_qb[k])
    );
  end

  // ------------------------------------------------------------ result R
  logic [AW-1:0] dot_rd_addr, dot_wr_addr;
  logic          dot_wr_en;
  fp32_t         r_old, r_new;

  sme_ram #(.WIDTH(32), .DEPTH(N_MAX)) u_r (
    .clk,
    .we (dot_wr_en), .wa (dot_wr_addr), .wd (r_new),
    .ra (dot_rd_addr), .qa (r_old),
    .rb (host_raddr),  .qb (host_rdata)
  );

  // ------------------------------------------------------------ kernels
  logic          rng_wr_en;
  logic [AW-1:0] rng_wr_addr;
  fp32_t         rng_v [NB], rng_w [NB];
  logic          rng_busy;

  sme_rng #(.NB(NB), .AW(AW)) u_rng (
    .clk, .rst_n, .seed_load, .seed,
    .start (rng_start), .n_rows, .c0 (coef),
    .wr_en (rng_wr_en), .wr_addr (rng_wr_addr), .v_row (rng_v), .w_row (rng_w),
    .done (rng_done), .busy (rng_busy)
  );

  fp32_t         port_a [NB], port_b [NB];
  logic [AW-1:0] spmm_x_addr, spmm_z_addr, spmm_wr_addr;
  logic          spmm_wr_en, spmm_busy;
  fp32_t         spmm_y [NB];

  sme_spmm #(.NB(NB), .AW(AW), .EW(EW)) u_spmm (
    .clk, .rst_n, .start (spmm_start), .mode (spmm_mode), .n_rows,
    .rp_addr (spmm_rp_addr), .rp_lo, .rp_hi,
    .csr_addr, .csr_col (csr_q[AW-1:0]), .csr_val (csr_q[AW+31:AW]),
    .x_addr (spmm_x_addr), .x_row (port_a),
    .z_addr (spmm_z_addr), .z_row (port_b),
    .wr_en (spmm_wr_en), .wr_addr (spmm_wr_addr), .y_row (spmm_y),
    .done (spmm_done), .busy (spmm_busy)
  );

  logic [AW-1:0] axpy_rd_addr, axpy_wr_addr;
  logic          axpy_wr_en, axpy_busy;
  fp32_t         axpy_w [NB];

  sme_axpy #(.NB(NB), .AW(AW)) u_axpy (
    .clk, .rst_n, .start (axpy_start), .n_rows, .c (coef),
    .rd_addr (axpy_rd_addr), .x_row (port_a), .y_row (port_b),
    .wr_en (axpy_wr_en), .wr_addr (axpy_wr_addr), .w_row (axpy_w),
    .done (axpy_done), .busy (axpy_busy)
  );

  logic dot_busy;

  sme_dot #(.NB(NB), .AW(AW)) u_dot (
    .clk, .rst_n, .start (dot_start), .first (dot_first), .n_rows,
    .rd_addr (dot_rd_addr), .w_row (port_a), .v_row (port_b), .r_old,
    .wr_en (dot_wr_en), .wr_addr (dot_wr_addr), .r_new,
    .done (dot_done), .busy (dot_busy)
  );

  // ------------------------------------------------------------ routing
  // Read ports: port A reads bank x_bank, port B reads bank z_bank.
  always_comb begin
    unique case (kernel)
      K_SPMM:  begin bank_ra = spmm_x_addr;  bank_rb = spmm_z_addr;  end
      K_AXPY:  begin bank_ra = axpy_rd_addr; bank_rb = axpy_rd_addr; end
      K_DOT:   begin bank_ra = dot_rd_addr;  bank_rb = dot_rd_addr;  end
      default: begin bank_ra = '0;           bank_rb = '0;           end
    endcase
    for (int b = 0; b < NB; b++) begin
      port_a[b] = bank_qa[x_bank][b*32 +: 32];
      port_b[b] = bank_qb[z_bank][b*32 +: 32];
    end
  end

  function automatic logic [VW-1:0] pack(input fp32_t r [NB]);
    logic [VW-1:0] p;
    for (int b = 0; b < NB; b++) p[b*32 +: 32] = r[b];
    return p;
  endfunction

  // Write ports: RNG writes V, M0 and W; SPMM writes y_bank; AXPY writes W.
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      bank_we[k] = 1'b0;
      bank_wa[k] = '0;
      bank_wd[k] = '0;
    end
    unique case (kernel)
      K_RNG: begin
        bank_we[BANK_V]  = rng_wr_en;  bank_wa[BANK_V]  = rng_wr_addr; bank_wd[BANK_V]  = pack(rng_v);
        bank_we[m0_bank] = rng_wr_en;  bank_wa[m0_bank] = rng_wr_addr; bank_wd[m0_bank] = pack(rng_v);
        bank_we[BANK_W]  = rng_wr_en;  bank_wa[BANK_W]  = rng_wr_addr; bank_wd[BANK_W]  = pack(rng_w);
      end
      K_SPMM: begin
        bank_we[y_bank] = spmm_wr_en; bank_wa[y_bank] = spmm_wr_addr; bank_wd[y_bank] = pack(spmm_y);
      end
      K_AXPY: begin
        bank_we[BANK_W] = axpy_wr_en; bank_wa[BANK_W] = axpy_wr_addr; bank_wd[BANK_W] = pack(axpy_w);
      end
      default: ;
    endcase
  end

  // Only the kernel selected by the controller may be active.
  assert property (@(posedge clk) disable iff (!rst_n)
                   $onehot0({rng_busy, spmm_busy, axpy_busy, dot_busy}));

endmodule
