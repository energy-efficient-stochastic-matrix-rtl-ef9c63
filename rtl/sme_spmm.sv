// sme_spmm: sparse-matrix times dense-block kernel (SPMM) of the estimator.
//
// The sparse adjacency matrix A is stored in CSR form: row_ptr[i] ..
// row_ptr[i+1]-1 index the non-zeros of row i in the column-index and value
// arrays. For each row i the kernel walks those non-zeros and accumulates,
// in all NB columns at once, acc[b] += val * X[col][b] (a rounded multiply,
// then a rounded add, starting from +0). The row is then written back as
//   plain mode:      Y[i] = acc                  (M1 = A * V)
//   Chebyshev mode:  Y[i] = 2*acc - Z[i]         (M0 = 2 * A * M1 - M0)
// which are the two SPMM steps of the Chebyshev recursion. Y may be the same
// buffer as Z: Z[i] is read before Y[i] is written.
// The CSR format and the two SPMM forms are the published design's; the sequential
// one-non-zero-at-a-time schedule below is this design's own simplest choice.
//
// Timing (all memories have one cycle of read latency): per row, 2 cycles to
// fetch row_ptr[i] and row_ptr[i+1], 3 cycles per non-zero (fetch col/val,
// fetch X row, accumulate), 1 cycle for the end test, 1 to fetch Z[i], 1 to
// write: 5 + 3*nnz(i) cycles. done pulses for one cycle after the last write.
module sme_spmm
  import sme_pkg::*;
#(
  parameter int unsigned NB = 8,     // columns of the dense block
  parameter int unsigned AW = 10,    // row (node) address width
  parameter int unsigned EW = 14     // non-zero address width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  spmm_mode_e    mode,
  input  logic [AW:0]   n_rows,
  // row pointer memory: rp_lo = row_ptr[rp_addr], rp_hi = row_ptr[rp_addr+1]
  output logic [AW-1:0] rp_addr,
  input  logic [EW:0]   rp_lo,
  input  logic [EW:0]   rp_hi,
  // column index / value memory
  output logic [EW-1:0] csr_addr,
  input  logic [AW-1:0] csr_col,
  input  fp32_t         csr_val,
  // dense operand X (random access) and Z (row i)
  output logic [AW-1:0] x_addr,
  input  fp32_t         x_row [NB],
  output logic [AW-1:0] z_addr,
  input  fp32_t         z_row [NB],
  // result
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output fp32_t         y_row [NB],
  output logic          done,
  output logic          busy
);

  typedef enum logic [2:0] {S_IDLE, S_ROW, S_PTR, S_NZ, S_COL, S_MAC, S_ZRD, S_WR} state_e;
  state_e      state;
  logic [AW:0] row;
  logic [EW:0] j, j_end;
  fp32_t       val_q;
  fp32_t       acc [NB];
  fp32_t       prod [NB], acc_next [NB], acc2 [NB], z_neg [NB], y_cheb [NB];

  for (genvar b = 0; b < NB; b++) begin : g_lane
    fp32_mul u_mul  (.a(val_q),   .b(x_row[b]), .y(prod[b]));
    fp32_add u_acc  (.a(acc[b]),  .b(prod[b]),  .y(acc_next[b]));
    fp32_mul u_dbl  (.a(FP_TWO),  .b(acc[b]),   .y(acc2[b]));
    assign z_neg[b] = {~z_row[b][31], z_row[b][30:0]};
    fp32_add u_cheb (.a(acc2[b]), .b(z_neg[b]), .y(y_cheb[b]));
    assign y_row[b] = (mode == SPMM_CHEB) ? y_cheb[b] : acc[b];
  end

  assign busy     = (state != S_IDLE);
  assign rp_addr  = row[AW-1:0];
  assign csr_addr = j[EW-1:0];
  assign x_addr   = csr_col;
  assign z_addr   = row[AW-1:0];
  assign wr_en    = (state == S_WR);
  assign wr_addr  = row[AW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      row   <= '0;
      j     <= '0;
      j_end <= '0;
      val_q <= FP_ZERO;
      done  <= 1'b0;
      for (int b = 0; b < NB; b++) acc[b] <= FP_ZERO;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          row <= '0;
          if (n_rows == '0) done <= 1'b1;
          else state <= S_ROW;
        end
        S_ROW: state <= S_PTR;                  // row_ptr read in flight
        S_PTR: begin
          j     <= rp_lo;
          j_end <= rp_hi;
          for (int b = 0; b < NB; b++) acc[b] <= FP_ZERO;
          state <= S_NZ;
        end
        S_NZ: state <= (j == j_end) ? S_ZRD : S_COL;   // col/val read in flight
        S_COL: begin
          val_q <= csr_val;                     // X row read in flight
          state <= S_MAC;
        end
        S_MAC: begin
          for (int b = 0; b < NB; b++) acc[b] <= acc_next[b];
          j     <= j + 1'b1;
          state <= S_NZ;
        end
        S_ZRD: state <= S_WR;                   // Z row read in flight
        S_WR: begin
          row <= row + 1'b1;
          if (row + 1'b1 == n_rows) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else state <= S_ROW;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
