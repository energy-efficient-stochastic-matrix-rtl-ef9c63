// sme_dot: accumulation of the estimator's result, R += diag(W * V^T).
//
// For the subgraph centrality only the diagonal of f(A) is wanted, so of the
// product W * V^T only element (i,i) is formed: R[i] += sum_b W[i][b]*V[i][b].
// The NB products of a row are summed by a balanced binary adder tree
// (level 0 adds lanes 2k and 2k+1, and so on; lanes beyond NB read as +0),
// and the tree sum is then added to the old R[i]. With first set the old
// value is taken as +0, which performs the R = 0 initialisation.
// The accumulation is the published design's; computing only the diagonal, the tree
// order and the handshake are this design's own.
//
// Timing: like sme_axpy, one row per clock; rows of W, V and R are fetched
// in one cycle and R[i] is written in the next. done pulses one cycle after
// the last write. first must stay stable while busy.
module sme_dot
  import sme_pkg::*;
#(
  parameter int unsigned NB = 8,
  parameter int unsigned AW = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          first,
  input  logic [AW:0]   n_rows,
  output logic [AW-1:0] rd_addr,    // row of W, V and R being fetched
  input  fp32_t         w_row [NB],
  input  fp32_t         v_row [NB],
  input  fp32_t         r_old,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output fp32_t         r_new,
  output logic          done,
  output logic          busy
);

  localparam int unsigned LV = (NB > 1) ? $clog2(NB) : 0;
  localparam int unsigned NP = 1 << LV;

  // g_lvl[l].node[k]: node k of tree level l; level 0 holds the products
  for (genvar l = 0; l <= LV; l++) begin : g_lvl
    fp32_t node [NP >> l];
    if (l == 0) begin : g_leaf
      for (genvar b = 0; b < NP; b++) begin : g_prod
        if (b < NB) begin : g_mul
          fp32_mul u_mul (.a(w_row[b]), .b(v_row[b]), .y(node[b]));
        end else begin : g_pad
          assign node[b] = FP_ZERO;
        end
      end
    end else begin : g_inner
      for (genvar k = 0; k < (NP >> l); k++) begin : g_node
        fp32_add u_add (.a(g_lvl[l-1].node[2*k]), .b(g_lvl[l-1].node[2*k+1]), .y(node[k]));
      end
    end
  end

  fp32_t r_in;
  assign r_in = first ? FP_ZERO : r_old;
  fp32_add u_acc (.a(r_in), .b(g_lvl[LV].node[0]), .y(r_new));

  logic          issuing, p_valid, p_last;
  logic [AW:0]   row;
  logic [AW-1:0] p_addr;

  assign rd_addr = row[AW-1:0];
  assign wr_en   = p_valid;
  assign wr_addr = p_addr;
  assign busy    = issuing | p_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing <= 1'b0;
      row     <= '0;
      p_valid <= 1'b0;
      p_last  <= 1'b0;
      p_addr  <= '0;
      done    <= 1'b0;
    end else begin
      done    <= 1'b0;
      p_valid <= issuing;
      p_addr  <= row[AW-1:0];
      p_last  <= issuing && (row + 1'b1 == n_rows);
      if (p_valid && p_last) done <= 1'b1;
      if (start && !busy) begin
        row <= '0;
        if (n_rows == '0) done <= 1'b1;
        else issuing <= 1'b1;
      end else if (issuing) begin
        if (row + 1'b1 == n_rows) issuing <= 1'b0;
        else row <= row + 1'b1;
      end
    end
  end

endmodule
