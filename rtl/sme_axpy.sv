// sme_axpy: scaled vector update (AXPY) of the estimator, W = c * X + W,
// over the rows 0..n_rows-1 of an NB-column block.
//
// Used for the Chebyshev sum: W = c[1]*M1 + W after the first SPMM and
// W = c[m]*M0 + W after each later one. Every lane multiplies (rounded) and
// then adds (rounded). The operation is the published design's; the row pipeline and
// the start/done handshake are this design's own.
//
// Timing: the row address for X and W is issued in one cycle, the data come
// back the next and the result row is written in that same cycle, so a row
// is finished every clock: the last row is written n_rows + 1 cycles after
// start, and done pulses for one cycle right after that write. c must stay
// stable while busy.
module sme_axpy
  import sme_pkg::*;
#(
  parameter int unsigned NB = 8,
  parameter int unsigned AW = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW:0]   n_rows,
  input  fp32_t         c,
  output logic [AW-1:0] rd_addr,     // row of X and of W being fetched
  input  fp32_t         x_row [NB],
  input  fp32_t         y_row [NB],  // current W row
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output fp32_t         w_row [NB],
  output logic          done,
  output logic          busy
);

  logic        issuing;   // a read is presented this cycle
  logic [AW:0] row;
  logic        p_valid;   // data of the read issued last cycle are on x_row/y_row
  logic        p_last;
  logic [AW-1:0] p_addr;
  fp32_t       cx [NB];

  for (genvar b = 0; b < NB; b++) begin : g_lane
    fp32_mul u_mul (.a(c),     .b(x_row[b]), .y(cx[b]));
    fp32_add u_add (.a(cx[b]), .b(y_row[b]), .y(w_row[b]));
  end

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
