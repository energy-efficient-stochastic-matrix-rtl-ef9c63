// sme_pkg: types and constants shared by the stochastic matrix-function
// estimator (SME). Values are IEEE-754 single precision (fp32) words, as in
// the float kernels of the estimator. The vector block of Nb test vectors is
// stored row by row: one memory word holds the Nb values of one graph node.
// The bank numbering and the host write selector are this design's own.
package sme_pkg;

  typedef logic [31:0] fp32_t;

  localparam fp32_t FP_ZERO    = 32'h0000_0000;
  localparam fp32_t FP_ONE     = 32'h3F80_0000;
  localparam fp32_t FP_NEG_ONE = 32'hBF80_0000;
  localparam fp32_t FP_TWO     = 32'h4000_0000;

  // xorshift64* output multiplier
  localparam logic [63:0] XS_MULT = 64'd2685821657736338717;
  // seed substitute for an all-zero seed (xorshift has a fixed point at 0)
  localparam logic [63:0] XS_SEED_ZERO_SUBST = 64'h0000_0000_DECA_FBAD;

  // Physical vector banks. M0/M1 map onto MA/MB depending on the pointer swap.
  typedef enum logic [1:0] {
    BANK_V  = 2'd0,
    BANK_MA = 2'd1,
    BANK_MB = 2'd2,
    BANK_W  = 2'd3
  } bank_e;

  // Host write targets
  typedef enum logic [1:0] {
    HSEL_ROWPTR = 2'd0,   // row_ptr[addr]      = wdata[31:0]
    HSEL_CSR    = 2'd1,   // {val,col}[addr]    = {wdata[63:32], wdata[31:0]}
    HSEL_COEF   = 2'd2    // c[addr]            = wdata[31:0] (fp32)
  } host_sel_e;

  // Kernel currently driven by the controller
  typedef enum logic [2:0] {
    K_NONE = 3'd0,
    K_RNG  = 3'd1,
    K_SPMM = 3'd2,
    K_AXPY = 3'd3,
    K_DOT  = 3'd4
  } kernel_e;

  // Write-back of one row: Y[i] = A*X[i] (plain) or 2*A*X[i] - Z[i] (Chebyshev)
  typedef enum logic {
    SPMM_PLAIN = 1'b0,
    SPMM_CHEB  = 1'b1
  } spmm_mode_e;

endpackage
