// sme_ctrl: sequencer of the stochastic matrix-function estimator.
//
// It runs the estimator's loop nest on the kernels, one kernel at a time:
//   for blk = 1 .. n_blocks                       (n_blocks = Ns / Nb)
//     RNG   : V = M0 = random +-1, W = c[0] * V
//     SPMM  : M1 = A * V                          (plain mode)
//     AXPY  : W  = c[1] * M1 + W
//     for m = 2 .. nc
//       SPMM: M0 = 2 * A * M1 - M0                (Chebyshev mode)
//       AXPY: W  = c[m] * M0 + W
//       swap M0 and M1
//     DOT   : R += diag(W * V^T)                  (R taken as 0 in block 1)
// M0 and M1 are two physical banks, MA and MB; the swap is a bit that
// exchanges their roles, so nothing is copied. The swap bit is cleared at
// the start of each block. The Chebyshev coefficients c[0..nc] are held in a
// register file written by the host. The loop nest and the pointer swap are
// the published design's; the division R/Ns is left to the host, and the one-kernel-
// at-a-time schedule and the start/done handshake are this design's own.
//
// Interface: start (while idle) begins a run with the given n_rows, nc >= 1
// and n_blocks >= 1; busy is high until done pulses. Each kernel receives a
// one-cycle start pulse and the controller waits for its done pulse. The
// bank selects and the coefficient are stable while a kernel runs.
module sme_ctrl
  import sme_pkg::*;
#(
  parameter int unsigned NC_MAX = 63,   // highest Chebyshev index supported
  parameter int unsigned BW     = 16,   // width of the block counter
  localparam int unsigned CW    = $clog2(NC_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // coefficient register file
  input  logic          coef_we,
  input  logic [CW-1:0] coef_addr,
  input  fp32_t         coef_wdata,
  // run control
  input  logic          start,
  input  logic [CW-1:0] nc,
  input  logic [BW-1:0] n_blocks,
  output logic          busy,
  output logic          done,
  // kernel control
  output kernel_e       kernel,      // kernel that owns the memories now
  output logic          rng_start,
  input  logic          rng_done,
  output logic          spmm_start,
  output spmm_mode_e    spmm_mode,
  input  logic          spmm_done,
  output logic          axpy_start,
  input  logic          axpy_done,
  output logic          dot_start,
  output logic          dot_first,
  input  logic          dot_done,
  output fp32_t         coef,        // c[0] for RNG, c[m] for AXPY
  output bank_e         m0_bank,     // physical bank holding M0
  output bank_e         m1_bank,     // physical bank holding M1
  output bank_e         x_bank,      // bank read on port A (SPMM X, AXPY X, DOT W)
  output bank_e         z_bank,      // bank read on port B (SPMM Z, AXPY W, DOT V)
  output bank_e         y_bank,      // bank written by SPMM / AXPY
  output logic [BW-1:0] block_idx,
  output logic [CW-1:0] cheb_idx
);

  typedef enum logic [2:0] {C_IDLE, C_RNG, C_SPMM1, C_AXPY1, C_SPMMC, C_AXPYC, C_DOT} cstate_e;
  cstate_e       state;
  logic          launched;
  logic          swap;
  logic [CW-1:0] m;
  logic [BW-1:0] blk;
  fp32_t         coefs [NC_MAX + 1];
  logic          kdone;

  always_ff @(posedge clk) begin
    if (coef_we && !busy) coefs[coef_addr] <= coef_wdata;
  end

  assign busy      = (state != C_IDLE);
  assign m0_bank   = swap ? BANK_MB : BANK_MA;
  assign m1_bank   = swap ? BANK_MA : BANK_MB;
  assign block_idx = blk;
  assign cheb_idx  = m;
  assign dot_first = (blk == '0);

  always_comb begin
    kernel    = K_NONE;
    spmm_mode = SPMM_PLAIN;
    coef      = coefs[m];
    kdone     = 1'b0;
    x_bank    = BANK_V;
    z_bank    = m0_bank;
    y_bank    = BANK_W;
    unique case (state)
      C_RNG: begin
        kernel = K_RNG; coef = coefs[0]; kdone = rng_done;
      end
      C_SPMM1: begin
        kernel = K_SPMM; kdone = spmm_done;
        x_bank = BANK_V; z_bank = m0_bank; y_bank = m1_bank;
      end
      C_AXPY1: begin
        kernel = K_AXPY; coef = coefs[1]; kdone = axpy_done;
        x_bank = m1_bank; z_bank = BANK_W; y_bank = BANK_W;
      end
      C_SPMMC: begin
        kernel = K_SPMM; spmm_mode = SPMM_CHEB; kdone = spmm_done;
        x_bank = m1_bank; z_bank = m0_bank; y_bank = m0_bank;
      end
      C_AXPYC: begin
        kernel = K_AXPY; kdone = axpy_done;
        x_bank = m0_bank; z_bank = BANK_W; y_bank = BANK_W;
      end
      C_DOT: begin
        kernel = K_DOT; kdone = dot_done;
        x_bank = BANK_W; z_bank = BANK_V;
      end
      default: ;
    endcase
    rng_start  = (state == C_RNG)                         && !launched;
    spmm_start = (state == C_SPMM1 || state == C_SPMMC)   && !launched;
    axpy_start = (state == C_AXPY1 || state == C_AXPYC)   && !launched;
    dot_start  = (state == C_DOT)                         && !launched;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= C_IDLE;
      launched <= 1'b0;
      swap     <= 1'b0;
      m        <= '0;
      blk      <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (state != C_IDLE && !launched) launched <= 1'b1;
      if (state == C_IDLE) begin
        if (start) begin
          blk   <= '0;
          swap  <= 1'b0;
          m     <= '0;
          state <= C_RNG;
        end
      end else if (launched && kdone) begin
        launched <= 1'b0;
        unique case (state)
          C_RNG:   state <= C_SPMM1;
          C_SPMM1: state <= C_AXPY1;
          C_AXPY1: begin
            m     <= CW'(2);
            state <= (nc >= CW'(2)) ? C_SPMMC : C_DOT;
          end
          C_SPMMC: state <= C_AXPYC;
          C_AXPYC: begin
            swap <= ~swap;
            m    <= m + 1'b1;
            state <= (m == nc) ? C_DOT : C_SPMMC;
          end
          C_DOT: begin
            blk  <= blk + 1'b1;
            swap <= 1'b0;
            m    <= '0;
            if (blk + 1'b1 >= n_blocks) begin
              state <= C_IDLE;
              done  <= 1'b1;
            end else state <= C_RNG;
          end
          default: state <= C_IDLE;
        endcase
      end
    end
  end

  // A kernel reports done only after it was started.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (rng_done | spmm_done | axpy_done | dot_done) |-> launched);

endmodule
