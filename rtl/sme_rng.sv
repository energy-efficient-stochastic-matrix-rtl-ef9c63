// sme_rng: Rademacher test-vector generator of the estimator.
//
// A 64-bit xorshift generator (shifts 12 right, 25 left, 27 right) is
// advanced once per output row; its state multiplied by 2685821657736338717
// (the xorshift64* output step, low 64 bits kept) gives the random word rs.
// Bit b of rs selects -1.0 (bit set) or +1.0 (bit clear) for column b of the
// row, so NB values are drawn per generator step, as the published unrolled
// kernel does. Each row is written on the fly to three places: V and M0 get
// the +-1 value, W gets c[0] times it (c[0] with its sign flipped for -1).
// The generator, multiplier, bit-to-sign rule and the V/M0/W initialisation
// follow the published design; the unroll factor (one step per row of NB values), the
// zero-seed substitute and the start/done handshake are this design's own.
//
// Interface: seed_load loads the state from seed (a zero seed is replaced by
// 0xdecafbad). start begins a pass over rows 0..n_rows-1; the pass writes one
// row per clock (wr_en, wr_addr, v_row, w_row registered) and raises done
// for one clock together with the last row. The state carries over from one
// pass to the next, so later test-vector blocks get fresh numbers.
module sme_rng
  import sme_pkg::*;
#(
  parameter int unsigned NB = 8,       // columns per row = bits used per step
  parameter int unsigned AW = 10       // row address width
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            seed_load,
  input  logic [63:0]     seed,
  input  logic            start,
  input  logic [AW:0]     n_rows,
  input  fp32_t           c0,
  output logic            wr_en,
  output logic [AW-1:0]   wr_addr,
  output fp32_t           v_row [NB],
  output fp32_t           w_row [NB],
  output logic            done,
  output logic            busy
);

  logic [63:0] x, x_next, rs_next;
  logic [AW:0] row;

  function automatic logic [63:0] xorshift(input logic [63:0] s);
    logic [63:0] t;
    t = s ^ (s >> 12);
    t = t ^ (t << 25);
    t = t ^ (t >> 27);
    return t;
  endfunction

  always_comb begin
    x_next  = xorshift(x);
    rs_next = x_next * XS_MULT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x       <= XS_SEED_ZERO_SUBST;
      row     <= '0;
      busy    <= 1'b0;
      wr_en   <= 1'b0;
      wr_addr <= '0;
      done    <= 1'b0;
      for (int b = 0; b < NB; b++) begin
        v_row[b] <= FP_ZERO;
        w_row[b] <= FP_ZERO;
      end
    end else begin
      wr_en <= 1'b0;
      done  <= 1'b0;
      if (seed_load && !busy) begin
        x <= (seed == '0) ? XS_SEED_ZERO_SUBST : seed;
      end else if (start && !busy) begin
        if (n_rows == '0) done <= 1'b1;
        else begin
          busy <= 1'b1;
          row  <= '0;
        end
      end else if (busy) begin
        x       <= x_next;
        wr_en   <= 1'b1;
        wr_addr <= row[AW-1:0];
        for (int b = 0; b < NB; b++) begin
          v_row[b] <= rs_next[b] ? FP_NEG_ONE : FP_ONE;
          w_row[b] <= {c0[31] ^ rs_next[b], c0[30:0]};
        end
        row <= row + 1'b1;
        if (row + 1'b1 == n_rows) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  initial assert (NB >= 1 && NB <= 64) else $error("sme_rng: NB must be 1..64");

endmodule
