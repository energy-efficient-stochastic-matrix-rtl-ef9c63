// fp_ref_pkg: reference models used by the testbenches.
//
// Single-precision values are converted to double precision, combined
// exactly (a product of two fp32 values fits in a double; a sum does when the
// exponents differ by less than 29) and rounded back to fp32 to nearest, ties
// to even, with subnormal results flushed to zero, which is the rounding the
// hardware implements. Also holds the xorshift64* step.
package fp_ref_pkg;

  function automatic real to_real(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'h00) d = {f[31], 63'd0};
    else if (f[30:23] == 8'hFF) d = {f[31], 11'h7FF, f[22:0], 29'd0};
    else d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] from_real(input real r);
    logic [63:0] d;
    logic        s, g, st;
    int          e;
    logic [24:0] m;
    d = $realtobits(r);
    s = d[63];
    if (d[62:52] == 11'd0) return {s, 31'd0};
    if (d[62:52] == 11'h7FF) return (d[51:0] != 0) ? 32'h7FC0_0000 : {s, 8'hFF, 23'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {2'b01, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 1;
    if (m[24]) begin m = m >> 1; e = e + 1; end
    if (e <= 0) return {s, 31'd0};
    if (e >= 255) return {s, 8'hFF, 23'd0};
    return {s, 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] ref_add(input logic [31:0] a, input logic [31:0] b);
    return from_real(to_real(a) + to_real(b));
  endfunction

  function automatic logic [31:0] ref_mul(input logic [31:0] a, input logic [31:0] b);
    return from_real(to_real(a) * to_real(b));
  endfunction

  // random fp32 with exponent field in [emin, emax]
  function automatic logic [31:0] rand_fp(input int emin, input int emax);
    logic [31:0] r;
    r = $urandom;
    r[30:23] = 8'(emin + int'($urandom % (emax - emin + 1)));
    return r;
  endfunction

  function automatic logic [63:0] xs_step(input logic [63:0] s);
    logic [63:0] t;
    t = s ^ (s >> 12);
    t = t ^ (t << 25);
    t = t ^ (t >> 27);
    return t;
  endfunction

  localparam logic [63:0] XS_K = 64'd2685821657736338717;

endpackage
