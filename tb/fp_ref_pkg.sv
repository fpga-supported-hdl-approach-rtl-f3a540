// Reference model for the floating point ALU testbenches.
//
// Works independently of the RTL: operands are widened exactly to IEEE double
// precision, the operation is done with the simulator's real arithmetic, and
// the double is rounded back to single precision (nearest, ties to even) by
// bit manipulation. Double rounding is harmless here because the double
// significand (53 bits) exceeds twice the single one plus two for +, -, *
// and /. The model follows the same conventions as the ALU: subnormal inputs
// count as zero, results below the normal range become signed zero with
// underflow, results above it become signed infinity with overflow, and the
// NaN produced is 0x7FC00000. Return value: {div_by_zero, underflow,
// overflow, result[31:0]}.
package fp_ref_pkg;

  localparam logic [31:0] REF_QNAN = 32'h7FC00000;

  function automatic real sp_to_real(input logic [31:0] x);
    logic [63:0] d;
    if (x[30:23] == 8'h00) return 0.0;
    d = {x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'b0};
    return $bitstoreal(d);
  endfunction

  // Round a nonzero finite double to single with the ALU's range rules.
  function automatic logic [34:0] real_to_sp(input real r);
    logic [63:0] d;
    logic [52:0] s53;
    logic [24:0] s25;
    logic        g, st, sgn;
    int          e;
    d   = $realtobits(r);
    sgn = d[63];
    if (d[62:0] == '0) return {3'b000, 32'h0};
    e   = int'(d[62:52]) - 1023 + 127;
    s53 = {1'b1, d[51:0]};
    g   = s53[28];
    st  = |s53[27:0];
    s25 = {1'b0, s53[52:29]} + 25'((g && (st || s53[29])) ? 1 : 0);
    if (s25[24]) begin
      s25 = 25'h0800000;
      e   = e + 1;
    end
    if (e >= 255) return {3'b001, sgn, 8'hFF, 23'h0};
    if (e <= 0)   return {3'b010, sgn, 31'h0};
    return {3'b000, sgn, 8'(e), s25[22:0]};
  endfunction

  // op: 0 add, 1 sub, 2 mul, 3 div
  function automatic logic [34:0] fp_ref(input int op, input logic [31:0] a_in,
                                          input logic [31:0] b_in);
    logic [31:0] a, b;
    logic a_nan, b_nan, a_inf, b_inf, a_zero, b_zero, sa, sb, sx;
    real  ra, rb, r;
    a = a_in;
    b = b_in;
    if (op == 1) b[31] = ~b[31];
    if (a[30:23] == 0) a[22:0] = 0;
    if (b[30:23] == 0) b[22:0] = 0;
    sa = a[31]; sb = b[31]; sx = sa ^ sb;
    a_nan  = (a[30:23] == 8'hFF) && (a[22:0] != 0);
    b_nan  = (b[30:23] == 8'hFF) && (b[22:0] != 0);
    a_inf  = (a[30:23] == 8'hFF) && (a[22:0] == 0);
    b_inf  = (b[30:23] == 8'hFF) && (b[22:0] == 0);
    a_zero = (a[30:23] == 8'h00);
    b_zero = (b[30:23] == 8'h00);
    if (a_nan || b_nan) return {3'b000, REF_QNAN};
    case (op)
      0, 1: begin
        if (a_inf && b_inf) return (sa == sb) ? {3'b000, sa, 8'hFF, 23'h0} : {3'b000, REF_QNAN};
        if (a_inf) return {3'b000, sa, 8'hFF, 23'h0};
        if (b_inf) return {3'b000, sb, 8'hFF, 23'h0};
        if (a_zero && b_zero) return {3'b000, sa & sb, 31'h0};
        r = sp_to_real(a) + sp_to_real(b);
        if (r == 0.0) return {3'b000, 32'h0};
        return real_to_sp(r);
      end
      2: begin
        if ((a_inf && b_zero) || (a_zero && b_inf)) return {3'b000, REF_QNAN};
        if (a_inf || b_inf) return {3'b000, sx, 8'hFF, 23'h0};
        if (a_zero || b_zero) return {3'b000, sx, 31'h0};
        return real_to_sp(sp_to_real(a) * sp_to_real(b));
      end
      default: begin
        if ((a_zero && b_zero) || (a_inf && b_inf)) return {3'b000, REF_QNAN};
        if (b_zero) return {a_inf ? 3'b000 : 3'b100, sx, 8'hFF, 23'h0};
        if (a_inf) return {3'b000, sx, 8'hFF, 23'h0};
        if (a_zero || b_inf) return {3'b000, sx, 31'h0};
        ra = sp_to_real(a);
        rb = sp_to_real(b);
        return real_to_sp(ra / rb);
      end
    endcase
  endfunction

  // Random operand: mostly normal numbers over the whole range, with zeros,
  // infinities, NaNs and subnormals mixed in.
  function automatic logic [31:0] rand_operand();
    int unsigned k;
    logic [31:0] x;
    k = $urandom_range(0, 99);
    x = $urandom;
    if (k < 4)       x[30:0] = '0;                                 // zero
    else if (k < 7)  x[30:0] = {8'hFF, 23'h0};                     // infinity
    else if (k < 9)  x[30:23] = 8'hFF;                             // NaN (mostly)
    else if (k < 11) x[30:23] = 8'h00;                             // subnormal
    else if (k < 60) x[30:23] = 8'($urandom_range(100, 154));      // moderate range
    return x;
  endfunction

  // Operand close to x in magnitude: same or neighbouring exponent.
  function automatic logic [31:0] near_operand(input logic [31:0] x);
    logic [31:0] y;
    y = $urandom;
    y[30:23] = 8'(int'(x[30:23]) + $urandom_range(0, 2) - 1);
    if ($urandom_range(0, 3) == 0) y[22:8] = x[22:8];
    return y;
  endfunction

endpackage
