// mult_ref_pkg: reference models used by the testbenches.
//
// eta_add_ref follows the error tolerant addition procedure step by step,
// written independently of the gate-level adder: the high part is added
// with ordinary integer arithmetic; the low part is scanned from its MSB
// down, each bit is a ^ b until the first position where both bits are 1,
// and from there down every bit is 1. mult_ref runs the shift-and-add
// algorithm on a 64-bit product register, with either exact or error
// tolerant additions.
package mult_ref_pkg;

  function automatic logic [32:0] eta_add_ref(logic [31:0] a, logic [31:0] b,
                                              int unsigned w, int unsigned l);
    logic [32:0] hi;
    logic [31:0] lo;
    logic [31:0] mask_w, mask_l;
    bit          sat;
    mask_w = (w == 32) ? 32'hFFFF_FFFF : ((32'd1 << w) - 1);
    mask_l = (32'd1 << l) - 1;
    hi  = {1'b0, (a & mask_w) >> l} + {1'b0, (b & mask_w) >> l};
    lo  = '0;
    sat = 1'b0;
    for (int i = int'(l) - 1; i >= 0; i--) begin
      if (!sat && a[i] && b[i]) sat = 1'b1;
      lo[i] = sat ? 1'b1 : (a[i] ^ b[i]);
    end
    // {carry out, sum}: the carry out is the carry of the high part.
    return (hi << l) | 33'(lo);
  endfunction

  // Product of two W-bit operands by the shift-and-add algorithm.
  // approx = 1 uses eta_add_ref (split l) for every addition.
  function automatic logic [63:0] mult_ref(logic [31:0] a, logic [31:0] b,
                                           int unsigned w, bit approx, int unsigned l);
    logic [31:0] upper;
    logic [31:0] lower;
    logic [32:0] s;
    logic [31:0] mask_w;
    mask_w = (w == 32) ? 32'hFFFF_FFFF : ((32'd1 << w) - 1);
    upper = '0;
    lower = b & mask_w;
    for (int i = 0; i < int'(w); i++) begin
      if (lower[0]) begin
        if (approx) s = eta_add_ref(upper, a & mask_w, w, l);
        else        s = 33'(upper) + 33'(a & mask_w);
      end else begin
        s = 33'(upper);
      end
      // shift {carry, upper, lower} right by one; lower's LSB is dropped
      lower = (lower >> 1) | (32'(s[0]) << (w - 1));
      upper = 32'(s >> 1);
    end
    return (64'(upper) << w) | 64'(lower);
  endfunction

endpackage
