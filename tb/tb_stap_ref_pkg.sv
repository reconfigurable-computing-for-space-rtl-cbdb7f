// tb_stap_ref_pkg: reference arithmetic for the co-processor testbenches.
//
// Integer models, written independently of the RTL structure:
//  pmag     - magnitude of a product, keeping the upper PROD_W of 2*MANT_W bits
//  mac_step - one step of a partial sum with exponent: renormalise by one bit
//             when |sum| >= 2^(W-2), align the product to the exponent, add
//  sext     - sign-extend a W-bit field
package tb_stap_ref_pkg;

  function automatic longint unsigned pmag(longint unsigned a, longint unsigned b,
                                           int mant_w = 16, int prod_w = 16);
    return (a * b) >> (2 * mant_w - prod_w);
  endfunction

  function automatic void mac_step(ref longint sum, ref int e, input bit sg,
                                   input longint unsigned mag, input int w = 20,
                                   input int exp_w = 6, input int prod_w = 16);
    longint lim;
    longint a;
    lim = longint'(1) << (w - 2);
    if ((sum >= lim || sum < -lim) && e != (1 << exp_w) - 1) begin
      sum = sum >>> 1;
      e   = e + 1;
    end
    a   = (e >= prod_w) ? 0 : longint'(mag >> e);
    sum = sg ? sum - a : sum + a;
  endfunction

  function automatic longint sext(longint unsigned v, int w);
    longint r;
    r = longint'(v & ((longint'(1) << w) - 1));
    if (r >= (longint'(1) << (w - 1))) r = r - (longint'(1) << w);
    return r;
  endfunction

endpackage
