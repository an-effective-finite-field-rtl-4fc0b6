// tb_rb_ref_pkg: reference arithmetic for the RB multiplier testbenches.
// Written directly from the definition, independent of the RTL structure:
// the RB product of two n-bit vectors is the cyclic convolution
//   c_k = XOR over i of a_i & b_((k - i) mod n),
// and rotl(x, k, n) moves bit i of x to bit (i + k) mod n.
package tb_rb_ref_pkg;

  localparam int MAXW = 512;
  typedef logic [MAXW-1:0] vec_t;

  function automatic vec_t rb_mul(input vec_t a, input vec_t b, input int n);
    vec_t c = '0;
    for (int k = 0; k < n; k++)
      for (int i = 0; i < n; i++)
        c[k] = c[k] ^ (a[i] & b[(k - i + n) % n]);
    return c;
  endfunction

  function automatic vec_t rotl(input vec_t x, input int k, input int n);
    vec_t y = '0;
    for (int i = 0; i < n; i++) y[(i + k) % n] = x[i];
    return y;
  endfunction

  function automatic vec_t rand_vec(input int n);
    vec_t v = '0;
    for (int i = 0; i < n; i++) v[i] = 1'($urandom);
    return v;
  endfunction

endpackage
