// cde_ref_pkg: reference arithmetic for the equalizer testbenches.
//
// ref_fir evaluates the quantized filter in plain direct form, eq.
// y(n) = sum_{k=0}^{N-1} x(n-k) * (qr(k) + j*qi(k)), with the full N taps
// obtained by mirroring the half table (q(k) = q(N-1-k)) and 64-bit
// arithmetic. It shares nothing with the distributive datapath: no folding,
// no routing, no per-level sums, no shift-and-add.
package cde_ref_pkg;
  import cde_pkg::*;

  // level of full-filter tap k from a half table
  function automatic int full_level(lvl_tab_t q, int n, int k);
    return (k <= (n - 1) / 2) ? q[k] : q[n-1-k];
  endfunction

  // hist_re/hist_im[k] = x(n-k), k = 0..n-1
  function automatic cacc_t ref_fir(lvl_tab_t qr, lvl_tab_t qi, int n,
                                    longint hist_re[], longint hist_im[]);
    longint acc_re;
    longint acc_im;
    longint cr;
    longint ci;
    cacc_t  r;
    acc_re = 0;
    acc_im = 0;
    for (int k = 0; k < n; k++) begin
      cr = full_level(qr, n, k);
      ci = full_level(qi, n, k);
      acc_re += hist_re[k] * cr - hist_im[k] * ci;
      acc_im += hist_re[k] * ci + hist_im[k] * cr;
    end
    r.re = acc_re[W_ACC-1:0];
    r.im = acc_im[W_ACC-1:0];
    return r;
  endfunction

  // random signed sample of W_IN bits
  function automatic cin_t rand_sample();
    cin_t s;
    s.re = W_IN'($urandom);
    s.im = W_IN'($urandom);
    return s;
  endfunction

  // random level table with values -delta..delta for taps 0..nh-1
  function automatic lvl_tab_t rand_levels(int nh, int delta);
    lvl_tab_t q;
    for (int k = 0; k < MAX_HALF; k++)
      q[k] = lvl_t'((k < nh) ? int'($urandom_range(2 * delta, 0)) - delta : 0);
    return q;
  endfunction
endpackage
