// tb_stap_cg_workload: a small STAP weight calculation run end to end with the
// co-processors doing every inner product, at the default sizes of the top.
//
// The testbench plays the host. It draws a complex space-time data matrix X
// (n x N) and a steering vector s, estimates the covariance Psi = X X^H / N and
// solves Psi w = s by conjugate gradient. A complex inner product is split into
// two real inner products of length 2n (or 2N):
//   Re(a^H b) = ar.br + ai.bi      Im(a^H b) = ar.bi - ai.br
// Each real inner product is converted to block floating point (one exponent
// per vector, sign + 16-bit mantissas), sent to a co-processor, and its partial
// sums are added and scaled by the host. The covariance estimate uses the
// multiply-and-accumulate co-processor, the conjugate-gradient iterations the
// multiply-and-add one. The result is compared with a double-precision direct
// solve (Gaussian elimination) of the same system.
module tb_stap_cg_workload;

  localparam int NE = 6;    // adaptive weights n
  localparam int NS = 24;   // snapshots N
  localparam int NIT = 2 * NE;

  typedef struct { real re; real im; } cplx_t;

  logic mac_clk = 1'b0, mad_clk = 1'b0, mac_rst_n = 1'b0, mad_rst_n = 1'b0;
  always #5 mac_clk = ~mac_clk;
  always #3 mad_clk = ~mad_clk;

  logic        mac_in_valid, mac_in_ready, mac_out_valid, mac_out_ready, mac_norm_evt;
  logic [35:0] mac_in_data, mac_out_data;
  logic        mad_in_valid, mad_in_ready, mad_out_valid, mad_out_ready, mad_set_evt;
  logic [35:0] mad_in_data, mad_out_data;

  stap_coproc_top dut (.*);

  int checks = 0, failures = 0, n_mac_ip = 0, n_mad_ip = 0;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // each co-processor result against the double-precision inner product; the
  // bound covers mantissa rounding, product truncation and renormalisation
  task automatic check_ip(real u[], real v[], real r, int eu, int ev);
    real exact, tol;
    exact = 0.0;
    foreach (u[i]) exact += u[i] * v[i];
    tol = real'(4 * (u.size() + 14)) * (2.0 ** (eu + ev - 16));
    checks++;
    if (r - exact > tol || exact - r > tol) begin
      failures++;
      $display("FAIL: inner product %g, exact %g", r, exact);
    end
  endtask

  // ---- block floating point conversion ----
  function automatic int bfp_exp(real u[]);
    real mx;
    int  e;
    mx = 0.0;
    foreach (u[i]) if ((u[i] < 0 ? -u[i] : u[i]) > mx) mx = (u[i] < 0 ? -u[i] : u[i]);
    if (mx == 0.0) return 0;
    e = int'($ceil($ln(mx) / $ln(2.0)));
    while (mx / (2.0 ** e) >= 1.0) e++;
    while (mx / (2.0 ** (e - 1)) < 1.0) e--;
    return e;
  endfunction

  function automatic logic [16:0] bfp_mant(real x, int e);
    real a;
    int  m;
    a = (x < 0 ? -x : x) / (2.0 ** e) * 65536.0;
    m = int'($floor(a + 0.5));
    if (m > 65535) m = 65535;
    return {x < 0, 16'(m)};
  endfunction

  // ---- real inner product on the multiply-and-accumulate co-processor ----
  task automatic mac_ip(input real u[], input real v[], output real r);
    int          eu, ev, n, got, e;
    longint      tot;
    logic [35:0] w;
    n  = u.size();
    eu = bfp_exp(u);
    ev = bfp_exp(v);
    tot = 0;
    got = 0;
    fork
      begin
        for (int i = 0; i < n; i++) begin
          @(negedge mac_clk);
          mac_in_valid = 1'b1;
          mac_in_data  = {1'b0, (i == n - 1), bfp_mant(u[i], eu), bfp_mant(v[i], ev)};
          #1;
          while (!mac_in_ready) @(negedge mac_clk);
          @(posedge mac_clk);
        end
        @(negedge mac_clk);
        mac_in_valid = 1'b0;
      end
      begin
        while (got < 7) begin
          @(posedge mac_clk);
          if (mac_out_valid && mac_out_ready) begin
            w = mac_out_data;
            e = int'(w[31:26]);
            tot += (longint'({{38{w[25]}}, w[25:0]})) <<< e;
            got++;
          end
        end
      end
    join
    r = real'(tot) / 65536.0 * (2.0 ** (eu + ev));
    check_ip(u, v, r, eu, ev);
    n_mac_ip++;
  endtask

  // ---- real inner product (even length) on the multiply-and-add co-processor ----
  task automatic mad_ip(input real u[], input real v[], output real r);
    int          eu, ev, n, got;
    longint      tot;
    logic [35:0] w;
    n  = u.size();
    eu = bfp_exp(u);
    ev = bfp_exp(v);
    tot = 0;
    got = 0;
    fork
      begin
        for (int i = 0; i < n; i++) begin
          @(negedge mad_clk);
          mad_in_valid = 1'b1;
          mad_in_data  = {1'b0, (i == n - 1), bfp_mant(u[i], eu), bfp_mant(v[i], ev)};
          #1;
          while (!mad_in_ready) @(negedge mad_clk);
          @(posedge mad_clk);
        end
        @(negedge mad_clk);
        mad_in_valid = 1'b0;
      end
      begin
        while (got < n / 2) begin
          @(posedge mad_clk);
          if (mad_out_valid && mad_out_ready) begin
            w = mad_out_data;
            tot += longint'({{29{w[34]}}, w[34:0]});
            got++;
          end
        end
      end
    join
    r = real'(tot) / 65536.0 * (2.0 ** (eu + ev));
    check_ip(u, v, r, eu, ev);
    n_mad_ip++;
  endtask

  // complex a^H b (conj_a) or sum a.b (no conjugate), on either co-processor
  task automatic cip(input cplx_t a[], input cplx_t b[], input bit conj_a, input bit use_mac,
                     output cplx_t r);
    real u1[], v1[], u2[], v2[];
    int  n;
    n = a.size();
    u1 = new[2 * n]; v1 = new[2 * n]; u2 = new[2 * n]; v2 = new[2 * n];
    for (int i = 0; i < n; i++) begin
      // real part: ar.br +/- ai.bi ; imaginary part: ar.bi -/+ ai.br
      u1[i] = a[i].re;  v1[i] = b[i].re;
      u1[n + i] = a[i].im;  v1[n + i] = conj_a ? b[i].im : -b[i].im;
      u2[i] = a[i].re;  v2[i] = b[i].im;
      u2[n + i] = a[i].im;  v2[n + i] = conj_a ? -b[i].re : b[i].re;
    end
    if (use_mac) begin
      mac_ip(u1, v1, r.re);
      mac_ip(u2, v2, r.im);
    end else begin
      mad_ip(u1, v1, r.re);
      mad_ip(u2, v2, r.im);
    end
  endtask

  function automatic cplx_t cm(cplx_t a, cplx_t b);
    return '{a.re * b.re - a.im * b.im, a.re * b.im + a.im * b.re};
  endfunction
  function automatic cplx_t cd(cplx_t a, cplx_t b);
    real d;
    d = b.re * b.re + b.im * b.im;
    return '{(a.re * b.re + a.im * b.im) / d, (a.im * b.re - a.re * b.im) / d};
  endfunction
  function automatic real rnd();
    return (real'($urandom_range(0, 2000000)) / 1000000.0) - 1.0;
  endfunction

  initial begin
    cplx_t x[NE][NS], psi[NE][NE], psi_ref[NE][NE], s[NE], wv[NE], wref[NE];
    cplx_t r[NE], p[NE], q[NE], t, aug[NE][NE + 1];
    cplx_t rowa[], rowb[], va[], vb[];
    real   err, nrm, rr, rr_new, alpha, beta, perr;
    mac_in_valid = 0; mac_in_data = 0; mad_in_valid = 0; mad_in_data = 0;
    mac_out_ready = 1; mad_out_ready = 1;
    repeat (3) @(posedge mac_clk);
    mac_rst_n = 1; mad_rst_n = 1;
    repeat (3) @(posedge mac_clk);
    for (int i = 0; i < NE; i++) begin
      for (int k = 0; k < NS; k++) x[i][k] = '{rnd(), rnd()};
      s[i] = '{rnd(), rnd()};
    end
    // covariance estimate Psi_ij = (1/N) sum_k x_ik conj(x_jk) = (1/N) x_j^H x_i
    rowa = new[NS]; rowb = new[NS];
    perr = 0.0;
    for (int i = 0; i < NE; i++)
      for (int j = 0; j < NE; j++) begin
        psi_ref[i][j] = '{0.0, 0.0};
        for (int k = 0; k < NS; k++) begin
          rowa[k] = x[j][k];
          rowb[k] = x[i][k];
          t = cm(x[i][k], '{x[j][k].re, -x[j][k].im});
          psi_ref[i][j].re += t.re / NS;
          psi_ref[i][j].im += t.im / NS;
        end
        cip(rowa, rowb, 1, 1, t);
        psi[i][j] = '{t.re / NS, t.im / NS};
        err = (psi[i][j].re - psi_ref[i][j].re) ** 2 + (psi[i][j].im - psi_ref[i][j].im) ** 2;
        if (err > perr) perr = err;
      end
    checks++;
    if ($sqrt(perr) > 1e-3) begin
      failures++;
      $display("FAIL: covariance error %g", $sqrt(perr));
    end
    // reference: Gaussian elimination in double precision on the exact Psi
    for (int i = 0; i < NE; i++) begin
      for (int j = 0; j < NE; j++) aug[i][j] = psi_ref[i][j];
      aug[i][NE] = s[i];
    end
    for (int c = 0; c < NE; c++)
      for (int i = c + 1; i < NE; i++) begin
        t = cd(aug[i][c], aug[c][c]);
        for (int j = c; j <= NE; j++) begin
          cplx_t u;
          u = cm(t, aug[c][j]);
          aug[i][j].re -= u.re;
          aug[i][j].im -= u.im;
        end
      end
    for (int i = NE - 1; i >= 0; i--) begin
      t = aug[i][NE];
      for (int j = i + 1; j < NE; j++) begin
        cplx_t u;
        u = cm(aug[i][j], wref[j]);
        t.re -= u.re;
        t.im -= u.im;
      end
      wref[i] = cd(t, aug[i][i]);
    end
    // conjugate gradient on the co-processor covariance, inner products on MAD
    va = new[NE]; vb = new[NE];
    for (int i = 0; i < NE; i++) begin
      wv[i] = '{0.0, 0.0};
      r[i] = s[i];
      p[i] = s[i];
    end
    foreach (r[i]) va[i] = r[i];
    cip(va, va, 1, 0, t);
    rr = t.re;
    for (int it = 0; it < NIT && rr > 1e-12; it++) begin
      // q = Psi p, one row at a time
      foreach (p[i]) vb[i] = p[i];
      for (int i = 0; i < NE; i++) begin
        for (int j = 0; j < NE; j++) va[j] = psi[i][j];
        cip(va, vb, 0, 0, q[i]);
      end
      foreach (q[i]) va[i] = q[i];
      cip(vb, va, 1, 0, t);          // p^H Psi p
      alpha = rr / t.re;
      for (int i = 0; i < NE; i++) begin
        wv[i].re += alpha * p[i].re;  wv[i].im += alpha * p[i].im;
        r[i].re  -= alpha * q[i].re;  r[i].im  -= alpha * q[i].im;
      end
      foreach (r[i]) va[i] = r[i];
      cip(va, va, 1, 0, t);
      rr_new = t.re;
      beta = rr_new / rr;
      rr = rr_new;
      for (int i = 0; i < NE; i++) begin
        p[i].re = r[i].re + beta * p[i].re;
        p[i].im = r[i].im + beta * p[i].im;
      end
    end
    err = 0.0;
    nrm = 0.0;
    for (int i = 0; i < NE; i++) begin
      err += (wv[i].re - wref[i].re) ** 2 + (wv[i].im - wref[i].im) ** 2;
      nrm += wref[i].re ** 2 + wref[i].im ** 2;
    end
    $display("weights: relative error %g against the direct solve; %0d MAC and %0d MAD inner products",
             $sqrt(err / nrm), n_mac_ip, n_mad_ip);
    checks++;
    if ($sqrt(err / nrm) > 2e-2) begin
      failures++;
      $display("FAIL: weight error too large");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
