// tb_stap_coproc_top: end-to-end test of both co-processors in the top, at the
// default sizes, each on its own clock and driven at the same time.
// Multiply-and-accumulate side: vectors of several lengths (shorter than the
// pipe, long ones that force renormalisation, ones with input gaps and with
// the host holding back its reads); the partial sums, scaled by their
// exponents, must add up to the exact inner product (bit-exact for small
// operands, within the truncation bound otherwise).
// Multiply-and-add side: vectors sent as word pairs; every partial sum must be
// exact, and the partial sums must add up to the inner product.
// Mechanisms counted, each must occur: renormalisation, gap (zero) injection,
// start with empty feedback, drain of S partial sums, admission stall (MAC);
// operand-set assembly, admission stall on a full output buffer (MAD).
module tb_stap_coproc_top;
  import tb_stap_ref_pkg::*;

  localparam int S = 7;

  logic mac_clk = 1'b0, mad_clk = 1'b0, mac_rst_n = 1'b0, mad_rst_n = 1'b0;
  always #5 mac_clk = ~mac_clk;
  always #3 mad_clk = ~mad_clk;

  logic        mac_in_valid, mac_in_ready, mac_out_valid, mac_out_ready, mac_norm_evt;
  logic [35:0] mac_in_data, mac_out_data;
  logic        mad_in_valid, mad_in_ready, mad_out_valid, mad_out_ready, mad_set_evt;
  logic [35:0] mad_in_data, mad_out_data;

  stap_coproc_top dut (.*);

  int checks = 0, failures = 0;
  int n_renorm = 0, n_gapinj = 0, n_drain = 0, n_mac_stall = 0, n_short = 0;
  int n_sets = 0, n_mad_stall = 0;
  bit mac_done = 0, mad_done = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- multiply-and-accumulate side ----------------
  logic [35:0] mac_got[$];
  bit mac_gaps, mac_hold;

  always @(posedge mac_clk) begin
    if (mac_rst_n) begin
      if (mac_norm_evt) n_renorm++;
      if (dut.u_mac.u_acc.inject && !dut.u_mac.u_acc.take_prod && !dut.u_mac.u_acc.tag_in.emit)
        n_gapinj++;
      if (dut.u_mac.ib_valid && !dut.u_mac.ib_ready) n_mac_stall++;
      if (mac_out_valid && mac_out_ready) begin
        mac_got.push_back(mac_out_data);
        if (mac_out_data[35]) n_drain++;
      end
    end
  end
  always @(negedge mac_clk) mac_out_ready <= !mac_hold && ($urandom_range(0, 3) != 0);

  task automatic mac_vec(int n, int magmax, bit exact, bit wait_done);
    bit xs, ys;
    longint unsigned xm, ym;
    longint ref_exact;
    real    ref_real;
    ref_exact = 0;
    ref_real  = 0.0;
    if (n < S) n_short++;
    for (int i = 0; i < n; i++) begin
      xs = 1'($urandom); ys = 1'($urandom);
      xm = longint'($urandom_range(0, magmax));
      ym = longint'($urandom_range(0, magmax));
      ref_exact += (xs ^ ys) ? -longint'(pmag(xm, ym)) : longint'(pmag(xm, ym));
      ref_real  += ((xs ^ ys) ? -1.0 : 1.0) * real'(xm) * real'(ym) / 65536.0;
      @(negedge mac_clk);
      if (mac_gaps) begin
        mac_in_valid = 1'b0;
        repeat ($urandom_range(0, 2)) @(negedge mac_clk);
      end
      mac_in_valid = 1'b1;
      mac_in_data  = {1'b0, (i == n - 1), xs, 16'(xm), ys, 16'(ym)};
      #1;
      while (!mac_in_ready) @(negedge mac_clk);
      @(posedge mac_clk);
    end
    @(negedge mac_clk);
    mac_in_valid = 1'b0;
    mac_pending.push_back('{n, exact, ref_exact, ref_real});
    if (wait_done) while (mac_pending.size() != 0) @(negedge mac_clk);
  endtask

  typedef struct { int n; bit exact; longint ref_exact; real ref_real; } mac_exp_t;
  mac_exp_t mac_pending[$];

  initial begin : mac_checker
    mac_exp_t x;
    longint isum;
    real    res, tol;
    int     emax, e;
    longint v;
    forever begin
      @(negedge mac_clk);
      if (mac_got.size() >= S && mac_pending.size() != 0) begin
        x = mac_pending.pop_front();
        isum = 0; res = 0.0; emax = 0;
        for (int j = 0; j < S; j++) begin
          e = int'(mac_got[0][31:26]);
          v = sext(64'(mac_got[0][25:0]), 26);
          check(mac_got[0][35] == (j == S - 1), "MAC last flag");
          if (e > emax) emax = e;
          isum += v <<< e;
          res  += real'(v) * (2.0 ** e);
          void'(mac_got.pop_front());
        end
        if (x.exact) check(isum == x.ref_exact, $sformatf("MAC n=%0d sum %0d expected %0d",
                                                         x.n, isum, x.ref_exact));
        else begin
          tol = real'(2 * x.n + 2 * S) * (2.0 ** emax);
          check(res - x.ref_real <= tol && x.ref_real - res <= tol,
                $sformatf("MAC n=%0d result %f expected %f", x.n, res, x.ref_real));
        end
      end
    end
  end

  initial begin : mac_driver
    mac_in_valid = 0; mac_in_data = 0; mac_gaps = 0; mac_hold = 0;
    repeat (3) @(posedge mac_clk);
    mac_rst_n = 1'b1;
    mac_vec(3, 65535, 0, 1);
    mac_vec(100, 1023, 1, 1);
    mac_vec(2000, 65535, 0, 1);
    mac_gaps = 1;
    mac_vec(60, 1023, 1, 1);
    mac_vec(300, 65535, 0, 1);
    mac_gaps = 0;
    mac_hold = 1;
    fork begin repeat (200) @(negedge mac_clk); mac_hold = 0; end join_none
    for (int t = 0; t < 4; t++) mac_vec(16, 65535, 0, 0);
    while (mac_pending.size() != 0) @(negedge mac_clk);
    mac_vec(512, 65535, 0, 1);
    mac_done = 1;
  end

  // ---------------- multiply-and-add side ----------------
  typedef struct { longint s; bit l; } mad_exp_t;
  mad_exp_t mad_q[$];
  longint mad_tot_ref, mad_tot_got;
  bit mad_hold;

  always @(posedge mad_clk) begin
    if (mad_rst_n) begin
      if (mad_set_evt) n_sets++;
      if (dut.u_mad.ib_valid && !dut.u_mad.ib_ready) n_mad_stall++;
      if (mad_out_valid && mad_out_ready) begin
        if (mad_q.size() == 0) check(0, "MAD unexpected result");
        else begin
          check(sext(64'(mad_out_data[34:0]), 35) == mad_q[0].s && mad_out_data[35] == mad_q[0].l,
                $sformatf("MAD result %0d expected %0d", sext(64'(mad_out_data[34:0]), 35), mad_q[0].s));
          mad_tot_got += sext(64'(mad_out_data[34:0]), 35);
          void'(mad_q.pop_front());
        end
      end
    end
  end
  always @(negedge mad_clk) mad_out_ready <= !mad_hold && ($urandom_range(0, 7) != 0);

  task automatic mad_vec(int n);
    bit xs, ys;
    longint unsigned xm, ym;
    longint acc, p;
    mad_tot_ref = 0;
    mad_tot_got = 0;
    for (int i = 0; i < n; i++) begin
      xs = 1'($urandom); ys = 1'($urandom);
      xm = longint'($urandom_range(0, 65535));
      ym = longint'($urandom_range(0, 65535));
      p  = (xs ^ ys) ? -longint'(pmag(xm, ym)) : longint'(pmag(xm, ym));
      mad_tot_ref += p;
      if (i % 2 == 0) acc = p;
      else mad_q.push_back('{acc + p, i == n - 1});
      @(negedge mad_clk);
      mad_in_valid = 1'b1;
      mad_in_data  = {1'b0, (i == n - 1), xs, 16'(xm), ys, 16'(ym)};
      #1;
      while (!mad_in_ready) @(negedge mad_clk);
      @(posedge mad_clk);
    end
    @(negedge mad_clk);
    mad_in_valid = 1'b0;
    while (mad_q.size() != 0) @(negedge mad_clk);
    check(mad_tot_got == mad_tot_ref, "MAD inner product");
  endtask

  initial begin : mad_driver
    mad_in_valid = 0; mad_in_data = 0; mad_hold = 0;
    repeat (3) @(posedge mad_clk);
    mad_rst_n = 1'b1;
    mad_vec(2);
    mad_vec(256);
    mad_hold = 1;
    fork begin repeat (300) @(negedge mad_clk); mad_hold = 0; end join_none
    mad_vec(400);
    mad_vec(2000);
    mad_done = 1;
  end

  initial begin
    wait (mac_done && mad_done);
    repeat (10) @(posedge mac_clk);
    check(n_renorm > 0,    "renormalisation never happened");
    check(n_gapinj > 0,    "gap injection never happened");
    check(n_short > 0,     "no vector shorter than the pipe");
    check(n_drain == 10,   $sformatf("%0d MAC result sets", n_drain));
    check(n_mac_stall > 0, "MAC admission stall never happened");
    check(n_sets == (2 + 256 + 400 + 2000) / 2, $sformatf("%0d MAD operand sets", n_sets));
    check(n_mad_stall > 0, "MAD admission stall never happened");
    $display("MAC: renormalisations %0d, gap injections %0d, short vectors %0d, result sets %0d, stall cycles %0d",
             n_renorm, n_gapinj, n_short, n_drain, n_mac_stall);
    $display("MAD: operand sets %0d, stall cycles %0d", n_sets, n_mad_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
