// tb_mac_coproc: whole multiply-and-accumulate co-processor, host side.
// Sends vector pairs as 36-bit words and collects the S result words of each.
// Checks:
//  - small operands (no renormalisation possible): the sum of the partial sums
//    equals the exact sum of the truncated signed products;
//  - full-range operands: sum of psum * 2^exp is within the truncation bound of
//    the exact inner product, and renormalisation did happen;
//  - one pair accepted per cycle on a gap-free stream (N words in N cycles),
//    and the latency from the last input word to the first result word;
//  - host back-pressure on the output and gaps on the input;
//  - slot numbers and the last flag of every result set.
module tb_mac_coproc;
  import tb_stap_ref_pkg::*;

  localparam int S = 7;
  localparam int LAT = 13;   // last input word accepted -> first result word valid

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid, in_ready, out_valid, out_ready, norm_evt;
  logic [35:0] in_data, out_data;

  mac_coproc dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid,
                  .out_ready, .out_data, .norm_evt);

  int checks = 0, failures = 0, n_norm = 0, n_stall = 0;
  longint cyc = 0;
  longint in_first_c, in_last_c, out_first_c = -1;
  logic [35:0] got[$];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (norm_evt) n_norm++;
    if (in_valid && !in_ready) n_stall++;
    if (rst_n && out_valid && out_ready) begin
      if (out_first_c < 0) out_first_c = cyc;
      got.push_back(out_data);
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit gaps_in, slow_out, hold_out;

  always @(negedge clk) out_ready <= hold_out ? 1'b0 : slow_out ? 1'($urandom) : 1'b1;

  typedef struct { int n; bit exact; longint ref_exact; real ref_real; bit timed; } exp_t;
  exp_t exp_q[$];
  int   n_done = 0;

  task automatic run_vec(int n, int magmax, bit exact, bit wait_done = 1);
    bit              xs[], ys[];
    longint unsigned xm[], ym[];
    longint          ref_exact;
    real             ref_real;
    int              k;
    xs = new[n]; ys = new[n]; xm = new[n]; ym = new[n];
    ref_exact = 0;
    ref_real  = 0.0;
    for (int i = 0; i < n; i++) begin
      xs[i] = 1'($urandom); ys[i] = 1'($urandom);
      xm[i] = longint'($urandom_range(0, magmax));
      ym[i] = longint'($urandom_range(0, magmax));
      ref_exact += (xs[i] ^ ys[i]) ? -longint'(pmag(xm[i], ym[i])) : longint'(pmag(xm[i], ym[i]));
      ref_real  += ((xs[i] ^ ys[i]) ? -1.0 : 1.0) * real'(xm[i]) * real'(ym[i]) / 65536.0;
    end
    exp_q.push_back('{n, exact, ref_exact, ref_real, !gaps_in && !slow_out && wait_done});
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      if (gaps_in) begin
        in_valid = 1'b0;
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      in_valid = 1'b1;
      in_data  = {1'b0, (i == n - 1), xs[i], 16'(xm[i]), ys[i], 16'(ym[i])};
      #1;
      while (!in_ready) @(negedge clk);
      if (i == 0) in_first_c = cyc;
      if (i == n - 1) in_last_c = cyc;
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 1'b0;
    if (wait_done) begin
      k = exp_q.size();
      while (exp_q.size() != 0 && k < 100000) begin @(negedge clk); k++; end
    end
  endtask

  // checker: takes S result words at a time and compares them with the oldest
  // expected vector
  initial begin
    exp_t   x;
    real    res, tol;
    int     emax;
    forever begin
      @(negedge clk);
      if (got.size() >= S && exp_q.size() != 0) begin
        x = exp_q.pop_front();
        n_done++;
        if (x.timed) begin
          checks++;
          if (in_last_c - in_first_c != x.n - 1 || out_first_c - in_last_c != LAT) begin
            failures++;
            $display("FAIL: n=%0d input took %0d cycles, latency %0d", x.n,
                     in_last_c - in_first_c + 1, out_first_c - in_last_c);
          end
        end
        res  = 0.0;
        emax = 0;
        begin
          longint isum;
          bit     seen[S];
          isum = 0;
          for (int j = 0; j < S; j++) seen[j] = 0;
          for (int j = 0; j < S; j++) begin
            int     slot, e;
            longint v;
            slot = int'(got[j][34:32]);
            e    = int'(got[j][31:26]);
            v    = sext(64'(got[j][25:0]), 26);
            checks++;
            if (slot >= S || seen[slot] || got[j][35] != (j == S - 1)) begin
              failures++;
              $display("FAIL: word %0d slot %0d last %0b", j, slot, got[j][35]);
            end
            if (slot < S) seen[slot] = 1;
            if (e > emax) emax = e;
            isum += v <<< e;
            res  += real'(v) * (2.0 ** e);
          end
          checks++;
          if (x.exact) begin
            if (isum != x.ref_exact || emax != 0) begin
              failures++;
              $display("FAIL: n=%0d sum %0d expected %0d", x.n, isum, x.ref_exact);
            end
          end else begin
            tol = real'(2 * x.n + 2 * S) * (2.0 ** emax);
            if (res - x.ref_real > tol || x.ref_real - res > tol) begin
              failures++;
              $display("FAIL: n=%0d result %f expected %f (tol %f)", x.n, res, x.ref_real, tol);
            end
          end
        end
        for (int j = 0; j < S; j++) void'(got.pop_front());
        if (got.size() == 0) out_first_c = -1;
      end
    end
  end

  initial begin
    in_valid = 0; in_data = 0; gaps_in = 0; slow_out = 0; hold_out = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_vec(64, 1023, 1);
    run_vec(5, 65535, 1);
    run_vec(256, 65535, 0);
    gaps_in = 1;
    run_vec(40, 1023, 1);
    slow_out = 1;
    run_vec(100, 65535, 0);
    gaps_in = 0;
    for (int t = 0; t < 6; t++) run_vec($urandom_range(1, 300), 65535, 0);
    slow_out = 0;
    run_vec(1000, 65535, 0);
    // host stops reading: results pile up in the output buffer until input
    // is held back, then the host drains everything
    hold_out = 1;
    fork
      begin
        repeat (300) @(negedge clk);
        hold_out = 0;
      end
    join_none
    for (int t = 0; t < 4; t++) run_vec(20, 65535, 0, 0);
    while (exp_q.size() != 0) @(negedge clk);
    run_vec(30, 1023, 1);
    checks++;
    if (n_done != 17) begin
      failures++;
      $display("FAIL: %0d vectors completed", n_done);
    end
    checks++;
    if (n_norm == 0 || n_stall == 0) begin
      failures++;
      $display("FAIL: renormalisations %0d input stalls %0d", n_norm, n_stall);
    end
    $display("renormalisations %0d, input stall cycles %0d", n_norm, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
