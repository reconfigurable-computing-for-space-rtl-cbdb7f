// tb_mac_accumulator: streams of products into the interleaved accumulator.
// A cycle-accurate model of the S partial sums (each injection i, product or
// gap zero, goes to partial sum i mod S; S drain steps follow) gives the
// expected final values, exponents and slot numbers. Checks: every emitted
// word, that the first result appears S+1 cycles after the last product, that
// vectors shorter than S, gaps and renormalisation all work, and that a new
// vector can follow as soon as the unit is idle.
module tb_mac_accumulator;
  import tb_stap_ref_pkg::*;

  localparam int ACC_W = 20;
  localparam int S = (ACC_W + 3) / 4 + 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        prod_valid, prod_last, prod_sign, idle;
  logic [15:0] prod_mag;
  logic        emit_valid, emit_last, norm_evt;
  logic [2:0]  emit_slot;
  logic [5:0]  emit_exp;
  logic [19:0] emit_sum;

  mac_accumulator dut (.clk, .rst_n, .prod_valid, .prod_last, .prod_sign, .prod_mag,
                       .idle, .emit_valid, .emit_last, .emit_slot, .emit_exp,
                       .emit_sum, .norm_evt);

  int checks = 0, failures = 0, n_norm = 0;
  longint cyc = 0;
  typedef struct { int slot; longint sum; int e; bit last; longint c; } emit_t;
  emit_t got[$];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (norm_evt) n_norm++;
    if (emit_valid)
      got.push_back('{int'(emit_slot), sext(64'(emit_sum), 20), int'(emit_exp),
                     emit_last, cyc});
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_vec(int n, bit gaps, int magmax, bit all_pos);
    bit              inj_v[$];
    bit              inj_s[$];
    longint unsigned inj_m[$];
    longint          sums[S];
    int              exps[S];
    longint          last_c;
    int              k, nin;
    // build the injection sequence
    for (int i = 0; i < n; i++) begin
      if (gaps && i > 0)
        repeat ($urandom_range(0, 2)) begin
          inj_v.push_back(0); inj_s.push_back(0); inj_m.push_back(0);
        end
      inj_v.push_back(1);
      inj_s.push_back(all_pos ? 1'b0 : 1'($urandom));
      inj_m.push_back(longint'($urandom_range(0, magmax)));
    end
    nin = inj_v.size();
    // reference partial sums
    for (int s = 0; s < S; s++) begin sums[s] = 0; exps[s] = 0; end
    for (int i = 0; i < nin; i++) mac_step(sums[i % S], exps[i % S], inj_s[i], inj_m[i]);
    for (int j = 0; j < S; j++) mac_step(sums[(nin + j) % S], exps[(nin + j) % S], 0, 0);
    // drive
    @(negedge clk);
    while (!idle) @(negedge clk);
    got.delete();
    for (int i = 0; i < nin; i++) begin
      prod_valid = inj_v[i];
      prod_sign  = inj_s[i];
      prod_mag   = 16'(inj_m[i]);
      prod_last  = (i == nin - 1);
      last_c     = cyc;
      @(negedge clk);
    end
    prod_valid = 0; prod_last = 0; prod_mag = 0; prod_sign = 0;
    k = 0;
    while (got.size() < S && k < 100) begin @(negedge clk); k++; end
    checks++;
    if (got.size() != S) begin
      failures++;
      $display("FAIL: n=%0d emitted %0d words", n, got.size());
      return;
    end
    checks++;
    if (got[0].c != last_c + S + 1) begin
      failures++;
      $display("FAIL: first result at cycle %0d, last product at %0d", got[0].c, last_c);
    end
    for (int j = 0; j < S; j++) begin
      int s;
      s = (nin + j) % S;
      checks++;
      if (got[j].slot != s || got[j].sum != sums[s] || got[j].e != exps[s] ||
          got[j].last != (j == S - 1) || got[j].c != got[0].c + j) begin
        failures++;
        $display("FAIL: n=%0d word %0d: slot %0d sum %0d e %0d, want slot %0d sum %0d e %0d",
                 n, j, got[j].slot, got[j].sum, got[j].e, s, sums[s], exps[s]);
      end
    end
  endtask

  initial begin
    prod_valid = 0; prod_last = 0; prod_sign = 0; prod_mag = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_vec(40, 0, 65535, 0);
    run_vec(1, 0, 65535, 0);
    run_vec(3, 0, 65535, 0);
    run_vec(7, 0, 65535, 0);
    run_vec(50, 1, 1023, 0);
    run_vec(300, 0, 65535, 1);     // forces renormalisation
    run_vec(200, 1, 65535, 0);
    for (int t = 0; t < 10; t++) run_vec($urandom_range(1, 120), 1'($urandom), 65535, 0);
    checks++;
    if (n_norm == 0) begin
      failures++;
      $display("FAIL: renormalisation never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
