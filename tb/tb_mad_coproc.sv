// tb_mad_coproc: whole multiply-and-add co-processor, host side.
// Sends vectors as word pairs {a1,b1},{a2,b2} and checks every result word
// against the exact signed sum of the two truncated products, plus the last
// flag and the sum of the N/2 partial sums. Also checks the rate (a gap-free
// stream of N words gives N/2 results, one per two fast cycles) and the
// latency, and that output back-pressure holds the input without losing
// results.
module tb_mad_coproc;
  import tb_stap_ref_pkg::*;

  // last word accepted -> its result word valid, in fast cycles; one more when
  // the set just misses a core cycle
  localparam int LAT = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid, in_ready, out_valid, out_ready, set_evt;
  logic [35:0] in_data, out_data;

  mad_coproc dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid,
                  .out_ready, .out_data, .set_evt);

  int checks = 0, failures = 0, n_stall = 0, n_sets = 0, n_out = 0;
  longint cyc = 0, in_first_c, in_last_c, out_first_c = -1, out_last_c;
  typedef struct { longint s; bit l; } exp_t;
  exp_t q[$];
  bit gaps_in, slow_out, hold_out;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (in_valid && !in_ready) n_stall++;
      if (set_evt) n_sets++;
      if (out_valid && out_ready) begin
        if (out_first_c < 0) out_first_c = cyc;
        out_last_c = cyc;
        n_out++;
        checks++;
        if (q.size() == 0) begin
          failures++;
          $display("FAIL: unexpected result word");
        end else begin
          if (sext(64'(out_data[34:0]), 35) != q[0].s || out_data[35] != q[0].l) begin
            failures++;
            $display("FAIL: result %0d last %0b, expected %0d last %0b",
                     sext(64'(out_data[34:0]), 35), out_data[35], q[0].s, q[0].l);
          end
          void'(q.pop_front());
        end
      end
    end
  end

  always @(negedge clk) out_ready <= hold_out ? 1'b0 : slow_out ? 1'($urandom) : 1'b1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sprod(bit sx, longint unsigned mx, bit sy, longint unsigned my);
    return (sx ^ sy) ? -longint'(pmag(mx, my)) : longint'(pmag(mx, my));
  endfunction

  // n pairs (even); returns after the last word is accepted
  task automatic send_vec(int n, bit wait_done);
    bit              xs, ys;
    longint unsigned xm, ym;
    longint          acc, tot;
    tot = 0;
    for (int i = 0; i < n; i++) begin
      xs = 1'($urandom); ys = 1'($urandom);
      xm = longint'($urandom_range(0, 65535));
      ym = longint'($urandom_range(0, 65535));
      if (i % 2 == 0) acc = sprod(xs, xm, ys, ym);
      else begin
        acc += sprod(xs, xm, ys, ym);
        tot += acc;
        q.push_back('{acc, i == n - 1});
      end
      @(negedge clk);
      if (gaps_in) begin
        in_valid = 1'b0;
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
      in_valid = 1'b1;
      in_data  = {1'b0, (i == n - 1), xs, 16'(xm), ys, 16'(ym)};
      #1;
      while (!in_ready) @(negedge clk);
      if (i == 0) in_first_c = cyc;
      in_last_c = cyc;
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 1'b0;
    if (wait_done) while (q.size() != 0) @(negedge clk);
  endtask

  initial begin
    int n0;
    in_valid = 0; in_data = 0; gaps_in = 0; slow_out = 0; hold_out = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // gap-free vector: rate and latency
    out_first_c = -1;
    n0 = n_out;
    send_vec(64, 1);
    checks++;
    if (in_last_c - in_first_c != 63 || !(out_last_c - in_last_c inside {LAT, LAT + 1}) ||
        out_last_c - out_first_c != 2 * (32 - 1) || n_out - n0 != 32) begin
      failures++;
      $display("FAIL: input %0d cycles, latency %0d, output span %0d, %0d results",
               in_last_c - in_first_c + 1, out_last_c - in_last_c,
               out_last_c - out_first_c, n_out - n0);
    end
    send_vec(2, 1);
    gaps_in = 1;
    send_vec(40, 1);
    slow_out = 1;
    send_vec(100, 1);
    gaps_in = 0;
    for (int t = 0; t < 5; t++) send_vec(2 * $urandom_range(1, 100), 1);
    slow_out = 0;
    hold_out = 1;
    fork
      begin
        repeat (200) @(negedge clk);
        hold_out = 0;
      end
    join_none
    send_vec(120, 1);
    send_vec(1000, 1);
    repeat (5) @(negedge clk);
    checks++;
    if (n_stall == 0 || n_sets != n_out || q.size() != 0) begin
      failures++;
      $display("FAIL: stalls %0d sets %0d results %0d pending %0d", n_stall, n_sets,
               n_out, q.size());
    end
    $display("operand sets %0d, input stall cycles %0d", n_sets, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
