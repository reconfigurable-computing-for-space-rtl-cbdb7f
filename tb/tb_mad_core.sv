// tb_mad_core: random operand sets through the multiply-and-add core with the
// enable toggling every second cycle (as in the co-processor) and, in a second
// phase, at random. Checks every result a1*b1 + a2*b2 (truncated products,
// signed), the last flag, and the latency of 3 + ceil(ADD_W/4) core cycles.
module tb_mad_core;
  import stap_pkg::*;
  import tb_stap_ref_pkg::*;

  localparam int ADD_W = 18;
  localparam int LAT = 3 + (ADD_W + 3) / 4;

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  always #5 clk = ~clk;

  logic          in_valid, in_last, out_valid, out_last;
  operand_pair_t p1, p2;
  logic [17:0]   out_sum;

  mad_core dut (.clk, .rst_n, .ce, .in_valid, .in_last, .p1, .p2, .out_valid,
                .out_last, .out_sum);

  int checks = 0, failures = 0, n_res = 0;
  typedef struct { bit v; bit l; longint s; } exp_t;
  exp_t q[$];

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sprod(sm_operand_t a, sm_operand_t b);
    longint m;
    m = longint'(pmag(64'(a.mag), 64'(b.mag)));
    return (a.sign ^ b.sign) ? -m : m;
  endfunction

  initial begin
    in_valid = 0; in_last = 0; p1 = '0; p2 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 8000; i++) begin
      @(negedge clk);
      ce = (i < 4000) ? 1'(i % 2) : 1'($urandom);
      if (ce) begin
        in_valid = 1'($urandom_range(0, 3) != 0);
        in_last  = 1'($urandom);
        p1 = operand_pair_t'({$urandom, $urandom});
        p2 = operand_pair_t'({$urandom, $urandom});
        if (i < 8) begin   // extremes: largest magnitudes, all sign combinations
          p1.x.mag = 16'hffff; p1.y.mag = 16'hffff;
          p2.x.mag = 16'hffff; p2.y.mag = 16'hffff;
          p1.x.sign = i[1]; p2.x.sign = i[2]; p1.y.sign = 1'b0; p2.y.sign = 1'b0;
        end
        q.push_back('{in_valid, in_last, sprod(p1.x, p1.y) + sprod(p2.x, p2.y)});
        if (q.size() > LAT) begin
          checks++;
          if (out_valid !== q[0].v ||
              (q[0].v && (out_last !== q[0].l || sext(64'(out_sum), ADD_W) != q[0].s))) begin
            failures++;
            $display("FAIL: got v%0b %0d expected v%0b %0d", out_valid,
                     sext(64'(out_sum), ADD_W), q[0].v, q[0].s);
          end
          if (q[0].v) n_res++;
          void'(q.pop_front());
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
