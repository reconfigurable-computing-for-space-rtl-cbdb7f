// tb_sm_multiplier: random and corner-case sign-magnitude products; checks sign,
// truncated magnitude, tag, and the two-cycle latency, with enable gaps.
module tb_sm_multiplier;
  import tb_stap_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid, a_sign, b_sign, out_valid, p_sign;
  logic [0:0]  in_tag, out_tag;
  logic [15:0] a_mag, b_mag, p_mag;

  sm_multiplier dut (.clk, .rst_n, .ce, .in_valid, .in_tag, .a_sign, .a_mag,
                     .b_sign, .b_mag, .out_valid, .out_tag, .p_sign, .p_mag);

  int checks = 0, failures = 0;
  typedef struct { bit v; bit t; bit s; int unsigned m; } exp_t;
  exp_t q[$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_tag = 0; a_sign = 0; b_sign = 0; a_mag = 0; b_mag = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      ce = (i < 50) ? 1'b1 : ($urandom_range(0, 2) != 0);
      in_valid = 1'($urandom);
      in_tag   = 1'($urandom);
      a_sign   = 1'($urandom);
      b_sign   = 1'($urandom);
      a_mag    = (i == 0) ? 16'hffff : (i == 1) ? 16'h8000 : 16'($urandom);
      b_mag    = (i == 0) ? 16'hffff : (i == 1) ? 16'h0002 : 16'($urandom);
      if (ce) begin
        q.push_back('{in_valid, in_tag[0], a_sign ^ b_sign,
                      int'(pmag(a_mag, b_mag))});
        if (q.size() > 2) begin
          checks++;
          if (out_valid !== q[0].v || out_tag[0] !== q[0].t || p_sign !== q[0].s ||
              32'(p_mag) !== q[0].m) begin
            failures++;
            $display("FAIL: got v%0b s%0b %h expected v%0b s%0b %h", out_valid,
                     p_sign, p_mag, q[0].v, q[0].s, q[0].m);
          end
          void'(q.pop_front());
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
