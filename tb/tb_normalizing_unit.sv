// tb_normalizing_unit: random partial sums (biased towards the renormalising
// range) and products; checks the aligned product, the renormalised sum and
// exponent, the zero start when fb_use is low, exponent saturation and the
// norm_evt flag, one cycle after the inputs.
module tb_normalizing_unit;
  import tb_stap_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        a_sign, fb_use, a_sign_q, norm_evt;
  logic [15:0] a_mag, a_mag_q;
  logic [19:0] fb_val, b_q;
  logic [5:0]  fb_exp, exp_q;

  normalizing_unit dut (.clk, .rst_n, .a_sign, .a_mag, .fb_use, .fb_val, .fb_exp,
                        .a_sign_q, .a_mag_q, .b_q, .exp_q, .norm_evt);

  int checks = 0, failures = 0, n_shift = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sb, eb;
    int     ee, sh;
    longint unsigned ea;
    a_sign = 0; a_mag = 0; fb_use = 0; fb_val = 0; fb_exp = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      a_sign = 1'($urandom);
      a_mag  = 16'($urandom);
      fb_use = ($urandom_range(0, 7) != 0);
      fb_val = 20'($urandom);
      fb_exp = (i % 50 == 7) ? 6'h3f : 6'($urandom_range(0, 20));
      // independent expectation
      sb = fb_use ? sext(64'(fb_val), 20) : 0;
      ee = fb_use ? int'(fb_exp) : 0;
      sh = (sb >= 262144 || sb < -262144) && ee != 63;
      if (sh) begin
        sb = sb >>> 1;
        ee = ee + 1;
        n_shift++;
      end
      ea = (ee >= 16) ? 0 : (64'(a_mag) >> ee);
      @(posedge clk);
      #1;
      checks++;
      if (a_sign_q !== a_sign || 64'(a_mag_q) !== ea || sext(64'(b_q), 20) != sb ||
          int'(exp_q) != ee || norm_evt !== 1'(sh)) begin
        failures++;
        $display("FAIL: use%0b fb %h e%0d -> b %h e%0d a %h (want %0d e%0d a %h)",
                 fb_use, fb_val, fb_exp, b_q, exp_q, a_mag_q, sb, ee, ea);
      end
    end
    if (n_shift == 0) begin
      failures++;
      $display("FAIL: no renormalising shift exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
