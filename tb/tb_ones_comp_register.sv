// tb_ones_comp_register: checks that each lane, plus its registered sign used as
// a carry-in, equals the signed value of the sign-magnitude input (two products
// lane, B_IS_SM = 1), and that a two's complement lane passes unchanged
// (B_IS_SM = 0). One-cycle latency, enable respected.
module tb_ones_comp_register;
  import tb_stap_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  always #5 clk = ~clk;

  logic        a_sign, b_sign;
  logic [15:0] a_mag;
  logic [19:0] b_val;
  logic        sa1, sb1, sa0, sb0;
  logic [19:0] a1, b1, a0, b0;

  ones_comp_register #(.B_IS_SM(1'b1)) dut_sm (.clk, .rst_n, .ce, .a_sign, .a_mag,
    .b_sign, .b_val, .a_sign_q(sa1), .a_q(a1), .b_sign_q(sb1), .b_q(b1));
  ones_comp_register #(.B_IS_SM(1'b0)) dut_tc (.clk, .rst_n, .ce, .a_sign, .a_mag,
    .b_sign, .b_val, .a_sign_q(sa0), .a_q(a0), .b_sign_q(sb0), .b_q(b0));

  int checks = 0, failures = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ea, eb, ga, gb, gb0;
    a_sign = 0; b_sign = 0; a_mag = 0; b_val = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ce     = 1'b1;
      a_sign = 1'($urandom);
      b_sign = 1'($urandom);
      a_mag  = (i == 0) ? 16'h0 : 16'($urandom);
      b_val  = 20'($urandom);
      ea = a_sign ? -longint'(a_mag) : longint'(a_mag);
      eb = b_sign ? -longint'(b_val[15:0]) : longint'(b_val[15:0]);
      @(negedge clk);
      // hold with ce low: outputs must not move
      ce = 1'b0;
      a_mag = ~a_mag;
      @(negedge clk);
      ga  = sext(64'(a1) + 64'(sa1), 20);
      gb  = sext(64'(b1) + 64'(sb1), 20);
      gb0 = sext(64'(b0), 20);
      checks++;
      if (ga != ea || gb != eb || gb0 != sext(64'(b_val), 20) || sb0 != 1'b0 ||
          sext(64'(a0) + 64'(sa0), 20) != ea) begin
        failures++;
        $display("FAIL: a %0d/%0d b %0d/%0d b0 %0d", ga, ea, gb, eb, gb0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
