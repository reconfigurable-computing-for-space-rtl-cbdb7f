// tb_output_register: checks the captured word layout and the one-cycle
// valid of the output register.
module tb_output_register;
  import tb_stap_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid, in_last, out_valid;
  logic [2:0]  in_slot;
  logic [5:0]  in_exp;
  logic [19:0] in_sum;
  logic [35:0] out_word;

  output_register dut (.clk, .rst_n, .in_valid, .in_last, .in_slot, .in_exp,
                       .in_sum, .out_valid, .out_word);

  int checks = 0, failures = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [35:0] prev;
    in_valid = 0; in_last = 0; in_slot = 0; in_exp = 0; in_sum = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    prev = '0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_valid = 1'($urandom);
      in_last  = 1'($urandom);
      in_slot  = 3'($urandom);
      in_exp   = 6'($urandom);
      in_sum   = 20'($urandom);
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== in_valid) begin
        failures++;
        $display("FAIL: valid");
      end
      if (in_valid) begin
        checks++;
        if (out_word[35] !== in_last || out_word[34:32] !== in_slot ||
            out_word[31:26] !== in_exp || sext(64'(out_word[25:0]), 26) != sext(64'(in_sum), 20)) begin
          failures++;
          $display("FAIL: word %h", out_word);
        end
        prev = out_word;
      end else begin
        checks++;
        if (out_word !== prev) begin
          failures++;
          $display("FAIL: word changed without valid");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
