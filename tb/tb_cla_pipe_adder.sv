// tb_cla_pipe_adder: random additions through the pipelined CLA adder, with
// the enable held low at random; checks every sum and the latency of
// ceil(W/4) enabled cycles. Also runs an odd width (W = 18).
module tb_cla_pipe_adder;
  localparam int W  = 20;
  localparam int NS = (W + 3) / 4;
  localparam int W2 = 18;
  localparam int NS2 = (W2 + 3) / 4;

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0]  x, y, s;
  logic          cin;
  logic [W2-1:0] x2, y2, s2;

  cla_pipe_adder #(.W(W))  dut  (.clk, .rst_n, .ce, .x, .y, .cin, .s);
  cla_pipe_adder #(.W(W2)) dut2 (.clk, .rst_n, .ce, .x(x2), .y(y2), .cin, .s(s2));

  int checks = 0, failures = 0;
  logic [W-1:0]  exp_q[$];
  logic [W2-1:0] exp2_q[$];
  int n_en = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0; y = '0; cin = 1'b0; x2 = '0; y2 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // corner cases first, then random
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      ce = (i < 100) ? 1'b1 : ($urandom_range(0, 3) != 0);
      case (i)
        0: begin x = '1; y = '0; cin = 1'b1; end
        1: begin x = '1; y = '1; cin = 1'b1; end
        2: begin x = 20'h0ffff; y = 20'h00001; cin = 1'b0; end
        default: begin x = W'($urandom); y = W'($urandom); cin = 1'($urandom); end
      endcase
      x2 = W2'($urandom); y2 = W2'($urandom);
      if (ce) begin
        exp_q.push_back(x + y + W'(cin));
        exp2_q.push_back(x2 + y2 + W2'(cin));
        n_en++;
        if (n_en > NS) begin
          // sum of the pair entered NS enabled cycles ago is at the output now
          checks++;
          if (s !== exp_q[0]) begin
            failures++;
            $display("FAIL W=%0d: got %h expected %h", W, s, exp_q[0]);
          end
          void'(exp_q.pop_front());
        end
        if (n_en > NS2) begin
          checks++;
          if (s2 !== exp2_q[0]) begin
            failures++;
            $display("FAIL W=%0d: got %h expected %h", W2, s2, exp2_q[0]);
          end
          void'(exp2_q.pop_front());
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
