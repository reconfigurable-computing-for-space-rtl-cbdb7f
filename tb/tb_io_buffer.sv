// tb_io_buffer: random writes and reads against a queue model; checks data
// order, full/empty flags and the occupancy count, and that both full and
// empty were reached.
module tb_io_buffer;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int DEPTH = 16;
  logic        wr_valid, wr_ready, rd_valid, rd_ready;
  logic [35:0] wr_data, rd_data;
  logic [4:0]  used;

  io_buffer dut (.clk, .rst_n, .wr_valid, .wr_ready, .wr_data, .rd_valid,
                 .rd_ready, .rd_data, .used);

  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  logic [35:0] q[$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bias;
    bit do_rd, do_wr;
    wr_valid = 0; rd_ready = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      bias     = ((i / 500) % 2) ? 3 : 1;   // alternate filling and draining phases
      wr_valid = ($urandom_range(0, 3) < bias);
      rd_ready = ($urandom_range(0, 3) >= bias);
      wr_data  = {4'($urandom), 32'($urandom)};
      #1;
      checks++;
      if (int'(used) != q.size() || wr_ready !== (q.size() != DEPTH) ||
          rd_valid !== (q.size() != 0) || (q.size() != 0 && rd_data !== q[0])) begin
        failures++;
        $display("FAIL: used %0d model %0d", used, q.size());
      end
      if (q.size() == DEPTH) n_full++;
      if (q.size() == 0) n_empty++;
      do_rd = rd_valid && rd_ready;
      do_wr = wr_valid && wr_ready;
      @(posedge clk);
      if (do_rd) void'(q.pop_front());
      if (do_wr) q.push_back(wr_data);
    end
    if (n_full == 0 || n_empty == 0) begin
      failures++;
      $display("FAIL: full %0d empty %0d never reached", n_full, n_empty);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
