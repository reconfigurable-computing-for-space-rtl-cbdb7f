// cla_pipe_adder: pipelined adder built from one 4-bit carry-look-ahead slice
// per pipeline stage.
//
// Adds two W-bit words and a carry-in, modulo 2^W. Stage k adds bits
// [4k+3:4k] with a 4-bit carry-look-ahead slice (generate/propagate terms,
// all carries computed in parallel), using the carry registered by stage k-1.
// The upper operand slices are carried down the pipe until their stage, and the
// finished lower sum slices are carried along, so the full sum leaves the last
// stage aligned.
//
// Timing: latency NS = ceil(W/4) enabled cycles, one addition per enabled
// cycle. Registers advance only when ce is high.
//
// The document says the adder pipe has a 4-bit carry-look-ahead adder in each
// stage. The width W and the carry-in port are this design's choices.
module cla_pipe_adder #(
  parameter int unsigned W = 20
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ce,
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] s
);

  localparam int unsigned NS = (W + 3) / 4;
  localparam int unsigned PW = 4 * NS;

  // 4-bit carry-look-ahead slice: returns {cout, sum[3:0]}
  function automatic logic [4:0] cla4(input logic [3:0] a, input logic [3:0] b,
                                      input logic c0);
    logic [3:0] g, p, c;
    logic       gg, pg;
    g    = a & b;
    p    = a ^ b;
    c[0] = c0;
    c[1] = g[0] | (p[0] & c0);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & c0);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & c0);
    gg   = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
    pg   = &p;
    return {gg | (pg & c0), p ^ c};
  endfunction

  logic [PW-1:0] xr [NS];
  logic [PW-1:0] yr [NS];
  logic [PW-1:0] sr [NS];
  logic          cr [NS];

  logic [PW-1:0] xp, yp;
  assign xp = PW'(x);
  assign yp = PW'(y);

  for (genvar k = 0; k < NS; k++) begin : g_stage
    logic [PW-1:0] xi, yi, si;
    logic          ci;
    logic [4:0]    r;
    if (k == 0) begin : g_first
      assign xi = xp;
      assign yi = yp;
      assign si = '0;
      assign ci = cin;
    end else begin : g_next
      assign xi = xr[k-1];
      assign yi = yr[k-1];
      assign si = sr[k-1];
      assign ci = cr[k-1];
    end
    assign r = cla4(xi[4*k +: 4], yi[4*k +: 4], ci);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        xr[k] <= '0;
        yr[k] <= '0;
        sr[k] <= '0;
        cr[k] <= 1'b0;
      end else if (ce) begin
        xr[k] <= xi;
        yr[k] <= yi;
        sr[k] <= si;
        sr[k][4*k +: 4] <= r[3:0];
        cr[k] <= r[4];
      end
    end
  end

  assign s = sr[NS-1][W-1:0];

endmodule
