// x_memory -- storage of the M storage patterns X^1..X^M, N bits each.
//
// Instead of an M x N^2 weight matrix only the patterns themselves are kept (M x N
// bits), because h_i = sum_u x_i^u (Y . X^u) needs nothing else. A pattern is written
// whole with we/wpat/wdata. Two read ports: x_sel[u] is x_i^u of the neuron picked by
// the decoder's one-hot sel (it is stored into the PE NDROCs), and x_j[u] is x_j^u at
// the stream index j. Both reads are combinational; writes take effect at the edge.
module x_memory #(
  parameter int unsigned N = 8,
  parameter int unsigned M = 2,
  localparam int unsigned JW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned UW = (M > 1) ? $clog2(M) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [UW-1:0] wpat,
  input  logic [N-1:0]  wdata,
  input  logic [N-1:0]  sel,
  output logic [M-1:0]  x_sel,
  input  logic [JW-1:0] j,
  output logic [M-1:0]  x_j
);

  logic [N-1:0] pat [M];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int u = 0; u < M; u++) pat[u] <= '0;
    end else if (we && int'(wpat) < M) begin
      pat[wpat] <= wdata;
    end
  end

  always_comb begin
    for (int u = 0; u < M; u++) begin
      x_sel[u] = |(pat[u] & sel);
      x_j[u]   = pat[u][j];
    end
  end

endmodule
