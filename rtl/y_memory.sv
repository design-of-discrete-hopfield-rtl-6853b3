// y_memory -- storage of the retrieve pattern Y (N bits, bit 1 = +1, bit 0 = -1).
//
// The whole pattern is written with load. During an update the decoder's one-hot
// pulse sel addresses one element y_i: with clear it is read out on y_sel and reset to
// 0 in the same step; with set it becomes 1. This matches the update rule: y_i is reset
// first, and the sign result can only raise it back to 1, so a result of 0 leaves the
// reset value. While the PEs stream, y_j at index j is read through a multiplexer.
// Priority at a clock edge: load, then set, then clear. y_sel and y_j are combinational.
module y_memory #(
  parameter int unsigned N = 8,
  localparam int unsigned JW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [N-1:0]  load_data,
  input  logic [N-1:0]  sel,      // one-hot from the decoder, one cycle
  input  logic          clear,    // with sel: read y_i and reset it to 0
  input  logic          set,      // with sel: write 1 to y_i
  output logic          y_sel,    // value of the selected element before this edge
  input  logic [JW-1:0] j,        // stream index
  output logic          y_j,
  output logic [N-1:0]  y         // whole pattern
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      y <= '0;
    else if (load)   y <= load_data;
    else if (set)    y <= y | sel;
    else if (clear)  y <= y & ~sel;
  end

  assign y_sel = |(y & sel);
  assign y_j   = y[j];

endmodule
