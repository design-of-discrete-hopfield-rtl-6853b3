// sign_function -- sign of h_i from a T flip-flop bit count.
//
// h_i is a sum of TERMS terms of value +1 or -1. The PEs deliver one pulse per +1 term;
// a bit_counter (toggle flip-flops in series) counts them. With c pulses counted,
// h_i = c - (TERMS - c), so sign(h_i) >= 0, which updates y_i to 1, is 2*c >= TERMS.
// In the improved architecture the PEs count their own terms and the chained total is
// loaded into the counter with load/load_val instead of arriving as pulses.
// Timing: sign reflects pulses up to the previous cycle. The threshold comparison
// (rather than reading a single counter stage) is this implementation's choice; it is
// valid for any TERMS.
module sign_function
  import dhnn_pkg::*;
#(
  parameter int unsigned TERMS = 16,
  localparam int unsigned W = $clog2(TERMS + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         pulse,
  input  logic         load,
  input  logic [W-1:0] load_val,
  output logic [W-1:0] count,
  output logic         sign
);

  bit_counter #(.W(W)) u_count (
    .clk, .rst_n, .clear, .pulse, .load, .load_val, .count
  );

  assign sign = sign_of(int'(count), TERMS);

endmodule
