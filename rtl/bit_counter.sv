// bit_counter -- bit count circuit built from T flip-flops connected in series.
//
// Each input pulse toggles stage 0; stage k toggles when a pulse arrives while stages
// 0..k-1 are all 1, which is what a carry rippling through a chain of toggle flip-flops
// does. The result is a W-bit count of the pulses since the last clear. load replaces
// the count by load_val; it is used when the improved architecture hands an accumulated
// sum on to the next stage. clear has priority over load, load over pulse. The count
// wraps at 2**W; users size W so that it never does. Timing: the count reflects a
// pulse one cycle after it.
module bit_counter #(
  parameter int unsigned W = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         pulse,
  input  logic         load,
  input  logic [W-1:0] load_val,
  output logic [W-1:0] count
);

  logic [W-1:0] toggle;  // T input of each stage

  always_comb begin
    logic carry;
    carry = pulse;
    for (int k = 0; k < W; k++) begin
      toggle[k] = carry;
      carry     = carry & count[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      count <= '0;
    else if (clear)  count <= '0;
    else if (load)   count <= load_val;
    else             count <= count ^ toggle;
  end

endmodule
