// yi_register -- holds the old value of the neuron being updated.
//
// When the decoder reads y_i out of the Y memory (and resets it there), the value is
// captured here with load. After the sign function has produced the new value, differs
// tells whether the update changed y_i; the controller uses this to detect that the
// pattern has become stable. Capturing at the clock edge, differs combinational.
module yi_register (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  logic d,
  input  logic new_val,  // new value of y_i, to compare with
  output logic q,
  output logic differs
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= 1'b0;
    else if (load) q <= d;
  end

  assign differs = q ^ new_val;

endmodule
