// ndroc -- non-destructive read-out flip-flop with complementary output (NDROC).
//
// The cell stores one bit. A pulse on set stores 1, a pulse on rst stores 0; a pulse on
// clk_in ("read") emits the stored bit on out when it is 1 or on outb when it is 0, and
// leaves the stored bit unchanged. In the pulse logic the cell comes from, pulses are
// events; here every pulse is a signal that is 1 for one cycle of the system clock clk.
// set/rst take effect at the clock edge (set wins when both are given, an assumption),
// so a read in the same cycle sees the old state; out/outb follow clk_in in the same
// cycle (combinational). The cell is used as the node of the decoder tree and as the
// x_i gate of the processing element.
module ndroc (
  input  logic clk,
  input  logic rst_n,   // asynchronous, clears the stored bit
  input  logic set,     // store 1
  input  logic rst,     // store 0
  input  logic clk_in,  // read pulse
  output logic out,     // read pulse when the stored bit is 1
  output logic outb,    // read pulse when the stored bit is 0
  output logic state    // stored bit, for observation
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= 1'b0;
    else if (set)  state <= 1'b1;
    else if (rst)  state <= 1'b0;
  end

  assign out  = clk_in &  state;
  assign outb = clk_in & ~state;

endmodule
