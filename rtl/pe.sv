// pe -- processing element for one storage pattern X^u.
//
// h_i = sum_u x_i^u * (Y . X^u), so every term is x_i^u * x_j^u * y_j. In the
// 0/1 encoding a product of two +-1 values is their XNOR. The PE forms y_j XNOR x_j^u
// (the Y.X term) and feeds it to an NDROC that holds x_i^u: when the Y.X term is 1
// the read pulse leaves on out, when it is 0 on outb, so the pulse on h means the
// term x_i^u*x_j^u*y_j is +1 (truth table: h = x_i XNOR (Y.X)). One term per valid
// cycle. x_i is stored with xi_set when the decoder selects neuron i.
// With ACCUMULATE = 1 (the improved, parallel architecture) the PE also counts its
// own +1 pulses in a T flip-flop bit counter, and acc_out = acc_in + count hands the
// running sum on to the next PE in the chain; with ACCUMULATE = 0 the h pulses go to a
// shared sign function and acc_out just forwards acc_in. The chained addition is
// combinational here; the pass from PE to PE being a plain adder is this design's
// assumption.
module pe #(
  parameter int unsigned N = 8,
  parameter int unsigned ACC_W = 5,
  parameter bit ACCUMULATE = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             xi_set,   // store xi in the NDROC
  input  logic             xi,       // x_i^u of the selected neuron
  input  logic             valid,    // one term this cycle
  input  logic             y_j,
  input  logic             x_j,      // x_j^u
  output logic             h,        // pulse: this term is +1
  input  logic             cnt_clear,
  input  logic [ACC_W-1:0] acc_in,
  output logic [ACC_W-1:0] acc_out
);

  logic yx, p_out, p_outb, xi_state;

  assign yx = ~(y_j ^ x_j);

  ndroc u_xi (
    .clk   (clk),
    .rst_n (rst_n),
    .set   (xi_set &  xi),
    .rst   (xi_set & ~xi),
    .clk_in(valid),
    .out   (p_out),
    .outb  (p_outb),
    .state (xi_state)
  );

  assign h = yx ? p_out : p_outb;

  if (ACCUMULATE) begin : g_acc
    localparam int unsigned CW = $clog2(N + 1);
    logic [CW-1:0] count;
    bit_counter #(.W(CW)) u_t1 (
      .clk, .rst_n, .clear(cnt_clear), .pulse(h), .load(1'b0), .load_val('0), .count
    );
    assign acc_out = acc_in + ACC_W'(count);
  end else begin : g_noacc
    assign acc_out = acc_in;
  end

endmodule
