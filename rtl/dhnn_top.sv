// dhnn_top -- discrete Hopfield neural network with M storage patterns of N elements.
//
// The network recalls the stored pattern nearest to a retrieve pattern Y by updating
// one neuron at a time: y_i <- sign(h_i), h_i = sum_u x_i^u (Y . X^u). Storing the
// patterns instead of the weight matrix W (w_ij = sum_u x_i^u x_j^u) needs M*N bits
// instead of M*N^2. Values are bits, 1 = +1 and 0 = -1.
// Structure: an NDROC-tree decoder picks neuron i in the Y memory and in the pattern
// memory; y_i is read into the y_i register and reset to 0 (so the self term of h_i
// is taken with y_i = -1); one processing element (PE) per pattern produces the +1
// terms of h_i, one per cycle; the sign function counts them with a T flip-flop
// counter; if 2*count >= M*N (h_i >= 0) the decoder is pulsed again to set y_i to 1.
// PARALLEL = 0 is the architecture the design was built with: the PEs feed the shared
// counter one after another, M*N stream cycles per update. PARALLEL = 1 is the improved
// architecture: every PE counts its own terms in parallel and the sums are chained to
// the sign function, N stream cycles per update (latency divided by M).
// Interface: while idle, x_we writes pattern x_pat, y_we writes the retrieve pattern.
// start (one cycle) begins one update of neuron start_idx (run_mode = 0) or updates
// neurons start_idx, start_idx+1, ... until N updates in a row change nothing
// (run_mode = 1, converged is then set). done pulses when it ends; y_out is the pattern.
// Latency of one update: 3 + M*N cycles from start to done (PARALLEL = 0), 4 + N
// cycles (PARALLEL = 1); each further update in run mode takes the same.
module dhnn_top
  import dhnn_pkg::*;
#(
  parameter int unsigned N = dhnn_pkg::N_NEURONS,
  parameter int unsigned M = dhnn_pkg::M_PATTERNS,
  parameter bit PARALLEL = 1'b0,
  localparam int unsigned JW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned UW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned TERMS = M * N,
  localparam int unsigned AW = $clog2(TERMS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          x_we,
  input  logic [UW-1:0] x_pat,
  input  logic [N-1:0]  x_data,
  input  logic          y_we,
  input  logic [N-1:0]  y_data,
  input  logic          start,
  input  logic          run_mode,
  input  logic [JW-1:0] start_idx,
  output logic          busy,
  output logic          done,
  output logic          converged,
  output logic          last_changed,
  output logic [15:0]   update_count,
  output logic [N-1:0]  y_out
);

  ctrl_t         ctrl;
  logic [JW-1:0] addr, j;
  logic [M-1:0]  pe_valid, x_sel, x_j, h;
  logic [N-1:0]  sel;
  logic          y_sel, y_j, sign, differs, yi_q;
  logic [AW-1:0] acc [M+1];
  logic [AW-1:0] count;

  dhnn_controller #(.N(N), .M(M), .PARALLEL(PARALLEL)) u_ctrl (
    .clk, .rst_n, .start, .run_mode, .start_idx, .sign, .differs,
    .ctrl, .addr, .j, .pe_valid, .busy, .done, .converged, .last_changed, .update_count
  );

  ndroc_decoder #(.N(N)) u_dec (
    .clk, .rst_n, .load(ctrl.dec_load), .addr, .read(ctrl.dec_read), .sel
  );

  y_memory #(.N(N)) u_ymem (
    .clk, .rst_n, .load(y_we), .load_data(y_data), .sel,
    .clear(ctrl.y_clear), .set(ctrl.y_set), .y_sel, .j, .y_j, .y(y_out)
  );

  yi_register u_yi (
    .clk, .rst_n, .load(ctrl.y_clear), .d(y_sel), .new_val(sign), .q(yi_q), .differs
  );

  x_memory #(.N(N), .M(M)) u_xmem (
    .clk, .rst_n, .we(x_we), .wpat(x_pat), .wdata(x_data), .sel, .x_sel, .j, .x_j
  );

  assign acc[0] = '0;
  for (genvar u = 0; u < M; u++) begin : g_pe
    pe #(.N(N), .ACC_W(AW), .ACCUMULATE(PARALLEL)) u_pe (
      .clk, .rst_n,
      .xi_set   (ctrl.pe_set),
      .xi       (x_sel[u]),
      .valid    (pe_valid[u]),
      .y_j      (y_j),
      .x_j      (x_j[u]),
      .h        (h[u]),
      .cnt_clear(ctrl.cnt_clear),
      .acc_in   (acc[u]),
      .acc_out  (acc[u+1])
    );
  end

  sign_function #(.TERMS(TERMS)) u_sign (
    .clk, .rst_n,
    .clear   (ctrl.cnt_clear),
    .pulse   (PARALLEL ? 1'b0 : |h),
    .load    (ctrl.cnt_pass),
    .load_val(acc[M]),
    .count   (count),
    .sign    (sign)
  );

  // Only one PE may be active per cycle when they share the counter.
  a_one_pe: assert property (@(posedge clk) disable iff (!rst_n)
    !PARALLEL |-> $onehot0(pe_valid));
  // Pattern writes are only allowed while idle.
  a_idle_write: assert property (@(posedge clk) disable iff (!rst_n)
    (x_we || y_we) |-> !busy);

endmodule
