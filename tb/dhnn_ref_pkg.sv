// dhnn_ref_pkg -- reference model of the discrete Hopfield network, for testbenches.
//
// Works the textbook way, independently of the hardware's pattern-based shortcut: it
// builds the weight matrix w_ij = sum_u x_i^u x_j^u in integers (+-1 values) and
// computes h_i = sum_j w_ij y_j with y_i taken as -1 (the hardware resets y_i before
// computing). y_i becomes 1 when h_i >= 0, else 0. Sizes are fixed at the defaults:
// 8 neurons, 2 patterns.
package dhnn_ref_pkg;
  localparam int RN = 8, RM = 2;

  function automatic int pm(input logic b);
    return b ? 1 : -1;
  endfunction

  function automatic int h_of(input logic [RN-1:0] x [RM], input logic [RN-1:0] y,
                              input int i);
    int w, h;
    h = 0;
    for (int jj = 0; jj < RN; jj++) begin
      w = 0;
      for (int u = 0; u < RM; u++) w += pm(x[u][i]) * pm(x[u][jj]);
      h += w * ((jj == i) ? -1 : pm(y[jj]));
    end
    return h;
  endfunction

  // One update of neuron i.
  function automatic logic [RN-1:0] update(input logic [RN-1:0] x [RM],
                                           input logic [RN-1:0] y, input int i);
    logic [RN-1:0] r;
    r = y;
    r[i] = (h_of(x, y, i) >= 0);
    return r;
  endfunction
endpackage
