// dhnn_pkg -- constants and types shared by the discrete Hopfield network (DHNN).
//
// The network stores M_PATTERNS binary storage patterns of N_NEURONS elements each
// and recovers a retrieve pattern Y by asynchronous single-neuron updates. A value of
// -1 is represented by bit 0 and +1 by bit 1 throughout. The default sizes (two
// patterns of eight elements, arranged as a 4x2 image) are the configuration the
// design was laid out for. The control bundle type is this implementation's own
// choice: it gathers the one-cycle strobes the controller sends to the datapath.
package dhnn_pkg;

  parameter int unsigned N_NEURONS  = 8;  // elements per pattern
  parameter int unsigned M_PATTERNS = 2;  // stored patterns

  // Controller -> datapath strobes. All are one clock cycle wide.
  typedef struct packed {
    logic dec_load;   // load the neuron address into the NDROC decoder tree
    logic dec_read;   // send a read pulse through the decoder tree
    logic y_clear;    // with dec_read: copy y_i to the y_i register and reset y_i to 0
    logic y_set;      // with dec_read: set y_i to 1 (sign result was 1)
    logic pe_set;     // with dec_read: store x_i of every pattern in the PE NDROCs
    logic cnt_clear;  // clear the bit counters
    logic cnt_pass;   // parallel architecture: pass the chained PE sums to the sign counter
  } ctrl_t;

  // Sign of h_i from the number of +1 terms among 'terms' terms:
  // h_i = ones - (terms - ones) >= 0  <=>  2*ones >= terms.
  function automatic logic sign_of(input int unsigned ones, input int unsigned terms);
    return (2 * ones) >= terms;
  endfunction

endpackage
