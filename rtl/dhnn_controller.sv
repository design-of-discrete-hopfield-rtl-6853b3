// dhnn_controller -- sequencer of the DHNN update steps.
//
// One update of neuron i:
//   ADDR   load i into the NDROC decoder tree
//   READ   decoder read pulse: y_i goes to the y_i register and is reset to 0 in the
//          Y memory; x_i of every pattern is stored in the PE NDROCs; counters clear
//   STREAM one term per cycle: index j = 0..N-1 is streamed to the PEs. In the
//          sequential architecture (PARALLEL = 0, the one the design was built with)
//          the PEs take turns, pattern after pattern, so this lasts M*N cycles; in the
//          improved architecture (PARALLEL = 1) all PEs work at once for N cycles
//   PASS   (PARALLEL only) the chained PE sums are handed to the sign counter
//   WRITE  decoder read pulse again: y_i is set to 1 if the sign result is 1, otherwise
//          it keeps its reset value 0; the y_i register tells whether y_i changed
// With run_mode = 0 a start performs one update of neuron start_idx. With run_mode = 1
// updates repeat, neuron after neuron (i+1 mod N), until N updates in a row change
// nothing, i.e. the pattern is a fixed point (y'_i = y_i for all i); converged is then
// set. Neurons are visited in order rather than at random: a choice of this design.
// done is a one-cycle pulse in the WRITE cycle of the last update; busy is high from
// the cycle after start until done. update_count counts updates since start.
module dhnn_controller
  import dhnn_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned M = 2,
  parameter bit PARALLEL = 1'b0,
  localparam int unsigned JW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned UW = (M > 1) ? $clog2(M) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          run_mode,   // 0: one update, 1: until stable
  input  logic [JW-1:0] start_idx,
  input  logic          sign,       // from the sign function
  input  logic          differs,    // from the y_i register, against sign
  output ctrl_t         ctrl,
  output logic [JW-1:0] addr,       // neuron being updated
  output logic [JW-1:0] j,          // stream index
  output logic [M-1:0]  pe_valid,   // PE u takes a term this cycle
  output logic          busy,
  output logic          done,
  output logic          converged,
  output logic          last_changed,
  output logic [15:0]   update_count
);

  typedef enum logic [2:0] {S_IDLE, S_ADDR, S_READ, S_STREAM, S_PASS, S_WRITE} state_t;

  state_t        state;
  logic          mode_q;
  logic [UW-1:0] u;
  logic [JW:0]   stable;   // consecutive updates without change

  logic last_term, finish;
  assign last_term = (int'(j) == N - 1) && (PARALLEL || int'(u) == M - 1);
  assign finish    = !mode_q || (!differs && int'(stable) + 1 >= N);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      mode_q       <= 1'b0;
      addr         <= '0;
      j            <= '0;
      u            <= '0;
      stable       <= '0;
      converged    <= 1'b0;
      last_changed <= 1'b0;
      update_count <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state        <= S_ADDR;
          mode_q       <= run_mode;
          addr         <= start_idx;
          stable       <= '0;
          converged    <= 1'b0;
          update_count <= '0;
        end
        S_ADDR: state <= S_READ;
        S_READ: begin
          state <= S_STREAM;
          j     <= '0;
          u     <= '0;
        end
        S_STREAM: begin
          if (last_term) begin
            j     <= '0;
            u     <= '0;
            state <= PARALLEL ? S_PASS : S_WRITE;
          end else if (int'(j) == N - 1) begin
            j <= '0;
            u <= u + 1'b1;
          end else begin
            j <= j + 1'b1;
          end
        end
        S_PASS: state <= S_WRITE;
        S_WRITE: begin
          update_count <= update_count + 1'b1;
          last_changed <= differs;
          stable       <= differs ? '0 : stable + 1'b1;
          if (finish) begin
            state     <= S_IDLE;
            converged <= mode_q;
          end else begin
            state <= S_ADDR;
            addr  <= (int'(addr) == N - 1) ? '0 : addr + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    ctrl           = '0;
    ctrl.dec_load  = (state == S_ADDR);
    ctrl.dec_read  = (state == S_READ) || (state == S_WRITE);
    ctrl.y_clear   = (state == S_READ);
    ctrl.pe_set    = (state == S_READ);
    ctrl.cnt_clear = (state == S_READ);
    ctrl.y_set     = (state == S_WRITE) && sign;
    ctrl.cnt_pass  = (state == S_PASS);
    pe_valid       = '0;
    if (state == S_STREAM) begin
      if (PARALLEL) pe_valid = '1;
      else          pe_valid[u] = 1'b1;
    end
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_WRITE) && finish;

endmodule
