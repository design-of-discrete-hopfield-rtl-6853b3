// tb_pe -- self-checking test of the processing element. Two instances: one without
// accumulation (h pulse per +1 term, acc_out forwards acc_in) and one with it (own T
// flip-flop counter, acc_out = acc_in + count). Random x_i, Y and X^u; every term is
// checked against the +-1 product x_i * x_j * y_j computed in integers.
module tb_pe;
  localparam int N = 8, AW = 5;
  logic clk = 0, rst_n = 0, xi_set = 0, xi = 0, valid = 0, y_j = 0, x_j = 0, cnt_clear = 0;
  logic h0, h1;
  logic [AW-1:0] acc_in = '0, acc0, acc1;
  int checks = 0, failures = 0;

  pe #(.N(N), .ACC_W(AW), .ACCUMULATE(1'b0)) dut0 (
    .clk, .rst_n, .xi_set, .xi, .valid, .y_j, .x_j, .h(h0), .cnt_clear, .acc_in, .acc_out(acc0));
  pe #(.N(N), .ACC_W(AW), .ACCUMULATE(1'b1)) dut1 (
    .clk, .rst_n, .xi_set, .xi, .valid, .y_j, .x_j, .h(h1), .cnt_clear, .acc_in, .acc_out(acc1));

  always #5 clk = ~clk;

  function automatic int pm(input logic b);
    return b ? 1 : -1;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      logic [N-1:0] yv, xv;
      logic xiv;
      int plus;
      yv = N'($urandom); xv = N'($urandom); xiv = 1'($urandom);
      @(negedge clk); xi_set = 1; xi = xiv; cnt_clear = 1; acc_in = AW'($urandom_range(0, 8));
      @(negedge clk); xi_set = 0; xi = ~xiv; cnt_clear = 0;
      plus = 0;
      for (int jj = 0; jj < N; jj++) begin
        int term;
        valid = 1; y_j = yv[jj]; x_j = xv[jj];
        #1;
        term = pm(xiv) * pm(xv[jj]) * pm(yv[jj]);
        checks++;
        if (h0 !== (term > 0) || h1 !== (term > 0)) begin
          failures++;
          $display("FAIL term: xi=%b x=%b y=%b h=%b/%b", xiv, xv[jj], yv[jj], h0, h1);
        end
        if (term > 0) plus++;
        @(negedge clk);
        // an idle cycle in between must not count
        valid = 0; #1;
        checks++;
        if (h0 !== 1'b0 || h1 !== 1'b0) begin failures++; $display("FAIL idle pulse"); end
        @(negedge clk);
      end
      checks++;
      if (int'(acc1) != int'(acc_in) + plus || acc0 !== acc_in) begin
        failures++;
        $display("FAIL sum: acc1=%0d acc0=%0d expected %0d and %0d", acc1, acc0,
                 int'(acc_in) + plus, acc_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
