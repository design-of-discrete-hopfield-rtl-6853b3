// tb_yi_register -- self-checking test of the y_i register: capture on load, hold
// otherwise, and the old/new comparison.
module tb_yi_register;
  logic clk = 0, rst_n = 0, load = 0, d = 0, new_val = 0, q, differs;
  logic model;
  int checks = 0, failures = 0;

  yi_register dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    model = 0;
    for (int k = 0; k < 100; k++) begin
      @(negedge clk);
      load = 1'($urandom); d = 1'($urandom); new_val = 1'($urandom);
      #1;
      checks++;
      if (q !== model || differs !== (model ^ new_val)) begin
        failures++;
        $display("FAIL: q=%b differs=%b expected %b %b", q, differs, model, model ^ new_val);
      end
      @(posedge clk);
      if (load) model = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
