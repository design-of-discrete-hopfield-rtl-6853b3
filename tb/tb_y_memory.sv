// tb_y_memory -- self-checking test of the retrieve-pattern memory against a software
// copy: whole-pattern load, read-and-reset of a selected element, set of a selected
// element, priorities, and the stream read port.
module tb_y_memory;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, load = 0, clear = 0, set = 0;
  logic [N-1:0] load_data = '0, sel = '0, y;
  logic [2:0] j = '0;
  logic y_sel, y_j;
  logic [N-1:0] model;
  int checks = 0, failures = 0;

  y_memory #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: y=%b model=%b y_sel=%b y_j=%b", what, y, model, y_sel, y_j);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    model = '0;
    for (int k = 0; k < 200; k++) begin
      int op, i;
      op = $urandom_range(0, 3);
      i = $urandom_range(0, N - 1);
      @(negedge clk);
      load = 0; clear = 0; set = 0; sel = '0;
      case (op)
        0: begin load = 1; load_data = N'($urandom); end
        1: begin sel = N'(1 << i); clear = 1; end
        2: begin sel = N'(1 << i); set = 1; end
        default: ;
      endcase
      j = 3'($urandom);
      #1;
      check(y_sel == (op inside {1, 2} ? model[i] : 1'b0), "y_sel before edge");
      check(y_j == model[j], "stream read");
      @(posedge clk); #1;
      case (op)
        0: model = load_data;
        1: model[i] = 1'b0;
        2: model[i] = 1'b1;
        default: ;
      endcase
      check(y == model, "contents");
    end
    // load has priority over set and clear
    @(negedge clk); load = 1; load_data = 8'h0F; sel = 8'h80; set = 1;
    @(negedge clk); load = 0; set = 0; model = 8'h0F; check(y == model, "load priority");
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
