// Self-checking testbench for alu_controller.
//
// Walks all 32 operation codes and checks, against a table written in the
// testbench, the selected unit, the function code of that unit and that
// exactly the selected unit is enabled (none for an unassigned code).
module alu_controller_tb;
  import alu_pkg::*;

  logic      clk = 1'b0;
  alu_op_e   op;
  alu_ctrl_t ctrl;
  int checks = 0, failures = 0;

  alu_controller dut (.op(op), .ctrl(ctrl));

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int code = 0; code < 32; code++) begin
      int unit, fn;
      unit = 3; fn = -1;
      if (code <= 13)                    begin unit = 0; fn = code;      end
      else if (code >= 16 && code <= 18) begin unit = 2; fn = code - 16; end
      else if (code >= 24 && code <= 27) begin unit = 1; fn = code - 24; end
      op = alu_op_e'(code);
      @(posedge clk); #1;
      check($sformatf("unit of %0d", code), int'(ctrl.unit), unit);
      check($sformatf("alu_en of %0d", code),    int'(ctrl.alu_en),    (unit == 0) ? 1 : 0);
      check($sformatf("prefix_en of %0d", code), int'(ctrl.prefix_en), (unit == 1) ? 1 : 0);
      check($sformatf("parse_en of %0d", code),  int'(ctrl.parse_en),  (unit == 2) ? 1 : 0);
      case (unit)
        0: check($sformatf("alu_func of %0d", code),    int'(ctrl.alu_func),    fn);
        1: check($sformatf("prefix_func of %0d", code), int'(ctrl.prefix_func), fn);
        2: check($sformatf("parse_func of %0d", code),  int'(ctrl.parse_func),  fn);
        default: ;
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
