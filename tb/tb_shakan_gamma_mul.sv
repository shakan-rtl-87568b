// tb_shakan_gamma_mul: checks the shift-and-sign coefficient multiplier
// against integer multiplication by 4*gamma, for every coefficient code,
// on corner values and random 32-bit features.
module tb_shakan_gamma_mul;
  import shakan_pkg::*;
  import shakan_tb_pkg::*;

  logic signed [FEAT_W-1:0]  x;
  logic        [GCODE_W-1:0] g;
  logic signed [ACC_W-1:0]   y;
  int checks = 0, failures = 0;

  shakan_gamma_mul dut (.x(x), .g(g), .y(y));

  task automatic check_one(input logic signed [FEAT_W-1:0] xv, input logic [2:0] gv);
    longint exp;
    x = xv; g = gv;
    #1;
    exp = longint'(xv) * gamma4(gv);
    checks++;
    if (longint'(y) != exp) begin
      failures++;
      $display("FAIL x=%0d g=%0d y=%0d exp=%0d", xv, gv, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int gv = 0; gv < 8; gv++) begin
      check_one(32'sh7fffffff, 3'(gv));
      check_one(-32'sh80000000, 3'(gv));
      check_one(-32'sd1, 3'(gv));
      check_one(32'sd3, 3'(gv));
      check_one(32'sd0, 3'(gv));
      repeat (200) check_one($urandom, 3'(gv));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
