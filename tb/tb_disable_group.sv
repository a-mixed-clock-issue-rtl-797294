// tb_disable_group: all sixteen request patterns of a four-line group;
// dis1 must flag one or more requests and dis2 two or more.
module tb_disable_group;
  timeunit 1ns; timeprecision 1ps;
  logic [3:0] req;
  logic dis1, dis2;
  int checks = 0, failures = 0;

  disable_group #(.N(4)) dut (.req, .dis1, .dis2);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      req = 4'(v);
      #1;
      checks++;
      if (dis1 !== ($countones(req) >= 1) || dis2 !== ($countones(req) >= 2)) begin
        failures++;
        $display("req=%b dis1=%b dis2=%b", req, dis1, dis2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
