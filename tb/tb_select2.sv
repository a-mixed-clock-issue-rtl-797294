// tb_select2: the 32-line selection unit against a reference that scans for
// the two lowest set request bits.  Covers all single- and two-hot patterns
// plus random patterns of every density.
module tb_select2;
  timeunit 1ns; timeprecision 1ps;
  localparam int N = 32;
  logic [N-1:0] req, grant1, grant2, e1, e2;
  int checks = 0, failures = 0;

  select2 #(.N(N), .GROUP(4)) dut (.req, .grant1, .grant2);

  task automatic check();
    int found;
    e1 = '0; e2 = '0; found = 0;
    for (int i = 0; i < N; i++) begin
      if (req[i]) begin
        if (found == 0) e1[i] = 1'b1;
        else if (found == 1) e2[i] = 1'b1;
        found++;
      end
    end
    #1;
    checks++;
    if (grant1 !== e1 || grant2 !== e2) begin
      failures++;
      if (failures < 10)
        $display("req=%h g1=%h g2=%h expected %h %h", req, grant1, grant2, e1, e2);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; check();
    for (int i = 0; i < N; i++)
      for (int j = i; j < N; j++) begin
        req = '0; req[i] = 1'b1; req[j] = 1'b1;
        check();
      end
    for (int k = 0; k < 4000; k++) begin
      req = $urandom();
      case (k % 4)
        0: req = req & $urandom() & $urandom();
        1: req = req & $urandom();
        2: req = req | $urandom();
        default: ;
      endcase
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
