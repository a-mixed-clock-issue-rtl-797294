// tb_grant_cell: a line with n higher-priority requests above it (n = 0, 1,
// 2 or more) must win Grant_1 only for n = 0 and Grant_2 only for n = 1.
module tb_grant_cell;
  timeunit 1ns; timeprecision 1ps;
  logic req, kill1, kill2, grant1, grant2;
  int checks = 0, failures = 0;

  grant_cell dut (.req, .kill1, .kill2, .grant1, .grant2);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 2; r++) begin
      for (int n = 0; n < 3; n++) begin
        req   = r[0];
        kill1 = (n >= 1);
        kill2 = (n >= 2);
        #1;
        checks++;
        if (grant1 !== (r == 1 && n == 0) || grant2 !== (r == 1 && n == 1)) begin
          failures++;
          $display("req=%0d above=%0d g1=%b g2=%b", r, n, grant1, grant2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
