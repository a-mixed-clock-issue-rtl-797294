// tb_sync2: checks that every bit of the synchronizer reaches q exactly
// STAGES rising edges after it was presented, that bits stay independent,
// and that reset clears all stages.
module tb_sync2;
  timeunit 1ns; timeprecision 1ps;

  localparam int W = 8;
  localparam int S = 2;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] d, q;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0;

  sync2 #(.WIDTH(W), .STAGES(S)) dut (.clk, .rst_n, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '1;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("reset did not clear: %h", q); end
    rst_n = 1;
    for (int i = 0; i < S; i++) hist.push_back('0);
    for (int c = 0; c < 300; c++) begin
      @(negedge clk);
      d = W'($urandom);
      @(posedge clk);
      hist.push_back(d);
      #1;
      // after this edge q holds the value presented S edges ago
      checks++;
      if (q !== hist[$size(hist)-1-(S-1)]) begin
        failures++;
        $display("cycle %0d: q=%h expected %h", c, q, hist[$size(hist)-1-(S-1)]);
      end
    end
    // mid-run reset clears everything
    rst_n = 0; #1;
    checks++;
    if (q !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
