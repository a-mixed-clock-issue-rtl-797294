// tb_tag_delay: random broadcasts on both lanes must come out exactly
// DELAY cycles later, unchanged; reset must clear the valid bits.
module tb_tag_delay;
  import iq_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  localparam int D = TAG_DELAY;
  logic clk = 0, rst_n = 0;
  tag_bcast_t tin [2], tout [2];
  tag_bcast_t h0 [$], h1 [$];
  int checks = 0, failures = 0;

  tag_delay dut (.clk, .rst_n, .tag_in(tin), .tag_out(tout));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tin[0] = '1; tin[1] = '1;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (tout[0].valid || tout[1].valid) failures++;
    rst_n = 1;
    for (int i = 0; i < D; i++) begin h0.push_back('0); h1.push_back('0); end
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      tin[0] = tag_bcast_t'($urandom);
      tin[1] = tag_bcast_t'($urandom);
      h0.push_back(tin[0]); h1.push_back(tin[1]);
      @(posedge clk); #1;
      // presented in this cycle index c, due out in cycle c+D; after the
      // edge we are in cycle c+1, so the value out now is the one pushed
      // D-1 entries before the newest
      checks++;
      if (tout[0] !== h0[$size(h0)-D] || tout[1] !== h1[$size(h1)-D]) begin
        failures++;
        $display("cycle %0d: out %h %h", c, tout[0], tout[1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
