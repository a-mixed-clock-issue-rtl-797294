// tb_valid_bit: the Valid bit between a 1.1 GHz dispatch clock and a
// 1.0 GHz issue clock.  Each round writes the entry (only when the dispatch
// side sees it free), checks that the issue side sees it valid exactly two
// issue-clock edges later, reads it out after a random wait, checks that
// the issue side drops it at once and that the dispatch side frees it
// exactly two dispatch-clock edges after the read.
module tb_valid_bit;
  timeunit 1ps; timeprecision 1ps;
  logic clk_w = 0, clk_r = 0, rst_w_n = 0, rst_r_n = 0;
  logic [1:0] we, re;
  logic busy_w, valid_r;
  int checks = 0, failures = 0;
  int edges;

  valid_bit dut (.clk_w, .rst_w_n, .we, .busy_w, .clk_r, .rst_r_n, .re, .valid_r);

  always #455 clk_w = ~clk_w;
  initial begin #137; forever #500 clk_r = ~clk_r; end

  task automatic expect_eq(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("t=%0t %s: got %b expected %b", $time, what, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0;
    #3000;
    expect_eq(busy_w, 0, "busy after reset");
    expect_eq(valid_r, 0, "valid after reset");
    rst_w_n = 1; rst_r_n = 1;
    for (int round = 0; round < 60; round++) begin
      @(negedge clk_w);
      we = 2'(1 << (round % 2));
      @(posedge clk_w); #1;
      we = 0;
      expect_eq(busy_w, 1, "busy right after write");
      expect_eq(valid_r, 0, "valid before synchronizer");
      edges = 0;
      while (!valid_r) begin
        @(posedge clk_r); #1;
        edges++;
        if (edges > 5) break;
      end
      checks++;
      if (edges != 2) begin
        failures++;
        $display("round %0d: valid after %0d issue edges, expected 2", round, edges);
      end
      repeat ($urandom_range(0, 4)) @(posedge clk_r);
      @(negedge clk_r);
      re = (round % 3 == 0) ? 2'b10 : 2'b01;
      @(posedge clk_r); #1;
      re = 0;
      expect_eq(valid_r, 0, "valid cleared by read");
      expect_eq(busy_w, 1, "still busy before read crosses back");
      edges = 0;
      while (busy_w) begin
        @(posedge clk_w); #1;
        edges++;
        if (edges > 5) break;
      end
      checks++;
      if (edges != 2) begin
        failures++;
        $display("round %0d: free after %0d dispatch edges, expected 2", round, edges);
      end
      repeat (3) @(posedge clk_r); #1;
      expect_eq(valid_r, 0, "stays invalid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
