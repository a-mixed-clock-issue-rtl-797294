// tb_avail_fifo: the testbench plays the issue queue.  It takes up to two
// free entries per cycle from the FIFO head, marks them busy, and frees
// busy entries at random.  Checks: after reset the FIFO hands out 0, 1, 2,
// ... in order; a handed-out index is never one that is still busy or was
// handed out twice; the count never exceeds the number of idle entries and
// settles to exactly that number once frees stop; freed entries come back
// lowest index first.
module tb_avail_fifo;
  import iq_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  localparam int D = IQ_DEPTH;
  logic clk = 0, rst_n = 0;
  logic [D-1:0] busy;
  logic [1:0] pop;
  logic [4:0] head [2];
  logic [5:0] count;
  int checks = 0, failures = 0;
  int next_expected = 0;

  avail_fifo dut (.clk, .rst_n, .busy, .pop, .head, .count);

  always #5 clk = ~clk;

  task automatic fail(string m);
    failures++;
    if (failures < 10) $display("t=%0t %s", $time, m);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    busy = '0; pop = 0;
    #12 rst_n = 1;
    checks++; if (count != 6'(D)) fail("count after reset");
    for (int c = 0; c < 3000; c++) begin
      int n;
      @(negedge clk);
      n = (c > 2800) ? 0 : $urandom_range(0, 2);
      if (n > int'(count)) n = int'(count);
      pop = 2'(n);
      for (int i = 0; i < n; i++) begin
        checks++;
        if (busy[head[i]]) fail($sformatf("head %0d is busy", head[i]));
        if (i == 1 && head[0] == head[1]) fail("two heads equal");
        if (next_expected < D) begin
          checks++;
          if (int'(head[i]) != next_expected) fail($sformatf("initial order: %0d", head[i]));
          next_expected++;
        end
      end
      checks++;
      if (int'(count) > D - $countones(busy)) fail($sformatf("count %0d above idle entries %0d", count, D - $countones(busy)));
      begin
        logic [4:0] taken [2];
        taken = head;
        @(posedge clk);
        #1;
        // an entry can only be erased in a later cycle than it was written
        if (c < 2700) for (int e = 0; e < D; e++)
          if (busy[e] && $urandom_range(0, 9) == 0) busy[e] = 1'b0;
        for (int i = 0; i < n; i++) busy[taken[i]] = 1'b1;
      end
    end
    // everything handed out is now back; free all and drain
    @(negedge clk);
    pop = 0;
    busy = '0;
    repeat (40) @(posedge clk);
    #1;
    checks++;
    if (int'(count) != D) fail($sformatf("count %0d after all freed", count));
    // free a known set and check the order it comes back in
    for (int i = 0; i < D; i++) begin
      logic [4:0] h;
      @(negedge clk);
      h = head[0];
      pop = (count != 0) ? 2'd1 : 2'd0;
      @(posedge clk); #1;
      busy[h] = 1;
    end
    @(negedge clk); pop = 0;
    busy = 32'hFFFF_FFFF & ~32'h0100_0A24;   // frees 2, 5, 9, 11, 24
    repeat (10) @(posedge clk);
    begin
      int order [5] = '{2, 5, 9, 11, 24};
      for (int i = 0; i < 5; i++) begin
        @(negedge clk);
        checks++;
        if (int'(head[0]) != order[i]) fail($sformatf("return order %0d: %0d", i, head[0]));
        pop = (count != 0) ? 2'd1 : 2'd0;
        @(posedge clk); #1; pop = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
