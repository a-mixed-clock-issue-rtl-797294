// tb_iq_entry: one issue queue entry between a 1.1 GHz dispatch clock and
// a 1.0 GHz issue clock.  Each round writes random contents through a
// random write port with random operand readiness, then checks that the
// request rises only once the entry is valid on the issue side and both
// operands are ready, that a broadcast of a missing source tag wakes it in
// the same cycle and the wakeup is held, that read data equals what was
// written, and that a read erases the entry and its wakeup.
module tb_iq_entry;
  import iq_pkg::*;
  timeunit 1ps; timeprecision 1ps;
  logic clk_w = 0, clk_r = 0, rst_w_n = 0, rst_r_n = 0;
  logic [1:0] we, re;
  iq_data_t wdata [2], rdata, exp_d;
  tag_bcast_t bcast [2];
  logic busy_w, valid_r, req;
  int checks = 0, failures = 0;

  iq_entry dut (.clk_w, .rst_w_n, .we, .wdata, .busy_w,
                .clk_r, .rst_r_n, .bcast, .re, .valid_r, .req, .rdata);

  always #455 clk_w = ~clk_w;
  initial begin #137; forever #500 clk_r = ~clk_r; end

  task automatic expect_eq(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 15) $display("t=%0t %s: got %b expected %b", $time, what, got, exp);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; bcast[0] = '0; bcast[1] = '0;
    wdata[0] = '0; wdata[1] = '0;
    #3000;
    rst_w_n = 1; rst_r_n = 1;
    for (int round = 0; round < 80; round++) begin
      int p;
      logic r1, r2;
      wait (!busy_w);
      @(negedge clk_w);
      p = $urandom_range(0, 1);
      exp_d = iq_data_t'({$urandom, $urandom});
      // make the two sources different so a broadcast wakes only one
      if (exp_d.src2 == exp_d.src1) exp_d.src2 = exp_d.src1 + 1'b1;
      wdata[p] = exp_d;
      wdata[1-p] = iq_data_t'({$urandom, $urandom});
      we = 2'(1 << p);
      @(posedge clk_w); #1;
      we = 0;
      r1 = exp_d.rdy1; r2 = exp_d.rdy2;
      // not visible to the issue side yet, and a broadcast now is ignored
      @(negedge clk_r);
      expect_eq(valid_r, 0, "valid before sync");
      expect_eq(req, 0, "request before sync");
      bcast[0] = '{valid: 1'b1, tag: exp_d.src1};
      bcast[1] = '{valid: 1'b1, tag: exp_d.src2};
      @(posedge clk_r); #1;
      bcast[0] = '0; bcast[1] = '0;
      @(posedge clk_r); #1;
      expect_eq(valid_r, 1, "valid after two issue edges");
      expect_eq(req, r1 & r2, "request from written readiness");
      // wake the missing operands one by one on random lanes
      for (int s = 0; s < 2; s++) begin
        if (!(s == 0 ? r1 : r2)) begin
          int b;
          @(negedge clk_r);
          b = $urandom_range(0, 1);
          bcast[b] = '{valid: 1'b1, tag: (s == 0) ? exp_d.src1 : exp_d.src2};
          #1;
          if (s == 0) r1 = 1; else r2 = 1;
          expect_eq(req, r1 & r2, "same-cycle wakeup");
          @(posedge clk_r); #1;
          bcast[0] = '0; bcast[1] = '0;
          #1;
          expect_eq(req, r1 & r2, "wakeup held");
        end
      end
      @(negedge clk_r);
      checks++;
      if (rdata.src1 !== exp_d.src1 || rdata.src2 !== exp_d.src2 ||
          rdata.dst !== exp_d.dst || rdata.payload !== exp_d.payload) begin
        failures++;
        $display("round %0d: read data %h expected %h", round, rdata, exp_d);
      end
      re = 2'(1 << $urandom_range(0, 1));
      @(posedge clk_r); #1;
      re = 0;
      expect_eq(valid_r, 0, "erased by read");
      expect_eq(req, 0, "no request after read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
