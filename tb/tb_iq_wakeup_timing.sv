// tb_iq_wakeup_timing: the single-instruction sequence of the mixed-clock
// queue, cycle by cycle.  One instruction is written with operand A not
// available and operand B available.  The testbench checks that the entry
// becomes valid on the issue side exactly two issue edges after the write,
// that a broadcast of A's tag reaches the comparators exactly TAG_DELAY
// cycles later and raises the request in that same cycle, and that the
// instruction leaves the queue on the next edge with its entry erased.  It
// repeats the sequence with the tag broadcast before the entry was written,
// the case the tag delay exists for.
module tb_iq_wakeup_timing;
  import iq_pkg::*;
  timeunit 1ps; timeprecision 1ps;
  logic clk_w = 0, clk_r = 0, rst_w_n = 0, rst_r_n = 0;
  logic [1:0] wr_en, fu_ready;
  logic [4:0] wr_idx [2], iss_idx [2];
  iq_data_t wr_data [2];
  logic [31:0] busy_w, valid_r;
  tag_bcast_t wb_tag [2];
  issue_t iss [2];
  int checks = 0, failures = 0;

  mc_issue_queue dut (.clk_w, .rst_w_n, .wr_en, .wr_idx, .wr_data, .busy_w,
                      .clk_r, .rst_r_n, .wb_tag, .fu_ready, .iss, .iss_idx, .valid_r);

  always #455 clk_w = ~clk_w;
  initial begin #137; forever #500 clk_r = ~clk_r; end

  task automatic expect_true(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("t=%0t FAIL %s", $time, what); end
  endtask

  task automatic write_entry(int idx, tag_t a, tag_t b, tag_t d);
    @(negedge clk_w);
    wr_en = 2'b01;
    wr_idx[0] = 5'(idx);
    wr_data[0] = '{src1: a, rdy1: 1'b0, src2: b, rdy2: 1'b1, dst: d, payload: 16'hA5A5};
    @(posedge clk_w); #1;
    wr_en = 0;
  endtask

  task automatic broadcast(tag_t t);
    @(negedge clk_r);
    wb_tag[1] = '{valid: 1'b1, tag: t};
    @(negedge clk_r);
    wb_tag[1] = '0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int edges;
    wr_en = 0; wr_idx[0] = 0; wr_idx[1] = 0; wr_data[0] = '0; wr_data[1] = '0;
    wb_tag[0] = '0; wb_tag[1] = '0; fu_ready = 2'b11;
    #3000;
    rst_w_n = 1; rst_r_n = 1;

    // --- tag broadcast after the entry is valid ---
    write_entry(9, 6'd17, 6'd3, 6'd40);
    edges = 0;
    while (!valid_r[9] && edges < 6) begin @(posedge clk_r); #1; edges++; end
    expect_true(edges == 2, $sformatf("entry valid after %0d issue edges, expected 2", edges));
    expect_true(!dut.req[9], "no request while operand A is missing");
    repeat (3) @(posedge clk_r);
    broadcast(6'd17);               // presented for one cycle, sampled at one edge
    // the comparators see it TAG_DELAY cycles after the cycle it was presented in
    edges = 1;
    while (!dut.req[9] && edges < 20) begin @(negedge clk_r); #1; edges++; end
    expect_true(edges == int'(TAG_DELAY), $sformatf("request %0d cycles after the broadcast, expected %0d", edges, TAG_DELAY));
    @(posedge clk_r); #1;
    expect_true(iss[0].valid && iss_idx[0] == 5'd9 && iss[0].src1 == 6'd17 &&
                iss[0].src2 == 6'd3 && iss[0].dst == 6'd40 && iss[0].payload == 16'hA5A5,
                "issued on the edge after the request");
    expect_true(!valid_r[9], "entry erased when read");
    @(posedge clk_r); #1;
    expect_true(!iss[0].valid && !iss[1].valid, "issued once only");

    // --- tag broadcast just before the entry is written ---
    repeat (10) @(posedge clk_r);
    fork
      broadcast(6'd21);
      begin @(posedge clk_r); write_entry(4, 6'd21, 6'd3, 6'd41); end
    join
    edges = 0;
    while (!iss[0].valid && edges < 30) begin @(posedge clk_r); #1; edges++; end
    expect_true(iss[0].valid && iss_idx[0] == 5'd4, "late entry woken by the delayed tag");
    repeat (2) @(posedge clk_r); #1;
    expect_true(busy_w == '0 && valid_r == '0, "queue empty at the end");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
