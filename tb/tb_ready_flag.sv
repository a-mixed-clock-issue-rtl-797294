// tb_ready_flag: random writes on the dispatch clock and random
// valid/match activity on an unrelated issue clock, checked against a
// reference model of the flag: ready = written status OR a match seen
// while the entry was valid; ready_now adds a match in the current cycle.
// A directed part checks that a match before the entry is valid is ignored
// and that reading the entry out clears an earlier match.
module tb_ready_flag;
  timeunit 1ps; timeprecision 1ps;
  logic clk_w = 0, clk_r = 0, rst_r_n = 0;
  logic [1:0] we, wrdy;
  logic valid_r, hit, ready, ready_now;
  logic m_init, m_match;
  int checks = 0, failures = 0;

  ready_flag dut (.clk_w, .we, .wrdy, .clk_r, .rst_r_n, .valid_r, .hit,
                  .ready, .ready_now);

  always #455 clk_w = ~clk_w;
  initial begin #137; forever #500 clk_r = ~clk_r; end

  always @(posedge clk_w)
    if (we[0]) m_init <= wrdy[0]; else if (we[1]) m_init <= wrdy[1];
  always @(posedge clk_r or negedge rst_r_n)
    if (!rst_r_n) m_match <= 0; else m_match <= valid_r & (m_match | hit);

  task automatic check(string where);
    checks++;
    if (ready !== (m_init | m_match) ||
        ready_now !== (m_init | m_match | (valid_r & hit))) begin
      failures++;
      if (failures < 10)
        $display("%s t=%0t ready=%b now=%b model init=%b match=%b", where, $time,
                 ready, ready_now, m_init, m_match);
    end
  endtask

  always @(posedge clk_w) if (rst_r_n) begin #2; check("w"); end
  always @(posedge clk_r) if (rst_r_n) begin #2; check("r"); end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 2'b01; wrdy = 2'b00; valid_r = 0; hit = 0;
    @(posedge clk_w); @(negedge clk_w); we = 0;
    @(posedge clk_r); rst_r_n = 1;
    // a match while the entry is not valid must be ignored
    @(negedge clk_r); hit = 1;
    @(negedge clk_r); hit = 0; #1;
    checks++; if (ready !== 0) begin failures++; $display("match while invalid"); end
    // valid, then a match: ready at once and kept
    valid_r = 1;
    @(negedge clk_r); hit = 1; #1;
    checks++; if (ready_now !== 1) begin failures++; $display("no same-cycle wakeup"); end
    @(negedge clk_r); hit = 0; #1;
    checks++; if (ready !== 1) begin failures++; $display("match not held"); end
    // entry read out: the match is forgotten
    valid_r = 0;
    @(negedge clk_r); #1;
    checks++; if (ready !== 0) begin failures++; $display("match survived read"); end
    // random phase
    fork
      repeat (600) begin
        @(negedge clk_w);
        we = 2'($urandom); wrdy = 2'($urandom);
        if ($urandom_range(0, 3) != 0) we = 0;
      end
      repeat (600) begin
        @(negedge clk_r);
        valid_r = ($urandom_range(0, 4) != 0) ? valid_r : ~valid_r;
        hit = ($urandom_range(0, 5) == 0);
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
