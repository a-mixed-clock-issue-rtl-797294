// tb_mc_issue_queue: the 32-entry mixed-clock queue with a 1.1 GHz write
// clock and a 1.0 GHz read clock.  The testbench dispatches random
// instructions into free entries, broadcasts random write-back tags, and
// randomly blocks functional units.  A reference model of the queue, kept
// on the issue clock, tracks for each entry when it becomes visible (two
// issue edges after the write), its operand readiness (written status,
// plus matches against tags broadcast TAG_DELAY cycles earlier) and
// computes the expected issue of every cycle: the two lowest-index ready
// entries, mapped onto the free functional units.  Every issued
// instruction and index is compared; at the end all tags are broadcast
// and every instruction must have left the queue.
module tb_mc_issue_queue;
  import iq_pkg::*;
  timeunit 1ps; timeprecision 1ps;
  localparam int D  = IQ_DEPTH;
  localparam int DL = TAG_DELAY;
  logic clk_w = 0, clk_r = 0, rst_w_n = 0, rst_r_n = 0;
  logic [1:0] wr_en, fu_ready;
  logic [4:0] wr_idx [2], iss_idx [2];
  iq_data_t wr_data [2];
  logic [D-1:0] busy_w, valid_r;
  tag_bcast_t wb_tag [2];
  issue_t iss [2];

  // reference model
  iq_data_t   m_data [D];
  logic       m_valid [D], m_pend [D], m_r1 [D], m_r2 [D];
  int         m_cnt [D];
  tag_bcast_t pipe [DL][2];
  int checks = 0, failures = 0;
  int written_n = 0, issued_n = 0, woken_n = 0, dual_n = 0, fu_stall_n = 0;
  bit stop_writes = 0;

  mc_issue_queue dut (.clk_w, .rst_w_n, .wr_en, .wr_idx, .wr_data, .busy_w,
                      .clk_r, .rst_r_n, .wb_tag, .fu_ready, .iss, .iss_idx, .valid_r);

  always #455 clk_w = ~clk_w;
  initial begin #137; forever #500 clk_r = ~clk_r; end

  task automatic fail(string m);
    failures++;
    if (failures < 15) $display("t=%0t %s", $time, m);
  endtask

  function automatic logic hit(tag_t t);
    return (pipe[DL-1][0].valid && pipe[DL-1][0].tag == t) ||
           (pipe[DL-1][1].valid && pipe[DL-1][1].tag == t);
  endfunction

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // dispatch side
  initial begin
    wr_en = 0; wr_idx[0] = 0; wr_idx[1] = 0; wr_data[0] = '0; wr_data[1] = '0;
    for (int e = 0; e < D; e++) begin m_valid[e] = 0; m_pend[e] = 0; m_cnt[e] = 0; end
    #3000;
    rst_w_n = 1; rst_r_n = 1;
    while (!stop_writes) begin
      int n;
      @(negedge clk_w);
      wr_en = 0;
      n = 0;
      for (int k = 0; k < 40 && n < 2; k++) begin
        int e;
        e = $urandom_range(0, D-1);
        if (!busy_w[e] && !(n == 1 && int'(wr_idx[0]) == e) && $urandom_range(0, 2) != 0) begin
          wr_idx[n] = 5'(e);
          wr_data[n] = iq_data_t'({$urandom, $urandom});
          wr_data[n].src1 = tag_t'($urandom_range(0, 15));
          wr_data[n].src2 = tag_t'($urandom_range(0, 15));
          wr_en[n] = 1;
          n++;
        end
      end
      @(posedge clk_w);
      for (int l = 0; l < 2; l++) if (wr_en[l]) begin
        m_data[wr_idx[l]] = wr_data[l];
        m_r1[wr_idx[l]]   = wr_data[l].rdy1;
        m_r2[wr_idx[l]]   = wr_data[l].rdy2;
        m_pend[wr_idx[l]] = 1;
        m_cnt[wr_idx[l]]  = 0;
        written_n++;
      end
    end
    @(negedge clk_w);
    wr_en = 0;
  end

  // issue side and reference model
  initial begin
    logic [D-1:0] req, g1, g2;
    int exp_e [2];
    fu_ready = 0; wb_tag[0] = '0; wb_tag[1] = '0;
    for (int s = 0; s < DL; s++) begin pipe[s][0] = '0; pipe[s][1] = '0; end
    @(posedge rst_r_n);
    for (int c = 0; c < 6000; c++) begin
      @(negedge clk_r);
      fu_ready = ($urandom_range(0, 5) == 0) ? 2'($urandom) : 2'b11;
      if (c > 5000) fu_ready = 2'b11;
      if (c == 4900) stop_writes = 1;
      for (int b = 0; b < 2; b++) begin
        wb_tag[b].valid = $urandom_range(0, 2) == 0;
        wb_tag[b].tag   = (c > 5200) ? tag_t'((c * 2 + b) % 16) : tag_t'($urandom_range(0, 15));
        if (c > 5200) wb_tag[b].valid = 1;
      end
      #1;
      // expected selection in this cycle
      req = '0;
      for (int e = 0; e < D; e++)
        req[e] = m_valid[e] && (m_r1[e] || hit(m_data[e].src1)) && (m_r2[e] || hit(m_data[e].src2));
      g1 = req & -req;
      g2 = (req & ~g1) & -(req & ~g1);
      exp_e[0] = -1; exp_e[1] = -1;
      if (fu_ready[0]) begin
        if (g1 != 0) exp_e[0] = $clog2(g1);
        if (fu_ready[1] && g2 != 0) exp_e[1] = $clog2(g2);
      end else if (fu_ready[1] && g1 != 0) exp_e[1] = $clog2(g1);
      if (fu_ready != 2'b11 && req != 0) fu_stall_n++;
      if (exp_e[0] >= 0 && exp_e[1] >= 0) dual_n++;
      @(posedge clk_r);
      #1;
      for (int l = 0; l < 2; l++) begin
        checks++;
        if (exp_e[l] < 0) begin
          if (iss[l].valid) fail($sformatf("lane %0d issued entry %0d, none expected", l, iss_idx[l]));
        end else begin
          iq_data_t d;
          d = m_data[exp_e[l]];
          if (!iss[l].valid || int'(iss_idx[l]) != exp_e[l] || iss[l].src1 !== d.src1 ||
              iss[l].src2 !== d.src2 || iss[l].dst !== d.dst || iss[l].payload !== d.payload)
            fail($sformatf("lane %0d: got v=%b idx %0d, expected entry %0d", l, iss[l].valid, iss_idx[l], exp_e[l]));
          issued_n++;
        end
      end
      // advance the model by the edge just taken
      for (int e = 0; e < D; e++) begin
        if (m_valid[e]) begin
          if ((!m_r1[e] && hit(m_data[e].src1)) || (!m_r2[e] && hit(m_data[e].src2))) woken_n++;
          m_r1[e] = m_r1[e] || hit(m_data[e].src1);
          m_r2[e] = m_r2[e] || hit(m_data[e].src2);
        end
      end
      for (int l = 0; l < 2; l++) if (exp_e[l] >= 0) m_valid[exp_e[l]] = 0;
      for (int e = 0; e < D; e++) if (m_pend[e]) begin
        m_cnt[e]++;
        if (m_cnt[e] == 2) begin m_pend[e] = 0; m_valid[e] = 1; end
      end
      for (int s = DL-1; s > 0; s--) pipe[s] = pipe[s-1];
      pipe[0] = wb_tag;
      checks++;
      for (int e = 0; e < D; e++)
        if (valid_r[e] !== m_valid[e]) begin fail($sformatf("entry %0d valid_r=%b", e, valid_r[e])); break; end
    end
    checks++;
    if (issued_n != written_n) fail($sformatf("wrote %0d, issued %0d", written_n, issued_n));
    checks++;
    if (woken_n == 0 || dual_n == 0 || fu_stall_n == 0 || written_n < 1000)
      fail($sformatf("coverage: woken=%0d dual=%0d fu_stall=%0d written=%0d", woken_n, dual_n, fu_stall_n, written_n));
    $display("wrote %0d issued %0d woken %0d dual-issue cycles %0d", written_n, issued_n, woken_n, dual_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
