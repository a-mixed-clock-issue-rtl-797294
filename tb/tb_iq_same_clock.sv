// tb_iq_same_clock: the synchronous operating point.  The same end-to-end
// program as tb_gals_iq_top, with the dispatch and issue clocks both driven
// by one 1 GHz clock.  The queue must behave exactly as in the mixed-clock
// case: nothing lost, nothing issued early, no deadlock, and an instruction
// that is ready at dispatch issues on the third clock edge after it.
module tb_iq_same_clock;
  import iq_pkg::*;
  timeunit 1ps; timeprecision 1ps;
  localparam int N_INST = 3000;
  localparam int LIVE   = 12;

  logic clk1 = 0, rst1_n = 0, rst2_n = 0;
  logic clk2;
  assign clk2 = clk1;
  ren_inst_t inst [2];
  logic in_ready;
  logic [5:0] free_count;
  logic [1:0] fu_ready;
  issue_t iss [2];
  logic [4:0] iss_idx [2];
  logic [IQ_DEPTH-1:0] iq_valid;
  tag_bcast_t wb_tag [2];

  gals_iq_top dut (.clk1, .rst1_n, .inst, .in_ready, .free_count,
                   .clk2(clk1), .rst2_n, .fu_ready, .iss, .iss_idx, .iq_valid, .wb_tag);

  always #500 clk1 = ~clk1;

  int checks = 0, failures = 0;
  // coverage of the mechanisms
  int n_disp_stall = 0, n_fu_stall = 0, n_dual = 0, n_wakeup = 0, n_late_tag = 0;
  int n_group_dep = 0, n_bypass = 0, n_one_op = 0;

  // program bookkeeping, indexed by instruction id
  ren_inst_t prog [N_INST];
  bit        issued [N_INST];
  longint    disp_edge1 [N_INST];   // clk1 edge count at dispatch
  longint    disp_time [N_INST];
  longint    disp_e2 [N_INST];      // clk2 edge count at dispatch
  bit        disp_ready [N_INST];
  // physical register bookkeeping
  longint    bcast_edge [NPREG];    // clk2 edge that sampled its broadcast, -1 = pending
  longint    bcast_time [NPREG];
  int        readers [NPREG];
  tag_t      free_q [$], live_q [$], retire_q [$];
  longint    edge1 = 0, edge2 = 0;
  int        n_disp = 0, n_issued = 0;
  longint    min_lat = 1000, first_lat = -1;

  task automatic fail(string m);
    failures++;
    if (failures < 15) $display("t=%0t %s", $time, m);
  endtask

  always @(posedge clk1) edge1++;
  always @(posedge clk2) edge2++;

  initial begin
    #100000000;
    failures++;
    $display("watchdog: dispatched %0d issued %0d", n_disp, n_issued);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic tag_t pick_src();
    return live_q[$urandom_range(0, $size(live_q) - 1)];
  endfunction

  // ---------------- front end (clk1) ----------------
  initial begin
    int next_id = 0;
    logic accepted;
    inst[0] = '0; inst[1] = '0;
    for (int t = 0; t < int'(NPREG); t++) begin
      bcast_edge[t] = -100; bcast_time[t] = 0; readers[t] = 0;
      if (t < LIVE) live_q.push_back(tag_t'(t)); else free_q.push_back(tag_t'(t));
    end
    #3000;
    rst1_n = 1; rst2_n = 1;
    // first instruction alone, operands ready, into the idle queue
    @(negedge clk1);
    inst[0] = '{valid: 1'b1, src1_used: 1'b1, src1: 6'd1, src2_used: 1'b1, src2: 6'd2,
                dst: free_q.pop_front(), payload: 16'd0};
    next_id = 1;
    while (next_id < N_INST || inst[0].valid || inst[1].valid) begin
      if (!inst[0].valid && !inst[1].valid) begin
        // build the next group
        for (int l = 0; l < 2; l++) begin
          inst[l] = '0;
          if (next_id + l < N_INST && $urandom_range(0, 3) != 0 && $size(free_q) > 0) begin
            inst[l].valid     = 1;
            inst[l].src1_used = $urandom_range(0, 9) != 0;
            inst[l].src2_used = $urandom_range(0, 9) < 7;
            inst[l].src1      = inst[l].src1_used ? pick_src() : tag_t'($urandom);
            inst[l].src2      = inst[l].src2_used ? pick_src() : tag_t'($urandom);
            if (l == 1 && inst[0].valid && $urandom_range(0, 3) == 0) begin
              inst[1].src1_used = 1;
              inst[1].src1 = inst[0].dst;
            end
            inst[l].dst = free_q.pop_front();
          end
        end
        if (inst[1].valid && !inst[0].valid) begin inst[0] = inst[1]; inst[1] = '0; end
        if (inst[0].valid) inst[0].payload = 16'(next_id);
        if (inst[1].valid) inst[1].payload = 16'(next_id + 1);
        next_id += int'(inst[0].valid) + int'(inst[1].valid);
      end
      #1;
      if ((inst[0].valid || inst[1].valid) && !in_ready) n_disp_stall++;
      // dispatch-side observations before the edge
      if (in_ready) for (int l = 0; l < 2; l++) if (inst[l].valid) begin
        iq_data_t w;
        int id;
        w = dut.u_dispatch.wr_data[l];
        id = int'(inst[l].payload);
        disp_ready[id] = w.rdy1 && w.rdy2;
        if (!inst[l].src1_used || !inst[l].src2_used) n_one_op++;
        if (l == 1 && inst[0].valid && inst[1].src1_used && inst[1].src1 == inst[0].dst) n_group_dep++;
        for (int s = 0; s < 2; s++) begin
          tag_t t;
          logic used, rdy;
          t    = s == 0 ? inst[l].src1 : inst[l].src2;
          used = s == 0 ? inst[l].src1_used : inst[l].src2_used;
          rdy  = s == 0 ? w.rdy1 : w.rdy2;
          if (used && dut.written[t]) n_bypass++;
          if (used && !rdy) begin
            n_wakeup++;
            if (bcast_edge[t] != -1 && bcast_time[t] < $time) n_late_tag++;
          end
          // a source written as ready must have been broadcast already
          if (used && rdy) begin
            checks++;
            if (bcast_edge[t] == -1 || (l == 1 && inst[0].valid && t == inst[0].dst))
              fail($sformatf("id %0d source %0d marked ready before its tag came back", id, t));
          end
        end
      end
      accepted = in_ready;
      @(posedge clk1);
      #1;
      if (accepted) begin
        for (int l = 0; l < 2; l++) if (inst[l].valid) begin
          int id;
          id = int'(inst[l].payload);
          prog[id] = inst[l];
          disp_edge1[id] = edge1;
          disp_time[id] = $time;
          disp_e2[id] = edge2;
          if (inst[l].src1_used) readers[inst[l].src1]++;
          if (inst[l].src2_used) readers[inst[l].src2]++;
          bcast_edge[inst[l].dst] = -1;
          live_q.push_back(inst[l].dst);
          if ($size(live_q) > LIVE) retire_q.push_back(live_q.pop_front());
          n_disp++;
        end
        inst[0] = '0; inst[1] = '0;
      end
      // recycle retired registers whose broadcast has long drained
      for (int i = 0; i < $size(retire_q); i++) begin
        tag_t t;
        t = retire_q[i];
        if (readers[t] == 0 && bcast_edge[t] != -1 && edge2 - bcast_edge[t] > 3 * TAG_DELAY + 10) begin
          free_q.push_back(t);
          retire_q.delete(i);
          break;
        end
      end
      @(negedge clk1);
      if (!inst[0].valid && !inst[1].valid && $urandom_range(0, 199) == 0) repeat ($urandom_range(20, 60)) @(negedge clk1);
    end
  end

  // ---------------- functional units (clk2) ----------------
  issue_t ex0, ex1a, ex1b;
  initial begin
    longint stall_until = 0;
    fu_ready = 2'b11;
    wb_tag[0] = '0; wb_tag[1] = '0;
    ex0 = '0; ex1a = '0; ex1b = '0;
    forever begin
      @(posedge clk2);
      #1;
      // broadcast sampled at this edge
      for (int b = 0; b < 2; b++) if (wb_tag[b].valid) begin
        bcast_edge[wb_tag[b].tag] = edge2;
        bcast_time[wb_tag[b].tag] = $time - 1;
      end
      if (iss[0].valid && iss[1].valid) n_dual++;
      for (int l = 0; l < 2; l++) if (iss[l].valid) begin
        int id;
        id = int'(iss[l].payload);
        checks++;
        if (id >= N_INST || issued[id]) fail($sformatf("id %0d issued twice or unknown", id));
        else begin
          issued[id] = 1;
          n_issued++;
          if (iss[l].src1 !== prog[id].src1 || iss[l].src2 !== prog[id].src2 || iss[l].dst !== prog[id].dst)
            fail($sformatf("id %0d issued with wrong fields", id));
          for (int s = 0; s < 2; s++) begin
            logic used;
            tag_t t;
            used = s == 0 ? prog[id].src1_used : prog[id].src2_used;
            t    = s == 0 ? prog[id].src1 : prog[id].src2;
            if (used) begin
              checks++;
              // granted in the cycle before this edge; the tag must have
              // been sampled at an earlier edge
              if (bcast_edge[t] == -1 || bcast_edge[t] >= edge2)
                fail($sformatf("id %0d issued before source %0d was produced", id, t));
              readers[t]--;
            end
          end
          if (disp_ready[id]) begin
            longint lat;
            // issue-clock edges from the dispatch edge up to this edge
            lat = edge2 - disp_e2[id];
            if (lat < min_lat) min_lat = lat;
            if (id == 0) first_lat = lat;
          end
        end
      end
      // execution: unit 0 one cycle, unit 1 two cycles, then broadcast
      wb_tag[0] = '{valid: ex0.valid, tag: ex0.dst};
      wb_tag[1] = '{valid: ex1b.valid, tag: ex1b.dst};
      ex1b = ex1a;
      ex0  = iss[0];
      ex1a = iss[1];
      if (edge2 >= stall_until) fu_ready = 2'b11;
      if ($urandom_range(0, 49) == 0) begin
        fu_ready = 2'($urandom_range(0, 2));
        stall_until = edge2 + $urandom_range(1, 4);
      end
      if (fu_ready != 2'b11 && iq_valid != 0) n_fu_stall++;
    end
  end

  // ---------------- end of run ----------------
  initial begin
    wait (n_disp == N_INST);
    wait (n_issued == N_INST);
    repeat (50) @(posedge clk2);
    #1;
    checks++;
    if (n_issued != N_INST || iq_valid != 0) fail($sformatf("left behind: issued %0d", n_issued));
    checks++;
    if (first_lat != 3) fail($sformatf("idle-queue dispatch-to-issue latency %0d edges, expected 3", first_lat));
    checks++;
    if (min_lat != 3) fail($sformatf("minimum latency %0d", min_lat));
    $display("dispatch stalls %0d, fu stalls %0d, dual issue %0d, wakeups %0d, late-tag wakeups %0d",
             n_disp_stall, n_fu_stall, n_dual, n_wakeup, n_late_tag);
    $display("group deps %0d, write-back bypass %0d, one-operand %0d",
             n_group_dep, n_bypass, n_one_op);
    if (n_disp_stall == 0) fail("no dispatch stall");
    if (n_fu_stall == 0)   fail("no functional unit stall");
    if (n_dual == 0)       fail("no dual issue");
    if (n_wakeup == 0)     fail("no tag wakeup");
    if (n_late_tag == 0)   fail("no delayed-tag wakeup");
    if (n_group_dep == 0)  fail("no same-group dependence");
    if (n_bypass == 0)     fail("no write-back bypass");
    if (n_one_op == 0)     fail("no one-operand instruction");
    checks += 8;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
