// tb_dispatch_unit: random groups of renamed instructions, random
// write-back pulses and a testbench model of the queue's busy flags.
// The operand readiness written for every instruction is compared with a
// reference register status table (with same-cycle write-back bypass,
// unused operands forced ready, and the lane 1 on lane 0 dependence);
// entry indices must be free and distinct; a group must be refused exactly
// when the free-entry count is short, and such stalls must occur.
module tb_dispatch_unit;
  import iq_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  localparam int D = IQ_DEPTH;
  logic clk = 0, rst_n = 0;
  ren_inst_t inst [2];
  logic in_ready;
  logic [NPREG-1:0] written;
  logic [D-1:0] busy;
  logic [1:0] wr_en;
  logic [4:0] wr_idx [2];
  iq_data_t wr_data [2];
  logic [5:0] free_count;
  logic model [NPREG];
  int checks = 0, failures = 0, stalls = 0, deps = 0, dispatched = 0;

  dispatch_unit dut (.clk, .rst_n, .inst, .in_ready, .written, .busy,
                     .wr_en, .wr_idx, .wr_data, .free_count);

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
    foreach (model[i]) model[i] = 1;
    busy = '0; written = '0;
    inst[0] = '0; inst[1] = '0;
    #12 rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      int need;
      logic e1, e2;
      logic [4:0] taken [2];
      logic [1:0] taken_en;
      @(negedge clk);
      for (int l = 0; l < 2; l++) begin
        inst[l] = ren_inst_t'({$urandom, $urandom, $urandom});
        inst[l].valid = $urandom_range(0, 3) != 0;
      end
      if ($urandom_range(0, 3) == 0) inst[1].src1 = inst[0].dst;
      if ($urandom_range(0, 3) == 0) inst[1].src2 = inst[0].dst;
      written = '0;
      for (int k = 0; k < 2; k++) if ($urandom_range(0, 1)) written[$urandom_range(0, NPREG-1)] = 1'b1;
      #1;
      need = int'(inst[0].valid) + int'(inst[1].valid);
      checks++;
      if (in_ready !== (int'(free_count) >= need)) fail("in_ready");
      if (!in_ready) stalls++;
      checks++;
      if (wr_en !== ({inst[1].valid, inst[0].valid} & {2{in_ready}})) fail("wr_en");
      for (int l = 0; l < 2; l++) if (wr_en[l]) begin
        e1 = !inst[l].src1_used || model[inst[l].src1] || written[inst[l].src1];
        e2 = !inst[l].src2_used || model[inst[l].src2] || written[inst[l].src2];
        if (l == 1 && inst[0].valid) begin
          if (inst[1].src1_used && inst[1].src1 == inst[0].dst) begin e1 = 0; deps++; end
          if (inst[1].src2_used && inst[1].src2 == inst[0].dst) begin e2 = 0; deps++; end
        end
        checks++;
        if (wr_data[l].rdy1 !== e1 || wr_data[l].rdy2 !== e2) fail($sformatf("lane %0d readiness", l));
        checks++;
        if (wr_data[l].src1 !== inst[l].src1 || wr_data[l].src2 !== inst[l].src2 ||
            wr_data[l].dst !== inst[l].dst || wr_data[l].payload !== inst[l].payload) fail("fields");
        checks++;
        if (busy[wr_idx[l]]) fail($sformatf("entry %0d still busy", wr_idx[l]));
      end
      if (&wr_en) begin
        checks++;
        if (wr_idx[0] == wr_idx[1]) fail("same entry twice");
      end
      taken = wr_idx;
      taken_en = wr_en;
      @(posedge clk);
      for (int t = 0; t < int'(NPREG); t++) if (written[t]) model[t] = 1;
      for (int l = 0; l < 2; l++) if (taken_en[l]) model[inst[l].dst] = 0;
      dispatched += $countones(taken_en);
      #1;
      // the issue side drains slowly in the middle phase so the FIFO runs dry
      for (int e = 0; e < D; e++)
        if (busy[e] && $urandom_range(0, (c > 1000 && c < 2000) ? 40 : 4) == 0) busy[e] = 1'b0;
      for (int l = 0; l < 2; l++) if (taken_en[l]) busy[taken[l]] = 1'b1;
    end
    checks++;
    if (stalls == 0 || deps == 0 || dispatched < 1000) begin
      fail($sformatf("coverage: stalls=%0d deps=%0d dispatched=%0d", stalls, deps, dispatched));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
