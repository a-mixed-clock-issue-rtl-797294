// tb_reg_status_table: random allocations, write-backs and lookups against
// a reference array of ready bits; checks the reset state (all ready), the
// same-cycle write-back bypass on lookups, and that an allocation wins
// over a simultaneous write-back of the same register.
module tb_reg_status_table;
  import iq_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0;
  logic [NPREG-1:0] written;
  logic [1:0] alloc_en;
  tag_t alloc_tag [2];
  tag_t look_tag [4];
  logic [3:0] look_rdy;
  logic model [NPREG];
  int checks = 0, failures = 0;

  reg_status_table dut (.clk, .rst_n, .written, .alloc_en, .alloc_tag, .look_tag, .look_rdy);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    written = '0; alloc_en = 0; alloc_tag[0] = 0; alloc_tag[1] = 0;
    foreach (look_tag[i]) look_tag[i] = 0;
    foreach (model[i]) model[i] = 1;
    #12 rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      written = '0;
      for (int k = 0; k < 2; k++) if ($urandom_range(0, 1)) written[$urandom_range(0, NPREG-1)] = 1'b1;
      alloc_en = 2'($urandom);
      alloc_tag[0] = tag_t'($urandom);
      alloc_tag[1] = tag_t'($urandom);
      if ($urandom_range(0, 7) == 0) written[alloc_tag[0]] = 1'b1;  // collision case
      foreach (look_tag[i]) look_tag[i] = ($urandom_range(0, 3) == 0) ? alloc_tag[0] : tag_t'($urandom);
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (look_rdy[i] !== (model[look_tag[i]] | written[look_tag[i]])) begin
          failures++;
          if (failures < 10) $display("c=%0d look %0d tag %0d got %b", c, i, look_tag[i], look_rdy[i]);
        end
      end
      @(posedge clk);
      for (int t = 0; t < int'(NPREG); t++) if (written[t]) model[t] = 1;
      for (int a = 0; a < 2; a++) if (alloc_en[a]) model[alloc_tag[a]] = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
