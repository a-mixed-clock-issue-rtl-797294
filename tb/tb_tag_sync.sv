// tb_tag_sync: random write-back tags on the 1.0 GHz issue clock, up to two
// per cycle, must each produce exactly one one-cycle pulse of the same
// register on the 1.1 GHz dispatch clock, two dispatch edges after the
// issue edge that sampled them, and nothing else.
module tb_tag_sync;
  import iq_pkg::*;
  timeunit 1ps; timeprecision 1ps;
  logic clk_w = 0, clk_r = 0, rst_w_n = 0, rst_r_n = 0;
  tag_bcast_t wb [2];
  logic [NPREG-1:0] written;
  longint sent_at [NPREG];   // time of the issue edge that sampled the tag
  int pending [NPREG];
  int checks = 0, failures = 0;
  int sent = 0, seen = 0;

  tag_sync dut (.clk_r, .rst_r_n, .wb_tag(wb), .clk_w, .rst_w_n, .written_w(written));

  always #455 clk_w = ~clk_w;
  initial begin #137; forever #500 clk_r = ~clk_r; end

  always @(posedge clk_r) if (rst_r_n)
    for (int b = 0; b < 2; b++)
      if (wb[b].valid) begin pending[wb[b].tag]++; sent_at[wb[b].tag] = $time; sent++; end

  always @(posedge clk_w) if (rst_w_n) begin
    #1;
    for (int t = 0; t < int'(NPREG); t++) if (written[t]) begin
      seen++;
      checks++;
      // the second dispatch edge after the sampling issue edge lies 910..1820 ps later
      if (pending[t] != 1 || $time - 1 - sent_at[t] <= 910 || $time - 1 - sent_at[t] > 1820) begin
        failures++;
        $display("t=%0t tag %0d pulse, pending=%0d sent at %0t", $time, t, pending[t], sent_at[t]);
      end
      pending[t]--;
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last [NPREG];
    foreach (pending[t]) begin pending[t] = 0; last[t] = -100; end
    wb[0] = '0; wb[1] = '0;
    #3000;
    rst_w_n = 1; rst_r_n = 1;
    for (int c = 0; c < 1000; c++) begin
      @(negedge clk_r);
      wb[0] = '0; wb[1] = '0;
      for (int b = 0; b < 2; b++) begin
        tag_t t;
        t = tag_t'($urandom);
        // a register is not written back again within a few cycles
        if ($urandom_range(0, 2) != 0 && c - last[t] > 6 && !(b == 1 && wb[0].valid && wb[0].tag == t)) begin
          wb[b] = '{valid: 1'b1, tag: t};
          last[t] = c;
        end
      end
    end
    @(negedge clk_r); wb[0] = '0; wb[1] = '0;
    repeat (10) @(posedge clk_w);
    checks++;
    if (seen != sent || sent < 500) begin
      failures++;
      $display("sent %0d tags, saw %0d pulses", sent, seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
