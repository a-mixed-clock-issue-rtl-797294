// tb_cam_cell: writes tags through both write ports (port 0 winning when
// both are enabled) and checks the stored tag and the hit output against
// random broadcasts on both match lanes.
module tb_cam_cell;
  import iq_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0;
  logic [1:0] we;
  tag_t wtag [2];
  tag_bcast_t bcast [2];
  tag_t tag, model;
  logic hit;
  int checks = 0, failures = 0;

  cam_cell dut (.clk_w(clk), .we, .wtag, .bcast, .tag, .hit);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 2'b01; wtag[0] = 6'd5; wtag[1] = 6'd9;
    bcast[0] = '0; bcast[1] = '0;
    @(posedge clk); #1;
    model = 6'd5;
    for (int c = 0; c < 500; c++) begin
      @(negedge clk);
      we = 2'($urandom);
      wtag[0] = tag_t'($urandom); wtag[1] = tag_t'($urandom);
      for (int b = 0; b < 2; b++) begin
        bcast[b].valid = $urandom_range(0, 1);
        bcast[b].tag   = ($urandom_range(0, 2) == 0) ? model : tag_t'($urandom);
      end
      #1;
      checks++;
      if (hit !== ((bcast[0].valid && bcast[0].tag == model) ||
                   (bcast[1].valid && bcast[1].tag == model))) begin
        failures++;
        $display("hit=%b model=%0d", hit, model);
      end
      @(posedge clk);
      if (we[0])      model = wtag[0];
      else if (we[1]) model = wtag[1];
      #1;
      checks++;
      if (tag !== model) begin failures++; $display("tag=%0d model=%0d", tag, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
