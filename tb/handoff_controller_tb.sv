// handoff_controller_tb: a model search table and eight model trackers (busy
// once given a satellite). Checks: detections go out lowest PRN first to the
// lowest free tracker with the table's phase and Doppler; a satellite already
// tracked is discarded; with all trackers busy detections are discarded; every
// detection is consumed.
`timescale 1ns/1ps
module handoff_controller_tb;
  import gps_pkg::*;
  logic clk = 0, rst = 1;
  logic [31:0] detected = 0;
  sat_id_t rd_sat, consume_sat;
  code_phase_t rd_phase;
  doppler_t rd_doppler;
  logic consume, dropped;
  logic [7:0] trk_busy = 0, new_sat;
  sat_id_t [7:0] trk_sat = '0;
  sat_info_t info;
  always #5 clk = ~clk;
  handoff_controller dut (.*);
  assign rd_phase   = 12'(rd_sat) * 12'd100 + 12'd7;
  assign rd_doppler = 16'(rd_sat) * 16'sd50 - 16'sd900;
  int checks = 0, failures = 0, n_drop = 0, n_disp = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // model trackers and search flags
  int order [$];
  always @(posedge clk) if (!rst) begin
    if (consume) detected[consume_sat] <= 1'b0;
    if (dropped) n_drop++;
    for (int t = 0; t < 8; t++) if (new_sat[t]) begin
      n_disp++;
      trk_busy[t] <= 1'b1; trk_sat[t] <= info.sat_id;
      order.push_back(t * 100 + int'(info.sat_id));
      if (info.phase != 12'(info.sat_id) * 12'd100 + 12'd7 ||
          info.doppler != 16'(info.sat_id) * 16'sd50 - 16'sd900) begin
        failures++; $display("FAIL info of sat %0d", info.sat_id);
      end
    end
  end
  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    // tracker 0 already follows satellite 3
    trk_busy[0] <= 1; trk_sat[0] <= 5'd3;
    @(posedge clk);
    detected <= 32'h0000_0419;   // sats 0, 3, 4, 10
    repeat (20) @(posedge clk);
    check(detected == 0, "all detections consumed");
    check(n_disp == 3 && n_drop == 1, "3 dispatched, tracked satellite 3 discarded");
    check(order.size() == 3 && order[0] == 100 && order[1] == 204 && order[2] == 310,
          "lowest PRN to lowest free tracker");
    // fill the remaining trackers, then overflow
    detected <= 32'hFFF0_0000;   // 12 satellites, 4 trackers left
    repeat (60) @(posedge clk);
    check(&trk_busy, "all trackers busy");
    check(n_disp == 7 && n_drop == 9, $sformatf("overflow discarded (%0d %0d)", n_disp, n_drop));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
