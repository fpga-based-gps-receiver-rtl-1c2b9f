// param_memory_tb: stores two passes of random detections and checks every
// entry read back, the recent flags (set for detected, cleared for missing),
// that undetected satellites keep their old values, and consume.
`timescale 1ns/1ps
module param_memory_tb;
  import gps_pkg::*;
  logic clk = 0, rst = 1, store = 0, consume = 0;
  logic [31:0] found = 0, recent;
  code_phase_t [31:0] new_phase;
  doppler_t [31:0] new_doppler;
  sat_id_t consume_sat = 0, rd_sat = 0;
  code_phase_t rd_phase;
  doppler_t rd_doppler;
  always #5 clk = ~clk;
  param_memory dut (.*);
  int checks = 0, failures = 0;
  code_phase_t mp [32];
  doppler_t md [32];
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int s = 0; s < 32; s++) begin mp[s] = '0; md[s] = '0; end
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int pass = 0; pass < 2; pass++) begin
      int bad;
      logic [31:0] f;
      f = $urandom() | 32'h200;   // satellite 10 (id 9) is consumed below
      for (int s = 0; s < 32; s++) begin
        new_phase[s]   = 12'($urandom_range(0, 3999));
        new_doppler[s] = 16'($urandom_range(0, 20000) - 10000);
        if (f[s]) begin mp[s] = new_phase[s]; md[s] = new_doppler[s]; end
      end
      found <= f; store <= 1; @(posedge clk); store <= 0; #1;
      checks++; if (recent !== f) begin failures++; $display("FAIL recent"); end
      bad = 0;
      for (int s = 0; s < 32; s++) begin
        rd_sat = 5'(s); #1;
        if (rd_phase !== mp[s] || rd_doppler !== md[s]) bad++;
      end
      checks++; if (bad != 0) begin failures++; $display("FAIL %0d entries", bad); end
      consume <= 1; consume_sat <= 5'd9; @(posedge clk); consume <= 0; #1;
      checks++; if (recent !== (f & ~32'h200)) begin failures++; $display("FAIL consume"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
