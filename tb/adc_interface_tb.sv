// adc_interface_tb: drives an asynchronous sample clock (period 37 ns against
// a 10 ns system clock) with random I/Q changing on its falling edge; checks
// every sample is delivered once and in order, the millisecond sync every
// SAMPLES_PER_MS samples (20 here), and the sample rate.
`timescale 1ns/1ps
module adc_interface_tb;
  localparam int SPMS = 20;
  logic clk = 0, rst = 1, adc_i = 0, adc_q = 0, adc_clk = 0;
  logic sample_valid, i_neg, q_neg, sync;
  logic [4:0] sample_count;
  always #5 clk = ~clk;
  adc_interface #(.SAMPLES_PER_MS(SPMS)) dut (.*);
  int checks = 0, failures = 0;
  logic [1:0] sent [$];
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    #33 rst = 0;
    #100;
    for (int k = 0; k < 200; k++) begin
      logic [1:0] v;
      v = 2'($urandom());
      adc_i = v[1]; adc_q = v[0];
      sent.push_back(v);
      #18.5 adc_clk = 1;
      #18.5 adc_clk = 0;
    end
  end
  int got = 0, bad = 0, syncs = 0, bad_sync = 0;
  always @(posedge clk) if (!rst && sample_valid) begin
    if ({i_neg, q_neg} !== sent[got]) bad++;
    if (sync != (got % SPMS == 0)) bad_sync++;
    if (sync) syncs++;
    got++;
  end
  initial begin
    #7600;
    checks++; if (got != 200) begin failures++; $display("FAIL got %0d samples", got); end
    checks++; if (bad != 0) begin failures++; $display("FAIL %0d wrong samples", bad); end
    checks++; if (bad_sync != 0 || syncs != 10) begin failures++; $display("FAIL sync"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
