// sample_buffer_tb: writes random 2-bit samples to all 12000 addresses, reads
// them back in a scrambled order and checks data and the one-clock read
// latency, including a write and read of the same address in one clock.
`timescale 1ns/1ps
module sample_buffer_tb;
  localparam int D = 12000;
  logic clk = 0, we = 0;
  logic [13:0] waddr = 0, raddr = 0;
  logic [1:0] wdata = 0, rdata;
  logic [1:0] model [D];
  always #5 clk = ~clk;
  sample_buffer dut (.*);
  int checks = 0, failures = 0;
  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int bad;
    for (int a = 0; a < D; a++) begin
      model[a] = 2'($urandom());
      we <= 1; waddr <= 14'(a); wdata <= model[a];
      @(posedge clk);
    end
    we <= 0;
    bad = 0;
    for (int k = 0; k < D; k++) begin
      int a;
      a = (k * 7919) % D;
      raddr <= 14'(a);
      @(posedge clk); #1;
      if (rdata !== model[a]) bad++;
    end
    checks++; if (bad != 0) begin failures++; $display("FAIL %0d bad reads", bad); end
    // read-before-write on the same address
    raddr <= 14'd5; waddr <= 14'd5; wdata <= ~model[5]; we <= 1;
    @(posedge clk); #1;
    checks++; if (rdata !== model[5]) failures++;
    we <= 0;
    @(posedge clk); #1;
    checks++; if (rdata !== ~model[5]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
