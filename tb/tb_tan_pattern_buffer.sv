// tb_tan_pattern_buffer: checks the local pattern buffer against an array
// model: random byte-enabled writes and reads, one clock of read latency,
// and old data returned when an entry is read and written in one clock.
`timescale 1ns/1ps
module tb_tan_pattern_buffer;
  localparam int DEPTH = 64, WIDTH = 256, AW = 6, NB = 32;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we;
  logic [AW-1:0] waddr, raddr;
  logic [NB-1:0] wbe;
  logic [WIDTH-1:0] wdata, rdata, model [DEPTH], expq;
  bit exp_valid;

  tan_pattern_buffer #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  initial begin
    we = 0; waddr = 0; raddr = 0; wbe = 0; wdata = 0; exp_valid = 0;
    // fill every entry
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wbe = '1;
      for (int w = 0; w < WIDTH / 32; w++) wdata[32*w +: 32] = $urandom;
      model[a] = wdata;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (exp_valid) begin
        checks++;
        if (rdata != expq) begin failures++; $display("FAIL: read %0d", i); end
      end
      raddr = AW'($urandom_range(0, DEPTH - 1));
      we = $urandom_range(0, 1);
      waddr = (i % 7 == 0) ? raddr : AW'($urandom_range(0, DEPTH - 1));
      wbe = {$urandom, $urandom} >> 32;
      for (int w = 0; w < WIDTH / 32; w++) wdata[32*w +: 32] = $urandom;
      expq = model[raddr];       // old data on a same-clock write
      exp_valid = 1;
      if (we) for (int b = 0; b < NB; b++) if (wbe[b]) model[waddr][8*b +: 8] = wdata[8*b +: 8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
