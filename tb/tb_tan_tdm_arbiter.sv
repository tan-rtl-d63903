// tb_tan_tdm_arbiter: checks the TDM arbiter with four requesters.
// Requesters raise req at random and drop it when granted; the "wrapper"
// here finishes a frame 3..10 clocks after the grant. Checked: a grant only
// goes to a requester and only while no frame is in progress, owner follows
// the grant, and the grants rotate: while every requester is waiting, each
// one is served once in every four grants, in round-robin order.
`timescale 1ns/1ps
module tb_tan_tdm_arbiter;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [N-1:0] req, gnt;
  logic done, busy;
  logic [1:0] owner;
  tan_tdm_arbiter #(.N(N)) dut (.*);

  int frame_left = 0, ngnt = 0, last_g = -1;
  bit in_frame = 0, all_mode = 0;
  int served [N];
  always @(posedge clk) if (rst_n) begin
    done <= 0;
    if (gnt != 0) begin
      int g;
      g = $clog2(gnt);
      check($onehot(gnt), "one-hot grant");
      check(req[g], "grant to a requester");
      check(!in_frame, "no grant during a frame");
      check(owner == 2'(g), "owner follows grant");
      if (all_mode && last_g >= 0) check(g == (last_g + 1) % N, $sformatf("round robin %0d after %0d", g, last_g));
      last_g = g; ngnt++; served[g]++;
      req[g] <= 0;
      in_frame = 1; frame_left = $urandom_range(3, 10);
    end else if (in_frame) begin
      frame_left--;
      if (frame_left == 0) begin done <= 1; in_frame = 0; end
    end
    for (int i = 0; i < N; i++)
      if (!req[i] && (gnt == 0 || !gnt[i]) && (all_mode || $urandom_range(0, 7) == 0)) req[i] <= 1;
  end

  initial begin
    req = 0; done = 0;
    foreach (served[i]) served[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (500) @(posedge clk);
    all_mode = 1; last_g = -1;
    repeat (800) @(posedge clk);
    check(ngnt > 100, "many grants");
    foreach (served[i]) check(served[i] > 20, $sformatf("requester %0d served %0d", i, served[i]));
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
