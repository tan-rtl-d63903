// tb_tan_dut_ctrl: checks DUT control and pattern application.
// A pattern buffer model (one clock read latency) holds 40 patterns; they
// become available in three steps. The DUT is tan_dut_model. Every response
// write must hold good_resp() of its pattern, at the pattern's index, in
// order; pins above the pattern length stay low; back-to-back patterns must
// be written exactly TEST_CYCLES clocks apart; clear must restart at 0.
`timescale 1ns/1ps
module tb_tan_dut_ctrl;
  import tan_pkg::*;
  import tb_tan_pkg::*;
  localparam int TC = 5, DEPTH = 64, AW = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic clear, busy, rb_we;
  logic [7:0] plen;
  logic [15:0] avail, applied;
  logic [AW-1:0] pb_raddr, rb_waddr;
  logic [PINS-1:0] pb_rdata, rb_wdata, dut_pi, dut_po;

  tan_dut_ctrl #(.TEST_CYCLES(TC), .DEPTH(DEPTH)) dut (.*);
  tan_dut_model u_model (.faulty(1'b0), .dut_pi, .dut_po);

  always_ff @(posedge clk) pb_rdata <= test_pattern(7, int'(pb_raddr), plen);

  int next_idx = 0;
  longint last_t = -1, cyc = 0;
  int gaps_bad = 0, high_pins = 0;
  bit back_to_back = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && (dut_pi & ~pat_mask(plen)) != '0) high_pins++;
    if (rst_n && rb_we) begin
      check(rb_waddr == AW'(next_idx), $sformatf("write index %0d, expected %0d", rb_waddr, next_idx));
      check(rb_wdata == good_resp(test_pattern(7, next_idx, plen), plen), $sformatf("response %0d", next_idx));
      if (back_to_back && last_t >= 0 && cyc - last_t != TC) gaps_bad++;
      last_t = cyc;
      next_idx++;
    end
  end

  initial begin
    clear = 0; plen = 8'd77; avail = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (5) @(posedge clk);
    check(applied == 0 && !busy, "idle with nothing available");
    @(posedge clk); avail <= 10; back_to_back = 1;
    wait (applied == 10);
    repeat (20) @(posedge clk);
    back_to_back = 0;
    avail <= 25;
    repeat (3) @(posedge clk);
    avail <= 40;
    wait (applied == 40);
    repeat (10) @(posedge clk);
    check(next_idx == 40, "40 responses written");
    check(gaps_bad == 0, "one pattern every TEST_CYCLES clocks");
    check(high_pins == 0, "pins above the pattern length stay low");
    // clear and run again with 256-bit patterns
    @(posedge clk); clear <= 1; avail <= 0;
    @(posedge clk); clear <= 0;
    @(posedge clk);
    check(applied == 0 && dut_pi == '0, "clear");
    next_idx = 0; plen <= 8'd0;
    @(posedge clk); avail <= 6;
    wait (applied == 6);
    repeat (5) @(posedge clk);
    check(next_idx == 6, "6 responses after clear");
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
