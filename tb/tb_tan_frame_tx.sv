// tb_tan_frame_tx: checks the TAN packet wrapper.
// Sends three frames (a short padded one, a 1483-byte one without padding
// and a header-only one) with random back-pressure and one frame at full
// speed, and compares every byte, tx_last and the read requests with a
// frame built here from the header fields. The full-speed frame must take
// no more than its length plus 3 clocks.
`timescale 1ns/1ps
module tb_tan_frame_tx;
  import tan_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic start, busy, done, rd_en, tx_valid, tx_ready, tx_last;
  tan_hdr_t hdr;
  logic [15:0] base, rd_pat;
  logic [4:0] rd_byte;
  logic [7:0] rd_data, tx_data;
  bit random_ready = 1;

  tan_frame_tx dut (.*);

  function automatic logic [7:0] src_byte(logic [15:0] p, logic [4:0] b);
    return 8'(p * 7 + b * 13 + 1);
  endfunction
  always_ff @(posedge clk) if (rd_en) rd_data <= src_byte(rd_pat, rd_byte);
  always_ff @(posedge clk) tx_ready <= random_ready ? ($urandom_range(0, 3) != 0) : 1'b1;

  logic [7:0] got [$];
  bit got_last;
  always @(posedge clk) if (tx_valid && tx_ready) begin
    got.push_back(tx_data);
    if (tx_last) got_last = 1;
  end

  task automatic send(input tan_hdr_t h, input logic [15:0] b, input bit full_speed);
    logic [7:0] exp [$];
    logic [63:0] hb;
    int pb, t0, t1;
    hb = h;
    for (int i = 0; i < 8; i++) exp.push_back(hb[63-8*i -: 8]);
    pb = (h.plen == 0) ? 32 : (h.plen + 7) / 8;
    for (int p = 0; p < h.npat; p++)
      for (int y = 0; y < pb; y++) exp.push_back(src_byte(16'(b + p), 5'(y)));
    while (exp.size() < 46) exp.push_back(8'h00);
    got.delete(); got_last = 0;
    random_ready = !full_speed;
    @(posedge clk);
    hdr <= h; base <= b; start <= 1;
    t0 = $time / 10;
    @(posedge clk); start <= 0;
    while (!done) @(posedge clk);
    t1 = $time / 10;
    @(posedge clk);
    check(got.size() == exp.size(), $sformatf("length %0d, expected %0d", got.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      if (got[i] != exp[i]) begin
        check(0, $sformatf("byte %0d = %h, expected %h", i, got[i], exp[i])); break;
      end
    check(1, "bytes");
    check(got_last, "tx_last seen");
    if (full_speed) check(t1 - t0 <= exp.size() + 3, $sformatf("full speed: %0d clocks for %0d bytes", t1 - t0, exp.size()));
    check(!busy, "idle after done");
  endtask

  initial begin
    start = 0; hdr = '0; base = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    send('{dst: 16'hFFFF, src: 16'h0000, cmd: CMD_BRP, npat: 16'd3, plen: 8'd20}, 16'd5, 0);
    send('{dst: 16'hFFFF, src: 16'h0000, cmd: CMD_BRS, npat: 16'd59, plen: 8'd200}, 16'd59, 0);
    send('{dst: 16'h0000, src: 16'h0007, cmd: CMD_PAS, npat: 16'd0, plen: 8'd200}, 16'd0, 0);
    send('{dst: 16'hFFFF, src: 16'h0000, cmd: CMD_BRP, npat: 16'd46, plen: 8'd0}, 16'd100, 1);
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
