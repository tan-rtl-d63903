// tb_tan_client_ctrl: checks the test head's command interpreter on its own.
// The parser side is driven with header/payload/end events; the pattern
// buffer writes are captured, the response buffer is a 1-clock-latency
// array, `applied` is set by the testbench and the wrapper is modelled by a
// busy period ending in tx_done. Checked: BRP writes (address, byte enable,
// data) and `avail`; PAS for matching expected responses; FAI for one wrong
// byte, split into frames of at most 46 256-bit patterns with the right
// bases; ERR for expected responses ahead of `applied`; ALR repeating the
// verdict; STP isolation (ALR and SYN ignored) and RST ending it.
`timescale 1ns/1ps
module tb_tan_client_ctrl;
  import tan_pkg::*;
  localparam int DEPTH = 64, AW = 6;
  localparam logic [15:0] ME = 16'd3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic hdr_valid, pl_valid, end_valid, end_ok;
  tan_hdr_t hdr, tx_hdr;
  logic [7:0] pl_data, plen, verdict, tx_rd_data;
  logic [15:0] pl_pat, avail, applied, tx_base, tx_rd_pat;
  logic [4:0] pl_byte, tx_rd_byte;
  logic pb_we, dut_clear, tx_start, tx_busy, tx_done, tx_rd_en, isolated, verdict_valid;
  logic [AW-1:0] pb_waddr, rb_raddr;
  logic [PINS/8-1:0] pb_wbe;
  logic [PINS-1:0] pb_wdata, rb_rdata;

  tan_client_ctrl #(.DEPTH(DEPTH)) dut (.my_addr(ME), .*);

  // models
  logic [PINS-1:0] pbuf [DEPTH], rbuf [DEPTH];
  always_ff @(posedge clk) begin
    if (pb_we) for (int b = 0; b < PINS / 8; b++) if (pb_wbe[b]) pbuf[pb_waddr][8*b +: 8] <= pb_wdata[8*b +: 8];
    rb_rdata <= rbuf[rb_raddr];
  end
  int n_clear = 0;
  always @(posedge clk) if (rst_n && dut_clear) n_clear++;
  tan_hdr_t txh [$];
  logic [15:0] txb [$];
  assign tx_rd_en = 0; assign tx_rd_pat = 0; assign tx_rd_byte = 0;
  initial begin
    tx_busy = 0; tx_done = 0;
    forever begin
      @(posedge clk);
      if (rst_n && tx_start) begin
        txh.push_back(tx_hdr); txb.push_back(tx_base);
        tx_busy <= 1;
        repeat (50) @(posedge clk);
        tx_busy <= 0; tx_done <= 1;
        @(posedge clk); tx_done <= 0;
      end
    end
  end

  function automatic logic [7:0] val(int p, int y); return 8'(p * 17 + y * 5 + 3); endfunction

  task automatic frame(input logic [15:0] dst, input logic [7:0] cmd, input int npat, input logic [7:0] pl,
                       input int base, input int bad_pat = -1);
    int pb;
    pb = (pl == 0) ? 32 : (pl + 7) / 8;
    @(posedge clk);
    hdr_valid <= 1; hdr <= '{dst: dst, src: 0, cmd: cmd, npat: 16'(npat), plen: pl};
    @(posedge clk); hdr_valid <= 0;
    for (int p = 0; p < npat; p++)
      for (int y = 0; y < pb; y++) begin
        pl_valid <= 1; pl_pat <= 16'(p); pl_byte <= 5'(y);
        pl_data <= val(base + p, y) ^ ((base + p == bad_pat && y == 0) ? 8'h10 : 8'h00);
        @(posedge clk);
      end
    pl_valid <= 0;
    end_valid <= 1; end_ok <= 1;
    @(posedge clk); end_valid <= 0;
    repeat (3) @(posedge clk);
  endtask

  task automatic fill_resp(input int n, input logic [7:0] pl);
    int pb;
    pb = (pl == 0) ? 32 : (pl + 7) / 8;
    for (int p = 0; p < n; p++) begin
      rbuf[p] = '0;
      for (int y = 0; y < pb; y++) rbuf[p][8*y +: 8] = val(p, y);
    end
  endtask

  task automatic expect_tx(input logic [7:0] cmd, input int nframes, input int total, input string what);
    int sum;
    repeat (60 * nframes + 20) @(posedge clk);
    check(txh.size() == nframes, $sformatf("%s: %0d frames", what, txh.size()));
    sum = 0;
    while (txh.size() > 0) begin
      tan_hdr_t h; logic [15:0] b;
      h = txh.pop_front(); b = txb.pop_front();
      check(h.cmd == cmd && h.dst == ADDR_SERVER && h.src == ME, $sformatf("%s: cmd %h", what, h.cmd));
      check(b == 16'(sum), $sformatf("%s: base %0d", what, b));
      sum += h.npat;
    end
    check(sum == total, $sformatf("%s: %0d patterns", what, sum));
  endtask

  initial begin
    hdr_valid = 0; pl_valid = 0; end_valid = 0; end_ok = 0; hdr = '0; pl_data = 0; pl_pat = 0; pl_byte = 0;
    applied = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    frame(16'hFFFF, CMD_RST, 0, 8, 0);
    check(n_clear == 1, "RST clears the DUT controller");
    // BRP: 3 patterns of 16 bits
    frame(16'hFFFF, CMD_BRP, 3, 16, 0);
    check(avail == 3 && plen == 16, "avail and plen after BRP");
    for (int p = 0; p < 3; p++) check(pbuf[p][15:0] == {val(p, 1), val(p, 0)}, $sformatf("pattern %0d stored", p));
    // BRS matching -> PAS
    fill_resp(3, 16); applied = 3;
    frame(16'hFFFF, CMD_BRS, 3, 16, 0);
    expect_tx(CMD_PAS, 1, 0, "PAS");
    check(verdict_valid && verdict == CMD_PAS, "verdict PAS");
    // ALR repeats
    frame(ME, CMD_ALR, 0, 16, 0);
    expect_tx(CMD_PAS, 1, 0, "ALR repeat");
    // SYN, 50 patterns of 256 bits, one wrong byte -> FAI in 2 frames (46 + 4)
    frame(16'hFFFF, CMD_SYN, 0, 8, 0);
    check(avail == 0 && !verdict_valid, "SYN clears the sequence");
    applied = 0;
    frame(16'hFFFF, CMD_BRP, 30, 0, 0);
    frame(16'hFFFF, CMD_BRP, 20, 0, 30);
    check(avail == 50, "avail after two BRP frames");
    fill_resp(50, 0); applied = 50;
    frame(16'hFFFF, CMD_BRS, 25, 0, 0);
    check(txh.size() == 0, "no verdict before the last BRS");
    frame(16'hFFFF, CMD_BRS, 25, 0, 25, 37);
    expect_tx(CMD_FAI, 2, 50, "FAI");
    // ERR: expected responses ahead of the applied patterns
    frame(16'hFFFF, CMD_SYN, 0, 8, 0);
    applied = 0;
    frame(16'hFFFF, CMD_BRP, 4, 8, 0);
    fill_resp(4, 8); applied = 2;
    frame(16'hFFFF, CMD_BRS, 4, 8, 0);
    expect_tx(CMD_ERR, 1, 0, "late");
    // STP isolates: ALR and SYN ignored, RST ends it
    frame(16'd4, CMD_STP, 0, 8, 0);
    check(!isolated, "STP for another head ignored");
    frame(ME, CMD_STP, 0, 8, 0);
    check(isolated, "STP isolates");
    frame(ME, CMD_ALR, 0, 8, 0);
    frame(16'hFFFF, CMD_SYN, 0, 8, 0);
    expect_tx(CMD_ERR, 0, 0, "isolated");
    check(isolated, "SYN does not end isolation");
    frame(16'hFFFF, CMD_RST, 0, 8, 0);
    check(!isolated && avail == 0, "RST ends isolation");
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
