// tb_tan_client: checks a whole test head at the frame level.
// Frames are fed byte by byte as a switch would; the DUT is tan_dut_model;
// the head's answers are collected with random back-pressure and decoded
// here. Covered: PAS after a good sequence, FAI with the captured responses
// as payload after a faulty one, ALR repeating the verdict, STP isolating
// the head until RST (it ignores SYN/BRP/BRS/ALR meanwhile), a frame for
// another head being ignored, ERR for expected responses that arrive before
// the patterns were applied, ERR on a pattern-buffer overflow, and ERR for
// ALR with no verdict.
`timescale 1ns/1ps
module tb_tan_client;
  import tan_pkg::*;
  import tb_tan_pkg::*;
  localparam int DEPTH = 64, TC = 3;
  localparam logic [15:0] ME = 16'd9;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic rx_valid, rx_last, tx_valid, tx_ready, tx_last, isolated, verdict_valid, faulty;
  logic [7:0] rx_data, tx_data, verdict;
  logic [PINS-1:0] dut_pi, dut_po;

  tan_client #(.PAT_DEPTH(DEPTH), .TEST_CYCLES(TC)) dut (.clk, .rst_n, .my_addr(ME), .*);
  tan_dut_model u_dut (.faulty, .dut_pi, .dut_po);

  always_ff @(posedge clk) tx_ready <= ($urandom_range(0, 3) != 0);

  // collected answer frames
  logic [7:0] cur [$];
  typedef logic [7:0] bytes_t [$];
  bytes_t frames [$];
  always @(posedge clk) if (rst_n && tx_valid && tx_ready) begin
    cur.push_back(tx_data);
    if (tx_last) begin frames.push_back(cur); cur.delete(); end
  end

  int seq = 0;
  task automatic send(input logic [15:0] dst, input logic [7:0] cmd, input int npat, input logic [7:0] plen,
                      input int base, input bit expected, input bit bad = 0);
    logic [7:0] f [$];
    logic [63:0] hb;
    int pb;
    hb = {dst, ADDR_SERVER, cmd, 16'(npat), plen};
    for (int i = 0; i < 8; i++) f.push_back(hb[63-8*i -: 8]);
    pb = (plen == 0) ? 32 : (plen + 7) / 8;
    for (int p = 0; p < npat; p++) begin
      logic [PINS-1:0] v;
      v = test_pattern(seq, base + p, plen);
      if (expected) v = good_resp(v, plen);
      for (int y = 0; y < pb; y++) f.push_back(v[8*y +: 8]);
    end
    while (f.size() < 46) f.push_back(0);
    foreach (f[i]) begin
      @(posedge clk); rx_valid <= 1; rx_data <= f[i]; rx_last <= (i == f.size() - 1);
    end
    @(posedge clk); rx_valid <= 0; rx_last <= 0;
  endtask

  task automatic expect_answer(input logic [7:0] cmd, input int npat_total, input logic [7:0] plen, input string what);
    int pb, got_pats, bad;
    repeat (400) @(posedge clk);
    pb = (plen == 0) ? 32 : (plen + 7) / 8;
    got_pats = 0; bad = 0;
    check(frames.size() >= 1, {what, ": an answer"});
    while (frames.size() > 0) begin
      bytes_t f;
      int np;
      f = frames.pop_front();
      check({f[0], f[1]} == ADDR_SERVER && {f[2], f[3]} == ME && f[4] == cmd && f[7] == plen,
            $sformatf("%s: header cmd %h", what, f[4]));
      check(f.size() >= 46 && f.size() <= 1500, {what, ": frame size"});
      np = {f[5], f[6]};
      for (int p = 0; p < np; p++) begin
        logic [PINS-1:0] r;
        r = good_resp(test_pattern(seq, got_pats + p, plen), plen);
        if (r[3] == 0 && plen > 3) r[3] = 1'b1;   // faulty DUT: pin 3 stuck at 1
        for (int y = 0; y < pb; y++) if (f[8 + p * pb + y] != r[8*y +: 8]) bad++;
      end
      got_pats += np;
    end
    check(got_pats == npat_total, $sformatf("%s: %0d patterns returned", what, got_pats));
    check(bad == 0, $sformatf("%s: %0d payload bytes wrong", what, bad));
  endtask

  task automatic expect_silence(input string what);
    repeat (300) @(posedge clk);
    check(frames.size() == 0, {what, ": no answer"});
    frames.delete();
  endtask

  initial begin
    rx_valid = 0; rx_last = 0; rx_data = 0; faulty = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // 1: good sequence -> PAS
    send(16'hFFFF, CMD_RST, 0, 8, 0, 0);
    send(16'hFFFF, CMD_BRP, 20, 40, 0, 0);
    repeat (20 * TC + 20) @(posedge clk);
    send(16'hFFFF, CMD_BRS, 20, 40, 0, 1);
    expect_answer(CMD_PAS, 0, 40, "PAS");
    // 2: faulty DUT, two BRP and two BRS frames -> FAI with responses
    seq = 1; faulty = 1;
    send(16'hFFFF, CMD_SYN, 0, 8, 0, 0);
    send(16'hFFFF, CMD_BRP, 10, 40, 0, 0);
    send(16'hFFFF, CMD_BRP, 10, 40, 10, 0);
    repeat (20 * TC + 20) @(posedge clk);
    send(16'hFFFF, CMD_BRS, 10, 40, 0, 1);
    send(16'hFFFF, CMD_BRS, 10, 40, 10, 1);
    expect_answer(CMD_FAI, 20, 40, "FAI");
    // 3: ALR repeats the verdict
    send(ME, CMD_ALR, 0, 40, 0, 0);
    expect_answer(CMD_FAI, 20, 40, "ALR repeat");
    // 4: a frame for another head is ignored
    send(ME + 1, CMD_STP, 0, 8, 0, 0);
    repeat (5) @(posedge clk);
    check(!isolated, "STP for another head ignored");
    // 5: STP isolates until RST
    send(ME, CMD_STP, 0, 8, 0, 0);
    repeat (5) @(posedge clk);
    check(isolated, "STP isolates");
    seq = 2; faulty = 0;
    send(16'hFFFF, CMD_SYN, 0, 8, 0, 0);
    send(16'hFFFF, CMD_BRP, 5, 16, 0, 0);
    repeat (30) @(posedge clk);
    send(16'hFFFF, CMD_BRS, 5, 16, 0, 1);
    send(ME, CMD_ALR, 0, 16, 0, 0);
    expect_silence("isolated head");
    check(isolated, "still isolated after SYN");
    send(16'hFFFF, CMD_RST, 0, 8, 0, 0);
    repeat (5) @(posedge clk);
    check(!isolated, "RST ends isolation");
    // 6: BRS right behind BRP: 1-byte patterns arrive faster than they are applied -> ERR
    seq = 3;
    send(16'hFFFF, CMD_BRP, 30, 8, 0, 0);
    send(16'hFFFF, CMD_BRS, 30, 8, 0, 1);
    expect_answer(CMD_ERR, 0, 8, "late BRS");
    // 7: more patterns than the buffer holds -> ERR
    seq = 4;
    send(16'hFFFF, CMD_SYN, 0, 8, 0, 0);
    send(16'hFFFF, CMD_ALR, 0, 8, 0, 0);        // broadcast ALR is not for this head
    send(ME, CMD_ALR, 0, 8, 0, 0);              // no verdict yet -> ERR
    expect_answer(CMD_ERR, 0, 8, "ALR without verdict");
    send(16'hFFFF, CMD_BRP, DEPTH + 6, 8, 0, 0);
    repeat ((DEPTH + 6) * TC + 20) @(posedge clk);
    send(16'hFFFF, CMD_BRS, DEPTH + 6, 8, 0, 1);
    expect_answer(CMD_ERR, 0, 8, "overflow");
    // 8: back to a good sequence
    seq = 5;
    send(16'hFFFF, CMD_SYN, 0, 8, 0, 0);
    send(16'hFFFF, CMD_BRP, 46, 0, 0, 0);
    repeat (46 * TC + 20) @(posedge clk);
    send(16'hFFFF, CMD_BRS, 46, 0, 0, 1);
    expect_answer(CMD_PAS, 0, 0, "PAS with 256-bit patterns");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
