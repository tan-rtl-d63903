// tb_tan_subnet_ctrl: checks the session flow of one subnetwork.
// Four clients on subnetwork 1 (addresses 5..8). The testbench grants frame
// requests after a random delay, "sends" each frame in a time set by its
// length, and answers like the clients would. Sequence 1 (100 patterns of
// 200 bits): client 0 PAS, client 1 FAI in two frames (59 + 41 patterns), client 2 silent until ALR then PAS,
// client 3 silent (forced isolation). Sequence 2 (30 patterns of 8 bits):
// client 0 ERR, client 2 PAS. The list of frames requested (CMD, destination,
// pattern count, first pattern, payload source) is compared with the one the
// protocol prescribes, the wait before BRS with patterns*TEST_CYCLES +
// WAIT_MARGIN, and the final pass and error masks.
`timescale 1ns/1ps
module tb_tan_subnet_ctrl;
  import tan_pkg::*;
  localparam int CL = 4, TC = 4, WM = 20, RT = 100, SUB = 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic start, done, frm_req, frm_exp, frm_gnt, frm_done, rx_hdr_valid;
  logic [CL-1:0] active, err_seen;
  logic [15:0] prog_nseq, seq_idx, prog_npat, frm_base;
  logic [7:0] prog_plen;
  tan_hdr_t frm_hdr, rx_hdr;

  tan_subnet_ctrl #(.SUB_ID(SUB), .CLIENTS(CL), .TEST_CYCLES(TC), .WAIT_MARGIN(WM), .RESP_TIMEOUT(RT)) dut (.*);

  assign prog_nseq = 2;
  assign prog_npat = (seq_idx == 0) ? 16'd100 : 16'd30;
  assign prog_plen = (seq_idx == 0) ? 8'd200 : 8'd8;

  typedef struct { logic [7:0] cmd; logic [15:0] dst, npat, base; bit ex; } fr_t;
  fr_t got [$];
  longint cyc = 0, brp_done_t = 0, brs_req_t = 0;
  int wait_bad = 0, brs_seen = 0;
  always @(posedge clk) cyc++;

  // answers scheduled by the testbench: {time, cmd, client}
  typedef struct { longint t; logic [7:0] cmd; int c; int n; } ans_t;
  ans_t ans [$];
  task automatic answer(input int dly, input logic [7:0] cmd, input int c, input int n = 0);
    ans.push_back('{cyc + dly, cmd, c, n});
  endtask

  // the "wrapper": grant, then done after the frame's length
  initial begin
    frm_gnt = 0; frm_done = 0;
    forever begin
      @(posedge clk);
      if (frm_req && !frm_gnt && rst_n) begin
        fr_t f;
        int len;
        repeat ($urandom_range(0, 3)) @(posedge clk);
        f = '{frm_hdr.cmd, frm_hdr.dst, frm_hdr.npat, frm_base, frm_exp};
        got.push_back(f);
        if (f.cmd == CMD_BRS && brs_seen++ == 0 && cyc - brp_done_t < 100 * TC + WM) wait_bad++;
        frm_gnt <= 1; @(posedge clk); frm_gnt <= 0;
        len = 8 + f.npat * ((frm_hdr.plen + 7) / 8);
        repeat (len < 46 ? 46 : len) @(posedge clk);
        frm_done <= 1; @(posedge clk); frm_done <= 0;
        if (f.cmd == CMD_BRP) brp_done_t = cyc;
        // client reactions
        if (f.cmd == CMD_BRS && f.base + f.npat == ((got.size() < 10) ? 100 : 30)) begin
          if (got.size() < 10) begin
            answer(5, CMD_PAS, 0); answer(9, CMD_FAI, 1, 59); answer(30, CMD_FAI, 1, 41);
          end else begin
            answer(4, CMD_ERR, 0); answer(12, CMD_PAS, 2);
          end
        end
        if (f.cmd == CMD_ALR && f.dst == 16'(SUB * CL + 1 + 2)) answer(7, CMD_PAS, 2);
      end
    end
  end
  always @(posedge clk) begin
    rx_hdr_valid <= 0;
    if (ans.size() > 0 && ans[0].t <= cyc) begin
      ans_t a;
      a = ans.pop_front();
      rx_hdr_valid <= 1;
      rx_hdr <= '{dst: ADDR_SERVER, src: 16'(SUB * CL + 1 + a.c), cmd: a.cmd, npat: 16'(a.n), plen: 8};
    end
  end

  function automatic fr_t F(logic [7:0] c, logic [15:0] d, logic [15:0] n, logic [15:0] b, bit e);
    return '{c, d, n, b, e};
  endfunction

  initial begin
    fr_t exp [$];
    start = 0; rx_hdr_valid = 0; rx_hdr = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (3) @(posedge clk);
    start <= 1; @(posedge clk); start <= 0;
    @(posedge clk);
    wait (done);
    repeat (5) @(posedge clk);
    exp = '{F(CMD_RST, 16'hFFFF, 0, 0, 0),
            F(CMD_BRP, 16'hFFFF, 59, 0, 0), F(CMD_BRP, 16'hFFFF, 41, 59, 0),
            F(CMD_BRS, 16'hFFFF, 59, 0, 1), F(CMD_BRS, 16'hFFFF, 41, 59, 1),
            F(CMD_STP, 16'd6, 0, 0, 0), F(CMD_ALR, 16'd7, 0, 0, 0), F(CMD_ALR, 16'd8, 0, 0, 0),
            F(CMD_SYN, 16'hFFFF, 0, 0, 0),
            F(CMD_BRP, 16'hFFFF, 30, 0, 0), F(CMD_BRS, 16'hFFFF, 30, 0, 1)};
    check(got.size() == exp.size(), $sformatf("%0d frames, expected %0d", got.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      check(got[i] == exp[i], $sformatf("frame %0d: cmd %h dst %h npat %0d base %0d exp %0d", i,
            got[i].cmd, got[i].dst, got[i].npat, got[i].base, got[i].ex));
    check(wait_bad == 0, "BRS waits for the predicted application time");
    check(active == 4'b0101, $sformatf("pass mask %b", active));
    check(err_seen == 4'b0001, $sformatf("error mask %b", err_seen));
    // a new batch starts with RST and brings all clients back
    got.delete();
    start <= 1; @(posedge clk); start <= 0;
    wait (got.size() > 0);
    check(got[0].cmd == CMD_RST, "new batch starts with RST");
    repeat (100) @(posedge clk);
    check(active == 4'b1111, "RST reactivates all clients");
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
