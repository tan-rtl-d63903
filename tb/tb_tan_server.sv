// tb_tan_server: checks the ATE server with two subnetworks of two clients.
// The testbench plays the switches and clients at the byte level: it decodes
// every frame the server sends, checks BRP/BRS payloads against the pattern
// generator model, and answers the last BRS of a sequence with PAS frames,
// except client 0 of subnetwork 1, which answers FAI carrying its 12
// captured responses.
// Checked: only one subnetwork port is active at a time (TDM), frames of one
// subnetwork are sent while the other waits for its clients, the frame
// order per subnetwork, STP to the failing client, the failure log (source,
// pattern index, byte, data) and the pass masks at the end.
`timescale 1ns/1ps
module tb_tan_server;
  import tan_pkg::*;
  import tb_tan_pkg::*;
  localparam int NSUB = 2, CL = 2, TC = 4, WM = 30, RT = 300;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [NSUB-1:0] start, done, log_valid, tx_valid, tx_ready, tx_last, rx_valid, rx_last;
  logic [CL-1:0] pass_mask [NSUB], err_mask [NSUB];
  logic [15:0] prog_nseq, prog_seq_idx [NSUB], prog_npat [NSUB], pg_seq, pg_pat;
  logic [15:0] log_src [NSUB], log_pat [NSUB];
  logic [4:0] log_byte [NSUB], pg_byte;
  logic [7:0] log_data [NSUB], prog_plen [NSUB], pg_data, tx_data [NSUB], rx_data [NSUB];
  logic pg_rd_en, pg_exp;
  logic [0:0] pg_sub;

  tan_server #(.NSUB(NSUB), .CLIENTS(CL), .TEST_CYCLES(TC), .WAIT_MARGIN(WM), .RESP_TIMEOUT(RT)) dut (.*);

  function automatic logic [7:0] plen_of(int s); return (s == 0) ? 8'd100 : 8'd24; endfunction
  function automatic int npat_of(int s, int q); return (s == 0) ? 130 : 12 + q; endfunction
  assign prog_nseq = 2;
  for (genvar s = 0; s < NSUB; s++) begin : g_p
    assign prog_npat[s] = 16'(npat_of(s, int'(prog_seq_idx[s])));
    assign prog_plen[s] = plen_of(s);
  end
  tan_pattern_gen_model u_pg (.clk, .pg_rd_en, .pg_exp, .pg_seq, .pg_pat, .pg_byte, .plen(plen_of(int'(pg_sub))), .pg_data);
  assign tx_ready = '1;

  int both_active = 0, tdm_overlap = 0, bad_payload = 0, log_bytes = 0, log_bad = 0;
  logic [7:0] cmds [NSUB][$];
  logic [7:0] fr [NSUB][$];
  logic [7:0] rxq [NSUB][$];
  int brs_pats [NSUB], brp_pats [NSUB];
  bit waiting [NSUB];

  task automatic answer(input int s, input int c, input logic [7:0] cmd, input int np, input int seq);
    logic [63:0] hb;
    int pb;
    hb = {ADDR_SERVER, 16'(s * CL + 1 + c), cmd, 16'(np), plen_of(s)};
    pb = (plen_of(s) + 7) / 8;
    for (int i = 0; i < 8; i++) rxq[s].push_back(hb[63-8*i -: 8]);
    for (int p = 0; p < np; p++) begin
      logic [PINS-1:0] r;
      r = ~good_resp(test_pattern(seq, p, plen_of(s)), plen_of(s)) & pat_mask(plen_of(s));
      for (int y = 0; y < pb; y++) rxq[s].push_back(r[8*y +: 8]);
    end
    for (int i = 8 + np * pb; i < 46; i++) rxq[s].push_back(0);
  endtask

  for (genvar s = 0; s < NSUB; s++) begin : g_link
    int frame_len_q [$];
    // send queued answer bytes, marking frame ends by length
    always @(posedge clk) begin
      rx_valid[s] <= 0; rx_last[s] <= 0;
      if (rst_n && rxq[s].size() > 0) begin
        rx_valid[s] <= 1;
        rx_data[s]  <= rxq[s].pop_front();
        rx_last[s]  <= (frame_len_q[0] == 1);
        frame_len_q[0]--;
        if (frame_len_q[0] == 0) void'(frame_len_q.pop_front());
      end
    end
    always @(posedge clk) if (rst_n && tx_valid[s]) begin
      fr[s].push_back(tx_data[s]);
      if (waiting[1 - s]) tdm_overlap++;
      if (tx_last[s]) begin
        logic [7:0] cmd;
        int np, pb, q, base;
        cmd = fr[s][4];
        np = {fr[s][5], fr[s][6]};
        pb = (fr[s][7] + 7) / 8;
        q = int'(prog_seq_idx[s]);
        cmds[s].push_back(cmd);
        if (cmd == CMD_BRP || cmd == CMD_BRS) begin
          base = (cmd == CMD_BRS) ? brs_pats[s] : brp_pats[s];
          for (int p = 0; p < np; p++) begin
            logic [PINS-1:0] v;
            v = test_pattern(q, base + p, plen_of(s));
            if (cmd == CMD_BRS) v = good_resp(v, plen_of(s));
            for (int y = 0; y < pb; y++) if (fr[s][8 + p * pb + y] != v[8*y +: 8]) bad_payload++;
          end
        end
        if (cmd == CMD_BRP) begin waiting[s] = 1; brp_pats[s] += np; end
        if (cmd == CMD_BRS) begin
          waiting[s] = 0;
          brs_pats[s] += np;
          if (brs_pats[s] == npat_of(s, q)) begin
            brs_pats[s] = 0;
            for (int c = 0; c < CL; c++) begin
              bit fail;
              fail = (s == 1 && c == 0 && q == 0);
              answer(s, c, fail ? CMD_FAI : CMD_PAS, fail ? 12 : 0, q);
              frame_len_q.push_back(fail ? 8 + 12 * 3 + 2 : 46);   // 44 bytes, padded to 46
            end
          end
        end else if (cmd == CMD_BRP) brs_pats[s] = 0;
        if (cmd == CMD_BRS || cmd == CMD_SYN) brp_pats[s] = 0;
        fr[s].delete();
      end
    end
  end
  always @(posedge clk) if (rst_n && tx_valid[0] && tx_valid[1]) both_active++;
  always @(posedge clk) if (rst_n && log_valid[1]) begin
    logic [PINS-1:0] r;
    r = ~good_resp(test_pattern(0, int'(log_pat[1]), plen_of(1)), plen_of(1)) & pat_mask(plen_of(1));
    log_bytes++;
    if (log_src[1] != 16'd3 || log_data[1] != r[8*log_byte[1] +: 8]) log_bad++;
  end

  initial begin
    logic [7:0] e0 [$], e1 [$];
    start = 0;
    foreach (brs_pats[s]) begin brs_pats[s] = 0; brp_pats[s] = 0; waiting[s] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (3) @(posedge clk);
    start <= 2'b11; @(posedge clk); start <= 0;
    @(posedge clk);
    wait (done == 2'b11);
    repeat (10) @(posedge clk);
    // 130 100-bit patterns = 13 bytes each, 114 per frame -> 2 frames
    e0 = '{CMD_RST, CMD_BRP, CMD_BRP, CMD_BRS, CMD_BRS, CMD_SYN, CMD_BRP, CMD_BRP, CMD_BRS, CMD_BRS};
    e1 = '{CMD_RST, CMD_BRP, CMD_BRS, CMD_STP, CMD_SYN, CMD_BRP, CMD_BRS};
    check(cmds[0] == e0, "subnetwork 0 frame order");
    check(cmds[1] == e1, "subnetwork 1 frame order");
    check(bad_payload == 0, $sformatf("%0d payload bytes wrong", bad_payload));
    check(both_active == 0, "one subnetwork port at a time");
    check(tdm_overlap > 0, "one subnetwork served while the other waits");
    check(pass_mask[0] == 2'b11 && pass_mask[1] == 2'b10, "pass masks");
    check(err_mask[0] == 0 && err_mask[1] == 0, "error masks");
    check(log_bytes == 36 && log_bad == 0, $sformatf("failure log %0d bytes, %0d wrong", log_bytes, log_bad));
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
