// tb_tan_top: end-to-end test of a whole Test Area Network at the default
// sizes (2 subnetworks x 32 test heads, 1024-pattern buffers).
//
// Each subnetwork's switch is a tan_switch_model, each DUT a tan_dut_model,
// and the pattern generator a tan_pattern_gen_model. Session 1 runs two test
// sequences on both subnetworks at once, with these events injected on
// subnetwork 0: test head 1 has a faulty DUT (FAI, STP), head 2 loses its
// first answer (ALR, then PAS), head 3 loses every answer (ALR, forced
// isolation), head 4 never gets the expected responses (ALR, ERR), head 5
// turns faulty in sequence 2; on subnetwork 1 head 0 has a faulty DUT.
// Session 2 restarts subnetwork 0 with no faults and checks that RST brings
// every head back. The checker counts frames on the server links by CMD,
// checks frame sizes, the predicted wait, the pass and error masks and the
// failing DUT's responses logged by the server, and counts how often each
// mechanism of the protocol happened.
`timescale 1ns/1ps
module tb_tan_top;
  import tan_pkg::*;
  import tb_tan_pkg::*;

  localparam int NSUB = 2, CPS = 32, NCLI = NSUB * CPS;
  localparam int TEST_CYCLES = 4, WAIT_MARGIN = 256;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- DUT ports
  logic [NSUB-1:0] start, done;
  logic [CPS-1:0]  pass_mask [NSUB], err_mask [NSUB];
  logic [NSUB-1:0] log_valid;
  logic [15:0]     log_src [NSUB], log_pat [NSUB];
  logic [4:0]      log_byte [NSUB];
  logic [7:0]      log_data [NSUB];
  logic [15:0]     prog_nseq, prog_seq_idx [NSUB], prog_npat [NSUB];
  logic [7:0]      prog_plen [NSUB];
  logic            pg_rd_en, pg_exp;
  logic [0:0]      pg_sub;
  logic [15:0]     pg_seq, pg_pat;
  logic [4:0]      pg_byte;
  logic [7:0]      pg_data;
  logic [NSUB-1:0] srv_tx_valid, srv_tx_ready, srv_tx_last, srv_rx_valid, srv_rx_last;
  logic [7:0]      srv_tx_data [NSUB], srv_rx_data [NSUB];
  logic [NCLI-1:0] cli_rx_valid, cli_rx_last, cli_tx_valid, cli_tx_ready, cli_tx_last, cli_isolated;
  logic [7:0]      cli_rx_data [NCLI], cli_tx_data [NCLI];
  logic [PINS-1:0] dut_pi [NCLI], dut_po [NCLI];

  tan_top u_top (.*);

  // ---- test program: sequence sizes per subnetwork
  function automatic int npat_of(int s, int seq);
    return (s == 0) ? ((seq == 0) ? 130 : 70) : ((seq == 0) ? 40 : 20);
  endfunction
  function automatic logic [7:0] plen_of(int s);
    return (s == 0) ? 8'd200 : 8'd0;   // 200-bit patterns / 256-bit patterns
  endfunction
  assign prog_nseq = 16'd2;
  for (genvar s = 0; s < NSUB; s++) begin : g_prog
    assign prog_npat[s] = 16'(npat_of(s, int'(prog_seq_idx[s])));
    assign prog_plen[s] = plen_of(s);
  end
  tan_pattern_gen_model u_pg (.clk, .pg_rd_en, .pg_exp, .pg_seq, .pg_pat, .pg_byte,
                              .plen(plen_of(int'(pg_sub))), .pg_data);

  // ---- fault injection and models
  logic [NCLI-1:0] faulty;
  logic [CPS-1:0]  drop_up_first [NSUB], drop_up_all [NSUB], drop_down [NSUB];
  for (genvar k = 0; k < NCLI; k++) begin : g_dut
    tan_dut_model u_dut (.faulty(faulty[k]), .dut_pi(dut_pi[k]), .dut_po(dut_po[k]));
  end
  for (genvar s = 0; s < NSUB; s++) begin : g_sw
    logic [7:0] crx [CPS], ctx [CPS];
    for (genvar c = 0; c < CPS; c++) begin : g_c
      assign cli_rx_data[s*CPS+c] = crx[c];
      assign ctx[c] = cli_tx_data[s*CPS+c];
    end
    tan_switch_model #(.CLI(CPS), .BASE_ADDR(s*CPS+1)) u_sw (
      .clk, .rst_n,
      .s_tx_valid(srv_tx_valid[s]), .s_tx_ready(srv_tx_ready[s]), .s_tx_data(srv_tx_data[s]),
      .s_tx_last(srv_tx_last[s]),
      .s_rx_valid(srv_rx_valid[s]), .s_rx_data(srv_rx_data[s]), .s_rx_last(srv_rx_last[s]),
      .c_rx_valid(cli_rx_valid[s*CPS +: CPS]), .c_rx_data(crx), .c_rx_last(cli_rx_last[s*CPS +: CPS]),
      .c_tx_valid(cli_tx_valid[s*CPS +: CPS]), .c_tx_ready(cli_tx_ready[s*CPS +: CPS]),
      .c_tx_data(ctx), .c_tx_last(cli_tx_last[s*CPS +: CPS]),
      .drop_up_first(drop_up_first[s]), .drop_up_all(drop_up_all[s]), .drop_down(drop_down[s]),
      .drop_cmd(CMD_BRS)
    );
  end

  // ---- frame monitor on the server links
  int dn_cnt [NSUB][256], up_cnt [NSUB][256];
  int dn_len [NSUB], up_len [NSUB];
  logic [7:0] dn_cmd [NSUB], up_cmd [NSUB];
  logic [15:0] dn_npat [NSUB];
  int n_pad = 0, n_bad_len = 0, n_multi_brp = 0, n_tdm = 0, n_fai_multi = 0;
  int brp_run [NSUB], fai_frames [NSUB];
  bit in_wait [NSUB];
  longint cyc = 0, brp_end [NSUB], wait_short = 0, n_wait = 0;
  always @(posedge clk) cyc++;

  for (genvar s = 0; s < NSUB; s++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (srv_tx_valid[s] && srv_tx_ready[s]) begin
        if (dn_len[s] == 4) dn_cmd[s] = srv_tx_data[s];
        if (dn_len[s] == 5) dn_npat[s][15:8] = srv_tx_data[s];
        if (dn_len[s] == 6) dn_npat[s][7:0] = srv_tx_data[s];
        dn_len[s]++;
        if (srv_tx_last[s]) begin
          dn_cnt[s][dn_cmd[s]]++;
          if (dn_len[s] < MIN_FRAME || dn_len[s] > 1500) n_bad_len++;
          if (dn_len[s] == MIN_FRAME && dn_npat[s] == 0) n_pad++;
          // TDM: a frame on this subnetwork while the other waits for its heads
          if (in_wait[1-s]) n_tdm++;
          if (dn_cmd[s] == CMD_BRP) begin
            brp_run[s]++;
            if (brp_run[s] == 2) n_multi_brp++;
            brp_end[s] = cyc; in_wait[s] = 1;
          end else brp_run[s] = 0;
          dn_len[s] = 0;
        end
        if (dn_len[s] == 1 && in_wait[s] && dn_cmd[s] != CMD_BRP) ;
      end
      // first byte of a BRS frame ends the wait
      if (srv_tx_valid[s] && dn_len[s] == 5 && srv_tx_data[s] == CMD_BRS && in_wait[s]) begin
        in_wait[s] = 0;
        n_wait++;
        if (cyc - brp_end[s] < longint'(npat_of(s, int'(prog_seq_idx[s]))) * TEST_CYCLES + WAIT_MARGIN)
          wait_short++;
      end
      if (srv_rx_valid[s]) begin
        if (up_len[s] == 4) up_cmd[s] = srv_rx_data[s];
        up_len[s]++;
        if (srv_rx_last[s]) begin
          up_cnt[s][up_cmd[s]]++;
          if (up_cmd[s] == CMD_FAI) begin
            fai_frames[s]++;
          end
          if (up_len[s] < MIN_FRAME || up_len[s] > 1500) n_bad_len++;
          up_len[s] = 0;
        end
      end
    end
  end

  // ---- check the responses the server logs for failing heads
  int log_bytes = 0, log_bad = 0;
  always @(posedge clk) if (rst_n && log_valid[0] && log_src[0] == 16'd2 && prog_seq_idx[0] == 0) begin
    logic [PINS-1:0] r;
    r = good_resp(test_pattern(0, int'(log_pat[0]), plen_of(0)), plen_of(0));
    r[3] = 1'b1;
    log_bytes++;
    if (log_data[0] != r[8*log_byte[0] +: 8]) log_bad++;
  end

  // head 5 of subnetwork 0 becomes faulty in sequence 2 of session 1
  bit session2 = 0;
  always_comb begin
    faulty = '0;
    if (!session2) begin
      faulty[1] = 1'b1;
      faulty[5] = (prog_seq_idx[0] == 16'd1);
      faulty[CPS + 0] = 1'b1;
    end
  end

  initial begin
    for (int s = 0; s < NSUB; s++) begin
      dn_len[s] = 0; up_len[s] = 0; brp_run[s] = 0; fai_frames[s] = 0; in_wait[s] = 0;
      for (int c = 0; c < 256; c++) begin dn_cnt[s][c] = 0; up_cnt[s][c] = 0; end
      drop_up_first[s] = '0; drop_up_all[s] = '0; drop_down[s] = '0;
    end
    drop_up_first[0][2] = 1'b1;
    drop_up_all[0][3]   = 1'b1;
    drop_down[0][4]     = 1'b1;
    start = '0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    // ---- session 1 on both subnetworks
    start = 2'b11;
    @(posedge clk); start = '0;
    wait (done == 2'b11);
    repeat (2000) @(posedge clk);   // let the last answers pass the monitor
    begin
      logic [CPS-1:0] exp0, exp1, eexp0;
      exp0 = '1; exp0[1] = 0; exp0[3] = 0; exp0[5] = 0;
      exp1 = '1; exp1[0] = 0;
      eexp0 = '0; eexp0[4] = 1;
      check(pass_mask[0] == exp0, $sformatf("pass mask 0 = %h", pass_mask[0]));
      check(pass_mask[1] == exp1, $sformatf("pass mask 1 = %h", pass_mask[1]));
      check(err_mask[0] == eexp0, $sformatf("err mask 0 = %h", err_mask[0]));
      check(err_mask[1] == '0, "err mask 1");
    end
    // frames sent by the server on subnetwork 0: 130 then 70 200-bit patterns,
    // 59 per frame -> 3 + 2 BRP and BRS frames
    check(dn_cnt[0][CMD_RST] == 1, "sub0 RST count");
    check(dn_cnt[0][CMD_BRP] == 5, $sformatf("sub0 BRP count %0d", dn_cnt[0][CMD_BRP]));
    check(dn_cnt[0][CMD_BRS] == 5, $sformatf("sub0 BRS count %0d", dn_cnt[0][CMD_BRS]));
    check(dn_cnt[0][CMD_SYN] == 1, "sub0 SYN count");
    check(dn_cnt[0][CMD_STP] == 2, $sformatf("sub0 STP count %0d", dn_cnt[0][CMD_STP]));
    check(dn_cnt[0][CMD_ALR] == 4, $sformatf("sub0 ALR count %0d", dn_cnt[0][CMD_ALR]));
    // subnetwork 1: 40 and 20 256-bit patterns, 46 per frame -> 1 frame each
    check(dn_cnt[1][CMD_BRP] == 2 && dn_cnt[1][CMD_BRS] == 2, "sub1 BRP/BRS count");
    check(dn_cnt[1][CMD_STP] == 1 && dn_cnt[1][CMD_ALR] == 0, "sub1 STP/ALR count");
    // answers reaching the server on subnetwork 0 (after switch drops):
    // seq 1: PAS from 28 heads + head 2 after ALR, FAI from head 1 (3 frames),
    //        ERR from head 4 after ALR; seq 2: PAS from 28 heads (head 3 still
    //        answers but is dropped), FAI from head 5 (2 frames), ERR from head 4
    check(up_cnt[0][CMD_PAS] == 28 + 1 + 28, $sformatf("sub0 PAS count %0d", up_cnt[0][CMD_PAS]));
    check(up_cnt[0][CMD_FAI] == 3 + 2, $sformatf("sub0 FAI frames %0d", up_cnt[0][CMD_FAI]));
    check(up_cnt[0][CMD_ERR] == 2, $sformatf("sub0 ERR count %0d", up_cnt[0][CMD_ERR]));
    check(up_cnt[1][CMD_PAS] == 31 * 2 && up_cnt[1][CMD_FAI] == 1, "sub1 answers");
    check(log_bytes == 130 * 25 && log_bad == 0, $sformatf("FAI log %0d bytes, %0d wrong", log_bytes, log_bad));
    check(n_bad_len == 0, "frame lengths within 46..1500 bytes");
    check(wait_short == 0, "BRS not before the predicted application time");
    for (int k = 0; k < NCLI; k++)
      check(cli_isolated[k] == (k == 1 || k == 5 || k == CPS), $sformatf("head %0d isolation", k));

    // ---- session 2: new batch on subnetwork 0, no faults
    session2 = 1;
    drop_up_first[0] = '0; drop_up_all[0] = '0; drop_down[0] = '0;
    start = 2'b01;
    @(posedge clk); start = '0;
    @(posedge clk);
    wait (done[0]);
    @(posedge clk);
    check(pass_mask[0] == '1, "session 2: all heads pass");
    check(err_mask[0] == '0, "session 2: no errors");
    check(dn_cnt[0][CMD_RST] == 2, "session 2 RST");
    for (int k = 0; k < CPS; k++) check(!cli_isolated[k], "session 2: RST clears isolation");

    // ---- every mechanism happened
    $display("mechanisms: multi-frame BRP %0d, padded frames %0d, TDM interleave %0d, predicted waits %0d, multi-frame FAI %0d, STP %0d, ALR %0d, ERR %0d, SYN %0d, RST %0d",
             n_multi_brp, n_pad, n_tdm, n_wait, up_cnt[0][CMD_FAI], dn_cnt[0][CMD_STP], dn_cnt[0][CMD_ALR],
             up_cnt[0][CMD_ERR], dn_cnt[0][CMD_SYN], dn_cnt[0][CMD_RST]);
    check(n_multi_brp > 0, "multi-frame BRP happened");
    check(n_pad > 0, "padding happened");
    check(n_tdm > 0, "TDM interleave happened");
    check(n_wait > 0, "predicted wait happened");
    check(pass_mask[0][3] == 1'b1, "forced isolation undone by RST");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
