// tb_tan_workload: runs the workloads of the TAN evaluation on the default
// network, 64 test heads on two subnetworks, each as one session of one
// sequence on both subnetworks at once, test data cut into 256-bit patterns:
//  - the three ISCAS'89 test sets (s13207: 165,672 bits, s38584: 199,376
//    bits, s35932: 28,240 bits), with 3 faulty DUTs per subnetwork, so 58 of
//    64 DUTs (about 90 %) are good;
//  - the test-data-size sweep at N = 64: k * 368 bits of test data for
//    k = 2, 4, 11, 22, 32 (k is the test data per frame in units of the
//    368-bit minimum frame), 3 faulty DUTs per subnetwork;
//  - the yield sweep at k = 22: 0, 3, 8 and 16 faulty DUTs per subnetwork
//    (yield 100 %, 91 %, 75 %, 50 %).
// For the sweeps the time of the published analytic model,
// t = (H + k*Fmin) * (1 + N + k*(3 + N - Y)) / (T*k) with H = Fmin = 368
// bits and T = 100 Mb/s, is printed next to the measured time. Checked: pass masks, the bytes the server
// sends on each subnetwork (counted here from the frame format: 8 header
// bytes per frame, 46 patterns of 32 bytes per full frame, 46-byte minimum),
// the FAI frames, and that no head reports ERR. The clocks each session
// takes are printed, with the time they mean at 100 Mb/s (one byte per clock
// at 12.5 MHz) next to the time a single-site tester needs to shift the bits
// at the same rate.
`timescale 1ns/1ps
module tb_tan_workload;
  import tan_pkg::*;
  import tb_tan_pkg::*;

  localparam int NSUB = 2, CPS = 32, NCLI = NSUB * CPS;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

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

  localparam int NRUN = 12;
  // test data bits, faulty DUTs per subnetwork, k of the analytic model (0: none)
  int bits [NRUN] = '{165672, 199376, 28240, 2*368, 4*368, 11*368, 22*368, 32*368,
                      22*368, 22*368, 22*368, 22*368};
  int nbad [NRUN] = '{3, 3, 3, 3, 3, 3, 3, 3, 0, 3, 8, 16};
  int kval [NRUN] = '{0, 0, 0, 2, 4, 11, 22, 32, 22, 22, 22, 22};
  string names [NRUN] = '{"s13207", "s38584", "s35932", "k=2", "k=4", "k=11", "k=22", "k=32",
                          "yield 32/32", "yield 29/32", "yield 24/32", "yield 16/32"};
  int run = 0;
  int npat_now;
  assign npat_now = (bits[run] + 255) / 256;
  assign prog_nseq = 16'd1;
  for (genvar s = 0; s < NSUB; s++) begin : g_prog
    assign prog_npat[s] = 16'(npat_now);
    assign prog_plen[s] = 8'd0;
  end
  tan_pattern_gen_model u_pg (.clk, .pg_rd_en, .pg_exp, .pg_seq, .pg_pat, .pg_byte, .plen(8'd0), .pg_data);

  // faulty heads of a subnetwork: 3 at fixed places, otherwise every
  // (CPS / n)-th head
  function automatic logic [CPS-1:0] bad_heads(int s, int n);
    logic [CPS-1:0] m = '0;
    if (n == 3) begin
      if (s == 0) begin m[2] = 1; m[17] = 1; m[30] = 1; end
      else        begin m[5] = 1; m[6] = 1;  m[20] = 1; end
    end else
      for (int i = 0; i < n; i++) m[i * (CPS / n) + s] = 1;
    return m;
  endfunction
  logic [NCLI-1:0] faulty;
  logic [CPS-1:0] none = '0;
  assign faulty = {bad_heads(1, nbad[run]), bad_heads(0, nbad[run])};
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
      .drop_up_first(none), .drop_up_all(none), .drop_down(none), .drop_cmd(8'h00)
    );
  end

  // byte and frame counters on the server links
  longint dn_bytes [NSUB];
  int up_fai [NSUB], up_err [NSUB], up_cmd_pos [NSUB];
  logic [7:0] up_cmd [NSUB];
  for (genvar s = 0; s < NSUB; s++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (srv_tx_valid[s] && srv_tx_ready[s]) dn_bytes[s]++;
      if (srv_rx_valid[s]) begin
        if (up_cmd_pos[s] == 4) up_cmd[s] = srv_rx_data[s];
        up_cmd_pos[s]++;
        if (srv_rx_last[s]) begin
          if (up_cmd[s] == CMD_FAI) up_fai[s]++;
          if (up_cmd[s] == CMD_ERR) up_err[s]++;
          up_cmd_pos[s] = 0;
        end
      end
    end
  end

  function automatic longint frame_bytes(int np);   // one BRP/BRS or FAI train
    longint b = 0;
    int left = np;
    while (left > 0) begin
      int n;
      n = (left > 46) ? 46 : left;
      b += (8 + 32 * n < 46) ? 46 : 8 + 32 * n;
      left -= n;
    end
    return b;
  endfunction

  initial begin
    logic [CPS-1:0] exp0, exp1;
    longint t0, t1;
    start = '0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    for (run = 0; run < NRUN; run++) begin
      exp0 = ~bad_heads(0, nbad[run]);
      exp1 = ~bad_heads(1, nbad[run]);
      for (int s = 0; s < NSUB; s++) begin dn_bytes[s] = 0; up_fai[s] = 0; up_err[s] = 0; up_cmd_pos[s] = 0; end
      repeat (5) @(posedge clk);
      t0 = $time / 10;
      start = 2'b11; @(posedge clk); start = '0;
      @(posedge clk);
      wait (done == 2'b11);
      t1 = $time / 10;
      repeat (2000) @(posedge clk);   // the last FAI frame is still on the link at done
      check(pass_mask[0] == exp0 && pass_mask[1] == exp1, {names[run], ": pass masks"});
      check(err_mask[0] == '0 && err_mask[1] == '0, {names[run], ": no ERR"});
      for (int s = 0; s < NSUB; s++) begin
        // RST + BRP train + BRS train + one STP per faulty head
        longint e;
        e = 46 + 2 * frame_bytes(npat_now) + nbad[run] * 46;
        check(dn_bytes[s] == e, $sformatf("%s: subnetwork %0d sent %0d bytes, expected %0d", names[run], s, dn_bytes[s], e));
        check(up_fai[s] == nbad[run] * ((npat_now + 45) / 46), $sformatf("%s: %0d FAI frames", names[run], up_fai[s]));
        check(up_err[s] == 0, "no ERR frames");
      end
      $display("%s: %0d bits = %0d patterns of 256 bits, 64 heads, %0d good: %0d clocks = %0.6f s at 100 Mb/s; one DUT on a single-site tester at 100 Mb/s: %0.6f s, 64 DUTs: %0.6f s",
               names[run], bits[run], npat_now, NCLI - 2 * nbad[run], t1 - t0, real'(t1 - t0) / 12.5e6,
               real'(bits[run]) / 1.0e8, 64.0 * real'(bits[run]) / 1.0e8);
      if (kval[run] != 0) begin
        real k, y, ta;
        k = real'(kval[run]);
        y = real'(NCLI - 2 * nbad[run]);
        ta = (368.0 + k * 368.0) * (1.0 + 64.0 + k * (3.0 + 64.0 - y)) / (1.0e8 * k);
        $display("  analytic model: t = %0.6f s", ta);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
