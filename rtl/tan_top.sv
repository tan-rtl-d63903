// tan_top: a Test Area Network (TAN) - one ATE server and its test heads.
//
// The server (tan_server) drives NSUB subnetworks; each subnetwork holds
// CLIENTS_PER_SUBNET test heads (tan_client), each holding one DUT. In a real
// TAN every subnetwork is an Ethernet switch joining the server link to the
// test-head links; the switches, MACs and PHYs are standard parts and stay
// outside this module. Their connections are ports here:
//   srv_tx_* / srv_rx_*   server <-> switch of subnetwork s
//   cli_rx_* / cli_tx_*   switch <-> test head k
// Test head k = s*CLIENTS_PER_SUBNET + c sits on subnetwork s and has network
// address k+1; the server has address 0 and 16'hFFFF is broadcast.
// The pattern generator (pg_*), the ATE control software (start/done/
// pass_mask/err_mask/log_*) and the DUTs (dut_pi/dut_po) are also ports.
// All streams carry one byte per clock; see tan_frame_tx/tan_frame_rx.
// The architecture (server, switched subnetworks, intelligent test heads)
// follows the published TAN proposal; the sizes marked in each module are this design's.
module tan_top
  import tan_pkg::*;
#(
  parameter int unsigned NSUB               = 2,
  parameter int unsigned CLIENTS_PER_SUBNET = 32,
  parameter int unsigned PAT_DEPTH          = 1024,
  parameter int unsigned TEST_CYCLES        = 4,
  parameter int unsigned WAIT_MARGIN        = 256,
  parameter int unsigned RESP_TIMEOUT       = 8192,
  localparam int unsigned NCLI              = NSUB * CLIENTS_PER_SUBNET,
  localparam int unsigned SW                = (NSUB > 1) ? $clog2(NSUB) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // ATE control software
  input  logic [NSUB-1:0]               start,
  output logic [NSUB-1:0]               done,
  output logic [CLIENTS_PER_SUBNET-1:0] pass_mask [NSUB],
  output logic [CLIENTS_PER_SUBNET-1:0] err_mask  [NSUB],
  output logic [NSUB-1:0]               log_valid,
  output logic [15:0]                   log_src  [NSUB],
  output logic [15:0]                   log_pat  [NSUB],
  output logic [4:0]                    log_byte [NSUB],
  output logic [7:0]                    log_data [NSUB],
  // test program and pattern generator
  input  logic [15:0]                   prog_nseq,
  output logic [15:0]                   prog_seq_idx [NSUB],
  input  logic [15:0]                   prog_npat    [NSUB],
  input  logic [7:0]                    prog_plen    [NSUB],
  output logic                          pg_rd_en,
  output logic                          pg_exp,
  output logic [SW-1:0]                 pg_sub,
  output logic [15:0]                   pg_seq,
  output logic [15:0]                   pg_pat,
  output logic [4:0]                    pg_byte,
  input  logic [7:0]                    pg_data,
  // server <-> switches
  output logic [NSUB-1:0]               srv_tx_valid,
  input  logic [NSUB-1:0]               srv_tx_ready,
  output logic [7:0]                    srv_tx_data [NSUB],
  output logic [NSUB-1:0]               srv_tx_last,
  input  logic [NSUB-1:0]               srv_rx_valid,
  input  logic [7:0]                    srv_rx_data [NSUB],
  input  logic [NSUB-1:0]               srv_rx_last,
  // switches <-> test heads
  input  logic [NCLI-1:0]               cli_rx_valid,
  input  logic [7:0]                    cli_rx_data [NCLI],
  input  logic [NCLI-1:0]               cli_rx_last,
  output logic [NCLI-1:0]               cli_tx_valid,
  input  logic [NCLI-1:0]               cli_tx_ready,
  output logic [7:0]                    cli_tx_data [NCLI],
  output logic [NCLI-1:0]               cli_tx_last,
  // DUTs
  output logic [PINS-1:0]               dut_pi [NCLI],
  input  logic [PINS-1:0]               dut_po [NCLI],
  output logic [NCLI-1:0]               cli_isolated
);

  tan_server #(
    .NSUB(NSUB), .CLIENTS(CLIENTS_PER_SUBNET), .TEST_CYCLES(TEST_CYCLES),
    .WAIT_MARGIN(WAIT_MARGIN), .RESP_TIMEOUT(RESP_TIMEOUT)
  ) u_server (
    .clk, .rst_n, .start, .done, .pass_mask, .err_mask,
    .prog_nseq, .prog_seq_idx, .prog_npat, .prog_plen,
    .pg_rd_en, .pg_exp, .pg_sub, .pg_seq, .pg_pat, .pg_byte, .pg_data,
    .tx_valid(srv_tx_valid), .tx_ready(srv_tx_ready), .tx_data(srv_tx_data), .tx_last(srv_tx_last),
    .rx_valid(srv_rx_valid), .rx_data(srv_rx_data), .rx_last(srv_rx_last),
    .log_valid, .log_src, .log_pat, .log_byte, .log_data
  );

  for (genvar k = 0; k < NCLI; k++) begin : g_cli
    logic [7:0] verdict;
    logic       verdict_valid;
    tan_client #(.PAT_DEPTH(PAT_DEPTH), .TEST_CYCLES(TEST_CYCLES)) u_client (
      .clk, .rst_n, .my_addr(16'(k + 1)),
      .rx_valid(cli_rx_valid[k]), .rx_data(cli_rx_data[k]), .rx_last(cli_rx_last[k]),
      .tx_valid(cli_tx_valid[k]), .tx_ready(cli_tx_ready[k]), .tx_data(cli_tx_data[k]),
      .tx_last(cli_tx_last[k]),
      .dut_pi(dut_pi[k]), .dut_po(dut_po[k]),
      .isolated(cli_isolated[k]), .verdict, .verdict_valid
    );
  end

endmodule
