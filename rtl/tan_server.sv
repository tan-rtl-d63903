// tan_server: the ATE side of a Test Area Network.
//
// One tan_subnet_ctrl per subnetwork runs that subnetwork's test session.
// Their frame requests share one packet wrapper (tan_frame_tx) through the
// TDM arbiter; the wrapper's byte stream goes out on the granted
// subnetwork's port only, so broadcasts reach one subnetwork at a time. The
// payload of BRP/BRS frames is read from the pattern generator port
// (pg_*: one byte per request, on pg_data one clock later; pg_exp selects
// expected responses instead of patterns). Each subnetwork port has its own
// packet parser (tan_frame_rx) whose headers feed that subnetwork's
// controller; the payload of FAI frames (the failing DUT's responses) is
// passed to the log_* outputs for the ATE control software, with the
// pattern's index in the sequence (log_pat) and its byte (log_byte).
//
// The test program is read per subnetwork: controller s shows the sequence
// it needs on prog_seq_idx[s] and expects its pattern count and length on
// prog_npat[s]/prog_plen[s]. start[s] begins a session (RST) on subnetwork
// s; done[s] and pass_mask[s] report its end.
// The split into pattern generator, packet wrapper, packet distribution and
// client control follows the published TAN server architecture; the interfaces
// are this design's choices.
module tan_server
  import tan_pkg::*;
#(
  parameter int unsigned NSUB         = 2,
  parameter int unsigned CLIENTS      = 32,
  parameter int unsigned TEST_CYCLES  = 4,
  parameter int unsigned WAIT_MARGIN  = 256,
  parameter int unsigned RESP_TIMEOUT = 8192,
  localparam int unsigned SW          = (NSUB > 1) ? $clog2(NSUB) : 1,
  localparam int unsigned CWI         = (CLIENTS > 1) ? $clog2(CLIENTS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // ATE control software
  input  logic [NSUB-1:0]    start,
  output logic [NSUB-1:0]    done,
  output logic [CLIENTS-1:0] pass_mask [NSUB],
  output logic [CLIENTS-1:0] err_mask  [NSUB],
  // test program
  input  logic [15:0]        prog_nseq,
  output logic [15:0]        prog_seq_idx [NSUB],
  input  logic [15:0]        prog_npat    [NSUB],
  input  logic [7:0]         prog_plen    [NSUB],
  // pattern generator
  output logic               pg_rd_en,
  output logic               pg_exp,
  output logic [SW-1:0]      pg_sub,
  output logic [15:0]        pg_seq,
  output logic [15:0]        pg_pat,
  output logic [4:0]         pg_byte,
  input  logic [7:0]         pg_data,
  // subnetwork links (MAC client side)
  output logic [NSUB-1:0]    tx_valid,
  input  logic [NSUB-1:0]    tx_ready,
  output logic [7:0]         tx_data [NSUB],
  output logic [NSUB-1:0]    tx_last,
  input  logic [NSUB-1:0]    rx_valid,
  input  logic [7:0]         rx_data [NSUB],
  input  logic [NSUB-1:0]    rx_last,
  // responses of failing clients
  output logic [NSUB-1:0]    log_valid,
  output logic [15:0]        log_src  [NSUB],
  output logic [15:0]        log_pat  [NSUB],
  output logic [4:0]         log_byte [NSUB],
  output logic [7:0]         log_data [NSUB]
);

  logic [NSUB-1:0] frm_req, frm_exp, gnt;
  tan_hdr_t        frm_hdr  [NSUB];
  logic [15:0]     frm_base [NSUB];
  logic [SW-1:0]   owner;
  logic            arb_busy, w_busy, w_done;
  logic            w_valid, w_last;
  logic [7:0]      w_data;

  tan_hdr_t        rx_hdr   [NSUB];
  logic [NSUB-1:0] rx_hdr_valid;
  logic [NSUB-1:0] rx_pl_valid;
  logic [7:0]      rx_pl_data [NSUB];
  logic [15:0]     rx_pl_pat  [NSUB];
  logic [4:0]      rx_pl_byte [NSUB];
  logic [NSUB-1:0] rx_end_valid, rx_end_ok;

  for (genvar s = 0; s < NSUB; s++) begin : g_sub
    tan_subnet_ctrl #(
      .SUB_ID(s), .CLIENTS(CLIENTS), .TEST_CYCLES(TEST_CYCLES),
      .WAIT_MARGIN(WAIT_MARGIN), .RESP_TIMEOUT(RESP_TIMEOUT)
    ) u_ctrl (
      .clk, .rst_n,
      .start(start[s]), .done(done[s]), .active(pass_mask[s]), .err_seen(err_mask[s]),
      .prog_nseq, .seq_idx(prog_seq_idx[s]), .prog_npat(prog_npat[s]), .prog_plen(prog_plen[s]),
      .frm_req(frm_req[s]), .frm_hdr(frm_hdr[s]), .frm_base(frm_base[s]), .frm_exp(frm_exp[s]),
      .frm_gnt(gnt[s]), .frm_done(w_done && (owner == SW'(s))),
      .rx_hdr_valid(rx_hdr_valid[s]), .rx_hdr(rx_hdr[s])
    );

    tan_frame_rx u_rx (
      .clk, .rst_n, .my_addr(ADDR_SERVER),
      .rx_valid(rx_valid[s]), .rx_data(rx_data[s]), .rx_last(rx_last[s]),
      .hdr_valid(rx_hdr_valid[s]), .hdr(rx_hdr[s]),
      .pl_valid(rx_pl_valid[s]), .pl_data(rx_pl_data[s]), .pl_pat(rx_pl_pat[s]), .pl_byte(rx_pl_byte[s]),
      .end_valid(rx_end_valid[s]), .end_ok(rx_end_ok[s])
    );

    // FAI payload to the log. A client's responses may span several FAI
    // frames, interleaved with other clients' frames by the switch, so the
    // patterns already received from each client are counted to give the
    // log an absolute pattern index. The counts restart with each BRS.
    localparam logic [15:0] ADDR0 = 16'(s * CLIENTS + 1);
    logic              fai_frame;
    logic [15:0]       fai_base;
    logic [15:0]       fai_off [CLIENTS];
    logic [15:0]       src_off;
    assign src_off = rx_hdr[s].src - ADDR0;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        fai_frame <= 1'b0; log_src[s] <= '0; fai_base <= '0;
        for (int c = 0; c < CLIENTS; c++) fai_off[c] <= '0;
      end else begin
        if (rx_hdr_valid[s]) begin
          fai_frame  <= (rx_hdr[s].cmd == CMD_FAI) && (32'(src_off) < CLIENTS);
          log_src[s] <= rx_hdr[s].src;
          fai_base   <= fai_off[CWI'(src_off)];
        end
        if (gnt[s] && frm_hdr[s].cmd == CMD_BRS)
          for (int c = 0; c < CLIENTS; c++) fai_off[c] <= '0;
        else if (rx_hdr_valid[s] && rx_hdr[s].cmd == CMD_FAI && 32'(src_off) < CLIENTS)
          fai_off[CWI'(src_off)] <= fai_off[CWI'(src_off)] + rx_hdr[s].npat;
      end
    end
    assign log_valid[s] = rx_pl_valid[s] && fai_frame;
    assign log_pat[s]   = fai_base + rx_pl_pat[s];
    assign log_byte[s]  = rx_pl_byte[s];
    assign log_data[s]  = rx_pl_data[s];

    // wrapper output goes to the granted subnetwork only
    assign tx_valid[s] = w_valid && arb_busy && (owner == SW'(s));
    assign tx_data[s]  = w_data;
    assign tx_last[s]  = w_last;
  end

  tan_tdm_arbiter #(.N(NSUB)) u_arb (
    .clk, .rst_n, .req(frm_req), .done(w_done), .gnt, .owner, .busy(arb_busy)
  );

  tan_frame_tx u_tx (
    .clk, .rst_n,
    .start(|gnt), .hdr(frm_hdr[owner]), .base(frm_base[owner]),
    .busy(w_busy), .done(w_done),
    .rd_en(pg_rd_en), .rd_pat(pg_pat), .rd_byte(pg_byte), .rd_data(pg_data),
    .tx_valid(w_valid), .tx_ready(tx_ready[owner]), .tx_data(w_data), .tx_last(w_last)
  );

  assign pg_exp = frm_exp[owner];
  assign pg_sub = owner;
  assign pg_seq = prog_seq_idx[owner];

endmodule
