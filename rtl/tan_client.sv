// tan_client: an intelligent TAN test head.
//
// Holds one DUT. Frames from the switch are parsed (tan_frame_rx, filtering
// on my_addr and the broadcast address) and interpreted by tan_client_ctrl.
// Broadcast patterns go into the local pattern buffer; tan_dut_ctrl applies
// them to the DUT pins, one every TEST_CYCLES clocks, and stores each
// response in the response buffer. Broadcast expected responses are compared
// with the stored ones in the test head itself, and only the verdict (PAS,
// ERR, or FAI with the captured responses) goes back to the server through
// the packet wrapper (tan_frame_tx) on tx_*.
// Interface: rx_* is the MAC receive stream (no back-pressure), tx_* the MAC
// transmit stream (valid/ready), dut_pi/dut_po the DUT's PINS pins.
// The test head's partition into packet wrapper & parser and DUT control &
// pattern application follows the published TAN proposal; buffer sizes and interfaces are
// this design's choices.
module tan_client
  import tan_pkg::*;
#(
  parameter int unsigned PAT_DEPTH   = 1024,
  parameter int unsigned TEST_CYCLES = 4,
  localparam int unsigned AW         = $clog2(PAT_DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [15:0]     my_addr,
  input  logic            rx_valid,
  input  logic [7:0]      rx_data,
  input  logic            rx_last,
  output logic            tx_valid,
  input  logic            tx_ready,
  output logic [7:0]      tx_data,
  output logic            tx_last,
  output logic [PINS-1:0] dut_pi,
  input  logic [PINS-1:0] dut_po,
  output logic            isolated,
  output logic [7:0]      verdict,
  output logic            verdict_valid
);

  tan_hdr_t    p_hdr;
  logic        p_hdr_valid, p_pl_valid, p_end_valid, p_end_ok;
  logic [7:0]  p_pl_data;
  logic [15:0] p_pl_pat;
  logic [4:0]  p_pl_byte;

  logic             pb_we, rb_we;
  logic [AW-1:0]    pb_waddr, pb_raddr, rb_waddr, rb_raddr;
  logic [PINS/8-1:0] pb_wbe;
  logic [PINS-1:0]  pb_wdata, pb_rdata, rb_wdata, rb_rdata;

  logic        dut_clear, dut_busy;
  logic [7:0]  plen;
  logic [15:0] avail, applied;

  logic        t_start, t_busy, t_done, t_rd_en;
  tan_hdr_t    t_hdr;
  logic [15:0] t_base, t_rd_pat;
  logic [4:0]  t_rd_byte;
  logic [7:0]  t_rd_data;

  tan_frame_rx u_rx (
    .clk, .rst_n, .my_addr, .rx_valid, .rx_data, .rx_last,
    .hdr_valid(p_hdr_valid), .hdr(p_hdr),
    .pl_valid(p_pl_valid), .pl_data(p_pl_data), .pl_pat(p_pl_pat), .pl_byte(p_pl_byte),
    .end_valid(p_end_valid), .end_ok(p_end_ok)
  );

  tan_client_ctrl #(.DEPTH(PAT_DEPTH)) u_ctrl (
    .clk, .rst_n, .my_addr,
    .hdr_valid(p_hdr_valid), .hdr(p_hdr),
    .pl_valid(p_pl_valid), .pl_data(p_pl_data), .pl_pat(p_pl_pat), .pl_byte(p_pl_byte),
    .end_valid(p_end_valid), .end_ok(p_end_ok),
    .pb_we, .pb_waddr, .pb_wbe, .pb_wdata,
    .rb_raddr, .rb_rdata,
    .dut_clear, .plen, .avail, .applied,
    .tx_start(t_start), .tx_hdr(t_hdr), .tx_base(t_base), .tx_busy(t_busy), .tx_done(t_done),
    .tx_rd_en(t_rd_en), .tx_rd_pat(t_rd_pat), .tx_rd_byte(t_rd_byte), .tx_rd_data(t_rd_data),
    .isolated, .verdict, .verdict_valid
  );

  tan_pattern_buffer #(.DEPTH(PAT_DEPTH), .WIDTH(PINS)) u_patbuf (
    .clk, .we(pb_we), .waddr(pb_waddr), .wbe(pb_wbe), .wdata(pb_wdata),
    .raddr(pb_raddr), .rdata(pb_rdata)
  );

  tan_pattern_buffer #(.DEPTH(PAT_DEPTH), .WIDTH(PINS)) u_respbuf (
    .clk, .we(rb_we), .waddr(rb_waddr), .wbe('1), .wdata(rb_wdata),
    .raddr(rb_raddr), .rdata(rb_rdata)
  );

  tan_dut_ctrl #(.TEST_CYCLES(TEST_CYCLES), .DEPTH(PAT_DEPTH)) u_dut (
    .clk, .rst_n, .clear(dut_clear), .plen, .avail, .applied, .busy(dut_busy),
    .pb_raddr, .pb_rdata, .rb_we, .rb_waddr, .rb_wdata, .dut_pi, .dut_po
  );

  tan_frame_tx u_tx (
    .clk, .rst_n, .start(t_start), .hdr(t_hdr), .base(t_base), .busy(t_busy), .done(t_done),
    .rd_en(t_rd_en), .rd_pat(t_rd_pat), .rd_byte(t_rd_byte), .rd_data(t_rd_data),
    .tx_valid, .tx_ready, .tx_data, .tx_last
  );

endmodule
