// tan_client_ctrl: command interpreter of a TAN test head.
//
// Acts on each parsed frame by its CMD field:
//   RST  clears the isolation flag and all sequence state (new batch).
//   SYN  clears the sequence state, unless the client is isolated.
//   BRP  appends the frame's patterns to the pattern buffer; the DUT
//        controller starts applying them once the frame has ended.
//   BRS  compares the expected responses, byte by byte as they arrive, with
//        the captured responses in the response buffer. When the BRS frames
//        have covered every buffered pattern the verdict is sent: PAS, or FAI
//        followed by the captured responses as payload (split into frames of
//        whole patterns), or ERR.
//   STP  (addressed to this client) isolates it: it ignores every frame but
//        RST and sends nothing until the next RST.
//   ALR  (addressed to this client) repeats the last verdict, or sends ERR
//        if there is none yet.
// ERR is also the verdict when expected responses arrive for a pattern not
// yet applied, when BRP data would overflow the buffer, or when a BRP/BRS
// frame was cut short.
//
// Timing: payload bytes are written to the pattern buffer in the clock they
// arrive (pb_we is combinational from the parser outputs). Response-buffer
// data is compared one clock after the read. Frame-end actions run one clock
// after the parser's end_valid, once the last compare is done; a verdict
// frame is requested on the clock after that.
// The commands and their meaning follow the TAN protocol; the ERR conditions,
// the ALR reply and the verdict rule are this design's reading of it.
module tan_client_ctrl
  import tan_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [15:0]      my_addr,
  // parsed frames
  input  logic             hdr_valid,
  input  tan_hdr_t         hdr,
  input  logic             pl_valid,
  input  logic [7:0]       pl_data,
  input  logic [15:0]      pl_pat,
  input  logic [4:0]       pl_byte,
  input  logic             end_valid,
  input  logic             end_ok,
  // pattern buffer write
  output logic             pb_we,
  output logic [AW-1:0]    pb_waddr,
  output logic [PINS/8-1:0] pb_wbe,
  output logic [PINS-1:0]  pb_wdata,
  // response buffer read (shared with the frame wrapper)
  output logic [AW-1:0]    rb_raddr,
  input  logic [PINS-1:0]  rb_rdata,
  // DUT controller
  output logic             dut_clear,
  output logic [7:0]       plen,
  output logic [15:0]      avail,
  input  logic [15:0]      applied,
  // response frames
  output logic             tx_start,
  output tan_hdr_t         tx_hdr,
  output logic [15:0]      tx_base,
  input  logic             tx_busy,
  input  logic             tx_done,
  input  logic             tx_rd_en,
  input  logic [15:0]      tx_rd_pat,
  input  logic [4:0]       tx_rd_byte,
  output logic [7:0]       tx_rd_data,
  // status
  output logic             isolated,
  output logic [7:0]       verdict,
  output logic             verdict_valid
);

  typedef enum logic [1:0] {T_IDLE, T_WAIT, T_NEXT} tstate_e;

  // current frame
  logic [7:0]  f_cmd;
  logic [15:0] f_npat, f_base;
  logic        f_unicast, f_use;
  logic        end_d, end_ok_d;
  // BRS compare pipeline
  logic        c_valid, c_late;
  logic [7:0]  c_exp;
  logic [4:0]  c_byte;
  logic [15:0] cmp_cnt;
  logic        seq_fail, seq_err;
  // response sending
  tstate_e     tst;
  logic        send_req;
  logic [7:0]  send_cmd;
  logic [15:0] send_done_pats, send_npat;
  logic [4:0]  trb_byte;

  logic [15:0] wr_pat, cmp_pat;
  assign wr_pat  = f_base + pl_pat;
  assign cmp_pat = f_base + pl_pat;

  // pattern buffer writes straight from the parser
  assign pb_we    = pl_valid && f_use && (f_cmd == CMD_BRP) && (32'(wr_pat) < DEPTH);
  assign pb_waddr = AW'(wr_pat);
  assign pb_wbe   = (PINS/8)'(1) << pl_byte;
  assign pb_wdata = {(PINS/8){pl_data}};

  // the response buffer is read by the wrapper while it sends, else by the compare
  assign rb_raddr   = tx_busy ? AW'(tx_rd_pat) : AW'(cmp_pat);
  assign tx_rd_data = rb_rdata[8*trb_byte +: 8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_cmd <= '0; f_npat <= '0; f_base <= '0; f_unicast <= 1'b0; f_use <= 1'b0;
      end_d <= 1'b0; end_ok_d <= 1'b0;
      c_valid <= 1'b0; c_late <= 1'b0; c_exp <= '0; c_byte <= '0;
      cmp_cnt <= '0; seq_fail <= 1'b0; seq_err <= 1'b0;
      isolated <= 1'b0; plen <= 8'd0; avail <= '0; dut_clear <= 1'b0;
      verdict <= '0; verdict_valid <= 1'b0;
      send_req <= 1'b0; send_cmd <= '0; trb_byte <= '0;
    end else begin
      dut_clear <= 1'b0;
      send_req  <= 1'b0;
      trb_byte  <= tx_rd_byte;
      end_d     <= end_valid;
      end_ok_d  <= end_ok;

      if (hdr_valid) begin
        f_cmd     <= hdr.cmd;
        f_npat    <= hdr.npat;
        f_unicast <= (hdr.dst == my_addr);
        // an isolated client listens only for RST
        f_use     <= !isolated || (hdr.cmd == CMD_RST);
        f_base    <= (hdr.cmd == CMD_BRS) ? cmp_cnt : avail;
        if (hdr.cmd == CMD_BRP && !isolated) plen <= hdr.plen;
      end

      // BRP overflow
      if (pl_valid && f_use && f_cmd == CMD_BRP && 32'(wr_pat) >= DEPTH) seq_err <= 1'b1;

      // BRS compare, stage 1: read issued this clock (rb_raddr = cmp_pat)
      c_valid <= pl_valid && f_use && (f_cmd == CMD_BRS);
      c_late  <= (cmp_pat >= applied);
      c_exp   <= pl_data;
      c_byte  <= pl_byte;
      // stage 2: compare
      if (c_valid) begin
        if (c_late) seq_err <= 1'b1;
        else if (rb_rdata[8*c_byte +: 8] != c_exp) seq_fail <= 1'b1;
      end

      if (end_d && f_use) begin
        unique case (f_cmd)
          CMD_RST: begin
            isolated <= 1'b0; avail <= '0; cmp_cnt <= '0; seq_fail <= 1'b0; seq_err <= 1'b0;
            verdict_valid <= 1'b0; dut_clear <= 1'b1;
          end
          CMD_SYN: begin
            avail <= '0; cmp_cnt <= '0; seq_fail <= 1'b0; seq_err <= 1'b0;
            verdict_valid <= 1'b0; dut_clear <= 1'b1;
          end
          CMD_STP: if (f_unicast) begin
            isolated <= 1'b1; dut_clear <= 1'b1;
          end
          CMD_BRP: begin
            if (!end_ok_d) seq_err <= 1'b1;
            avail <= (32'(avail) + 32'(f_npat) > DEPTH) ? 16'(DEPTH) : avail + f_npat;
          end
          CMD_BRS: begin
            if (!end_ok_d) seq_err <= 1'b1;
            cmp_cnt <= cmp_cnt + f_npat;
            if (cmp_cnt + f_npat >= avail) begin
              verdict_valid <= 1'b1;
              send_req      <= 1'b1;
              if (seq_err || !end_ok_d || avail == 16'd0 || (c_valid && c_late))
                send_cmd <= CMD_ERR;
              else if (seq_fail || (c_valid && rb_rdata[8*c_byte +: 8] != c_exp))
                send_cmd <= CMD_FAI;
              else
                send_cmd <= CMD_PAS;
            end
          end
          CMD_ALR: if (f_unicast) begin
            send_req <= 1'b1;
            if (!verdict_valid) send_cmd <= CMD_ERR;
          end
          default: ;
        endcase
      end
      if (send_req) verdict <= send_cmd;
    end
  end

  // response frames: PAS / ERR are header only; FAI carries the responses
  always_comb begin
    if (send_cmd != CMD_FAI)                             send_npat = 16'd0;
    else if (avail - send_done_pats > max_pats(plen))   send_npat = max_pats(plen);
    else                                                send_npat = avail - send_done_pats;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tst <= T_IDLE; tx_start <= 1'b0; tx_hdr <= '0; tx_base <= '0;
      send_done_pats <= '0;
    end else begin
      tx_start <= 1'b0;
      unique case (tst)
        T_IDLE: if (send_req && !isolated) begin
          send_done_pats <= '0;
          tst <= T_NEXT;
        end
        T_NEXT: if (!tx_busy) begin
          tx_hdr         <= '{dst: ADDR_SERVER, src: my_addr, cmd: send_cmd, npat: send_npat, plen: plen};
          tx_base        <= send_done_pats;
          send_done_pats <= send_done_pats + send_npat;
          tx_start       <= 1'b1;
          tst            <= T_WAIT;
        end
        T_WAIT: if (tx_done) begin
          tst <= (send_cmd == CMD_FAI && send_done_pats < avail && !isolated) ? T_NEXT : T_IDLE;
        end
        default: tst <= T_IDLE;
      endcase
    end
  end

endmodule
