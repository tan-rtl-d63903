// tan_subnet_ctrl: packet distribution and client control for one
// subnetwork of the TAN server.
//
// Runs the test session of one batch of test heads:
//   1. broadcast RST;
//   2. broadcast the sequence's patterns in BRP frames (whole patterns, at
//      most 1492 payload bytes per frame);
//   3. wait the predicted application time, patterns*TEST_CYCLES +
//      WAIT_MARGIN clocks, while the shared wrapper serves other subnetworks;
//   4. broadcast the expected responses in BRS frames, then collect PAS/FAI/
//      ERR from the active clients until all have answered or RESP_TIMEOUT
//      clocks pass without a response frame; a FAI answer counts once its
//      frames have brought the responses to every pattern of the sequence,
//      so the failing DUT's full response set reaches the ATE before STP;
//   5. send STP to every client that answered FAI (it leaves the session);
//      send ALR to every client that did not answer and wait RESP_TIMEOUT for
//      each: PAS keeps it, FAI (its first frame) isolates it with STP, ERR keeps it and flags it
//      in err_seen, silence isolates it without a frame;
//   6. broadcast SYN and go on with the next sequence, or end the session.
// At the end `done` is high and `active` holds the clients that passed every
// sequence. A new `start` begins the next batch with RST.
//
// Frames are requested from the server's TDM arbiter with frm_req (held,
// with frm_hdr/frm_base/frm_exp stable, until frm_gnt) and are complete on
// frm_done. frm_exp selects expected responses instead of patterns as the
// payload source. Client c of this subnetwork has address
// SUB_ID*CLIENTS+c+1; the server is address 0.
// The session flow follows the published TAN protocol; the timeouts,
// the handling of ERR and the addresses are this design's choices.
module tan_subnet_ctrl
  import tan_pkg::*;
#(
  parameter int unsigned SUB_ID       = 0,
  parameter int unsigned CLIENTS      = 32,
  parameter int unsigned TEST_CYCLES  = 4,
  parameter int unsigned WAIT_MARGIN  = 256,
  parameter int unsigned RESP_TIMEOUT = 8192,
  localparam int unsigned CW          = (CLIENTS > 1) ? $clog2(CLIENTS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // ATE control
  input  logic               start,
  output logic               done,
  output logic [CLIENTS-1:0] active,
  output logic [CLIENTS-1:0] err_seen,
  // test program
  input  logic [15:0]        prog_nseq,
  output logic [15:0]        seq_idx,
  input  logic [15:0]        prog_npat,
  input  logic [7:0]         prog_plen,
  // frame requests
  output logic               frm_req,
  output tan_hdr_t           frm_hdr,
  output logic [15:0]        frm_base,
  output logic               frm_exp,
  input  logic               frm_gnt,
  input  logic               frm_done,
  // received headers
  input  logic               rx_hdr_valid,
  input  tan_hdr_t           rx_hdr
);

  typedef enum logic [3:0] {
    S_IDLE, S_RST, S_BRP, S_WAIT, S_BRS, S_COLLECT, S_STP, S_ALR, S_ALR_WAIT,
    S_ALR_STP, S_SYN, S_DONE
  } state_e;

  localparam logic [15:0] ADDR0 = 16'(SUB_ID * CLIENTS + 1);

  state_e             state;
  logic               in_flight;    // frame granted, waiting for frm_done
  logic [15:0]        sent_pats;
  logic [31:0]        timer;
  logic [CLIENTS-1:0] responded, failed;
  logic [CW-1:0]      ci;
  logic [15:0]        npat, frame_npat;
  logic [15:0]        fai_cnt [CLIENTS];  // responses received in FAI frames
  logic [7:0]         plen;

  // response decoding
  logic [15:0] rx_off;
  logic        rx_mine;
  logic [CW-1:0] rx_idx;
  assign rx_off  = rx_hdr.src - ADDR0;
  assign rx_mine = rx_hdr_valid && (rx_hdr.dst == ADDR_SERVER) && (32'(rx_off) < CLIENTS);
  assign rx_idx  = CW'(rx_off);

  assign frame_npat = (npat - sent_pats > max_pats(plen)) ? max_pats(plen) : npat - sent_pats;
  assign done       = (state == S_DONE);

  // Fire one frame; returns through frm_done.
  task automatic ask(input logic [15:0] dst, input logic [7:0] cmd, input logic [15:0] n,
                     input logic [15:0] base, input logic exp_data);
    frm_req  <= 1'b1;
    frm_hdr  <= '{dst: dst, src: ADDR_SERVER, cmd: cmd, npat: n, plen: plen};
    frm_base <= base;
    frm_exp  <= exp_data;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; in_flight <= 1'b0; sent_pats <= '0; timer <= '0;
      responded <= '0; failed <= '0; ci <= '0; npat <= '0; plen <= '0;
      active <= '0; err_seen <= '0; seq_idx <= '0;
      frm_req <= 1'b0; frm_hdr <= '0; frm_base <= '0; frm_exp <= 1'b0;
      for (int c = 0; c < CLIENTS; c++) fai_cnt[c] <= '0;
    end else begin
      if (frm_gnt) begin
        frm_req   <= 1'b0;
        in_flight <= 1'b1;
      end
      unique case (state)
        S_IDLE, S_DONE: if (start) begin
          seq_idx <= '0;
          state   <= S_RST;
          ask(ADDR_BCAST, CMD_RST, 16'd0, 16'd0, 1'b0);
        end
        S_RST: if (in_flight && frm_done) begin
          in_flight <= 1'b0;
          active    <= '1;
          err_seen  <= '0;
          npat      <= prog_npat;
          plen      <= prog_plen;
          sent_pats <= '0;
          state     <= S_BRP;
        end
        S_BRP, S_BRS: begin
          if (!frm_req && !in_flight) begin
            if (sent_pats < npat) begin
              ask(ADDR_BCAST, (state == S_BRP) ? CMD_BRP : CMD_BRS, frame_npat, sent_pats,
                  state == S_BRS);
              sent_pats <= sent_pats + frame_npat;
            end else if (state == S_BRP) begin
              timer <= 32'(npat) * TEST_CYCLES + WAIT_MARGIN;
              state <= S_WAIT;
            end else begin
              responded <= '0;
              failed    <= '0;
              for (int c = 0; c < CLIENTS; c++) fai_cnt[c] <= '0;
              timer     <= RESP_TIMEOUT;
              state     <= S_COLLECT;
            end
          end
          if (in_flight && frm_done) in_flight <= 1'b0;
        end
        S_WAIT: begin
          if (timer == 0) begin
            sent_pats <= '0;
            state     <= S_BRS;
          end else timer <= timer - 1;
        end
        S_COLLECT: begin
          if (rx_mine && active[rx_idx] && !responded[rx_idx]) begin
            unique case (rx_hdr.cmd)
              CMD_PAS: responded[rx_idx] <= 1'b1;
              // a FAI answer is complete once all its responses are in
              CMD_FAI: begin
                fai_cnt[rx_idx] <= fai_cnt[rx_idx] + rx_hdr.npat;
                if (fai_cnt[rx_idx] + rx_hdr.npat >= npat) begin
                  responded[rx_idx] <= 1'b1;
                  failed[rx_idx]    <= 1'b1;
                end
              end
              CMD_ERR: begin responded[rx_idx] <= 1'b1; err_seen[rx_idx] <= 1'b1; end
              default: ;
            endcase
          end
          if (rx_mine) timer <= RESP_TIMEOUT;
          else if (timer != 0) timer <= timer - 1;
          if (&(responded | ~active) || timer == 0) begin
            ci    <= '0;
            state <= S_STP;
          end
        end
        S_STP: begin
          if (!frm_req && !in_flight) begin
            if (active[ci] && failed[ci]) begin
              ask(ADDR0 + 16'(ci), CMD_STP, 16'd0, 16'd0, 1'b0);
              active[ci] <= 1'b0;
            end else if (32'(ci) == CLIENTS - 1) begin
              ci    <= '0;
              state <= S_ALR;
            end else ci <= ci + 1'b1;
          end
          if (in_flight && frm_done) in_flight <= 1'b0;
        end
        S_ALR: begin
          if (!frm_req && !in_flight) begin
            if (active[ci] && !responded[ci]) begin
              ask(ADDR0 + 16'(ci), CMD_ALR, 16'd0, 16'd0, 1'b0);
              timer <= RESP_TIMEOUT;
              state <= S_ALR_WAIT;
            end else if (32'(ci) == CLIENTS - 1) begin
              state <= S_SYN;
            end else ci <= ci + 1'b1;
          end
          if (in_flight && frm_done) in_flight <= 1'b0;
        end
        S_ALR_WAIT: begin
          if (in_flight && frm_done) in_flight <= 1'b0;
          if (!frm_req && !in_flight) begin
            if (rx_mine && rx_idx == ci) begin
              responded[ci] <= 1'b1;
              unique case (rx_hdr.cmd)
                CMD_FAI: begin
                  ask(ADDR0 + 16'(ci), CMD_STP, 16'd0, 16'd0, 1'b0);
                  state <= S_ALR_STP;
                end
                CMD_ERR: begin err_seen[ci] <= 1'b1; state <= S_ALR; end
                default: state <= S_ALR;               // PAS
              endcase
            end else if (timer == 0) begin
              active[ci] <= 1'b0;                      // force isolate
              state      <= S_ALR;
            end else timer <= timer - 1;
          end
        end
        S_ALR_STP: if (in_flight && frm_done) begin
          in_flight  <= 1'b0;
          active[ci] <= 1'b0;
          state      <= S_ALR;
        end
        S_SYN: begin
          if (!frm_req && !in_flight) begin
            if (seq_idx + 16'd1 < prog_nseq) begin
              seq_idx <= seq_idx + 16'd1;
              ask(ADDR_BCAST, CMD_SYN, 16'd0, 16'd0, 1'b0);
            end else state <= S_DONE;
          end
          if (in_flight && frm_done) begin
            in_flight <= 1'b0;
            npat      <= prog_npat;     // seq_idx already advanced
            plen      <= prog_plen;
            sent_pats <= '0;
            state     <= S_BRP;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
