// tan_frame_tx: TAN packet wrapper.
//
// On a start pulse it sends one frame: the 8 header bytes (destination,
// source, CMD, number of patterns, pattern length, most significant byte
// first), then hdr.npat patterns starting at pattern index `base`, each
// ceil(len/8) bytes with the least significant byte first, then zero bytes
// until the frame holds MIN_FRAME bytes. Payload bytes are fetched from a
// source with one clock of read latency (rd_en/rd_pat/rd_byte -> rd_data on
// the next clock), so the same wrapper serves the server's pattern generator
// and a client's response buffer.
//
// Timing: a byte is generated in stage 1 (header/pad byte registered, or a
// read issued) and pushed into a small FIFO in stage 2; the FIFO drives the
// valid/ready output, so the wrapper sends one byte per clock while tx_ready
// is high. `done` pulses when the last byte (tx_last) is accepted; `busy` is
// high from start until then. start is taken only while the sequencer is
// idle; callers wait for done before the next start.
// The header layout and padding follow the TAN protocol; the FIFO, the byte
// order and the read interface are this design's choices.
module tan_frame_tx
  import tan_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  tan_hdr_t        hdr,
  input  logic [15:0]     base,
  output logic            busy,
  output logic            done,
  // payload source
  output logic            rd_en,
  output logic [15:0]     rd_pat,
  output logic [4:0]      rd_byte,
  input  logic [7:0]      rd_data,
  // frame stream
  output logic            tx_valid,
  input  logic            tx_ready,
  output logic [7:0]      tx_data,
  output logic            tx_last
);

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_PAY, S_PAD} state_e;
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  state_e        state;
  tan_hdr_t      h;
  logic [63:0]   hbits;
  logic [15:0]   pat_cnt, pat_idx;
  logic [5:0]    byte_idx, pb;
  logic [10:0]   sent;          // bytes generated so far in this frame
  logic [2:0]    hdr_idx;

  // stage-2 register
  logic          s2_valid, s2_is_rd, s2_last;
  logic [7:0]    s2_data;

  // FIFO
  logic [8:0]    fifo_q [FIFO_DEPTH];
  logic [CW-1:0] count;
  logic [$clog2(FIFO_DEPTH)-1:0] wp, rp;

  logic gen, gen_last, push, pop;
  logic [7:0] gen_byte;
  logic pay_last, pat_last_byte;

  assign hbits = h;
  assign pat_last_byte = (byte_idx == pb - 6'd1);
  assign pay_last      = pat_last_byte && (pat_cnt == h.npat - 16'd1);

  // Space for the byte generated now: FIFO content plus the one in stage 2.
  assign gen = (state != S_IDLE) && (32'(count) + 32'(s2_valid) < FIFO_DEPTH);

  always_comb begin
    gen_byte = 8'h00;
    gen_last = 1'b0;
    unique case (state)
      S_HDR: begin
        gen_byte = hbits[63 - 8*hdr_idx -: 8];
        gen_last = (hdr_idx == 3'd7) && (h.npat == 16'd0) && (sent + 11'd1 >= 11'(MIN_FRAME));
      end
      S_PAY: gen_last = pay_last && (sent + 11'd1 >= 11'(MIN_FRAME));
      S_PAD: gen_last = (sent + 11'd1 >= 11'(MIN_FRAME));
      default: ;
    endcase
  end

  assign rd_en   = gen && (state == S_PAY);
  assign rd_pat  = pat_idx;
  assign rd_byte = byte_idx[4:0];

  // stage 1: sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; h <= '0; pat_cnt <= '0; pat_idx <= '0; byte_idx <= '0;
      pb <= 6'd1; sent <= '0; hdr_idx <= '0;
    end else if (state == S_IDLE) begin
      if (start) begin
        state <= S_HDR; h <= hdr; pb <= pat_bytes(hdr.plen);
        pat_cnt <= '0; pat_idx <= base; byte_idx <= '0; sent <= '0; hdr_idx <= '0;
      end
    end else if (gen) begin
      sent <= sent + 11'd1;
      unique case (state)
        S_HDR: begin
          hdr_idx <= hdr_idx + 3'd1;
          if (hdr_idx == 3'd7)
            state <= gen_last ? S_IDLE : (h.npat != 16'd0 ? S_PAY : S_PAD);
        end
        S_PAY: begin
          if (pat_last_byte) begin
            byte_idx <= '0; pat_cnt <= pat_cnt + 16'd1; pat_idx <= pat_idx + 16'd1;
            if (pay_last) state <= gen_last ? S_IDLE : S_PAD;
          end else byte_idx <= byte_idx + 6'd1;
        end
        S_PAD: if (gen_last) state <= S_IDLE;
        default: ;
      endcase
    end
  end

  // stage 2: byte (or read data) waiting to enter the FIFO
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid <= 1'b0; s2_is_rd <= 1'b0; s2_last <= 1'b0; s2_data <= '0;
    end else begin
      s2_valid <= gen;
      s2_is_rd <= gen && (state == S_PAY);
      s2_last  <= gen_last;
      s2_data  <= gen_byte;
    end
  end

  assign push     = s2_valid;
  assign pop      = tx_valid && tx_ready;
  assign tx_valid = (count != '0);
  assign tx_data  = fifo_q[rp][7:0];
  assign tx_last  = fifo_q[rp][8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0; wp <= '0; rp <= '0;
      for (int i = 0; i < FIFO_DEPTH; i++) fifo_q[i] <= '0;
    end else begin
      if (push) begin
        fifo_q[wp] <= {s2_last, s2_is_rd ? rd_data : s2_data};
        wp <= (32'(wp) == FIFO_DEPTH - 1) ? '0 : wp + 1'b1;
      end
      if (pop) rp <= (32'(rp) == FIFO_DEPTH - 1) ? '0 : rp + 1'b1;
      count <= count + CW'(push) - CW'(pop);
    end
  end

  assign busy = (state != S_IDLE) || s2_valid || (count != '0);
  assign done = pop && tx_last;

endmodule
