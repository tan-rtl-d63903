// tan_frame_rx: TAN packet parser.
//
// Takes one frame byte stream (no back-pressure, one byte per clock at most)
// and collects the 8-byte TAN header. A frame whose destination is my_addr
// or the broadcast address is accepted: hdr_valid pulses for one clock with
// the header as soon as its last byte is in, then each payload byte appears
// on pl_valid/pl_data together with its pattern number (counted from 0 in
// this frame) and its byte within the pattern. Bytes past npat*ceil(len/8)
// are padding and are dropped. end_valid pulses with the frame's last byte;
// end_ok is set when the frame held the full header and declared payload.
// Frames for other addresses produce nothing.
// The header layout follows the TAN protocol; the stream interface and the
// address filter details are this design's choices.
module tan_frame_rx
  import tan_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic [15:0]  my_addr,
  input  logic         rx_valid,
  input  logic [7:0]   rx_data,
  input  logic         rx_last,
  output logic         hdr_valid,
  output tan_hdr_t     hdr,
  output logic         pl_valid,
  output logic [7:0]   pl_data,
  output logic [15:0]  pl_pat,
  output logic [4:0]   pl_byte,
  output logic         end_valid,
  output logic         end_ok
);

  logic [63:0] sh;
  logic [3:0]  hcnt;       // header bytes seen, saturates at 8
  logic        accept;     // header matched our address
  logic [15:0] pat;
  logic [5:0]  byt, pb;
  logic        pay_done;
  logic [63:0] sh_next;
  tan_hdr_t    hn;

  assign sh_next = {sh[55:0], rx_data};
  assign hn      = sh_next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; hcnt <= '0; accept <= 1'b0; pat <= '0; byt <= '0; pb <= 6'd1;
      pay_done <= 1'b0; hdr <= '0;
      hdr_valid <= 1'b0; pl_valid <= 1'b0; pl_data <= '0; pl_pat <= '0; pl_byte <= '0;
      end_valid <= 1'b0; end_ok <= 1'b0;
    end else begin
      hdr_valid <= 1'b0;
      pl_valid  <= 1'b0;
      end_valid <= 1'b0;
      if (rx_valid) begin
        if (hcnt < 4'd8) begin
          sh   <= sh_next;
          hcnt <= hcnt + 4'd1;
          if (hcnt == 4'd7) begin
            accept    <= (hn.dst == my_addr) || (hn.dst == ADDR_BCAST);
            hdr_valid <= (hn.dst == my_addr) || (hn.dst == ADDR_BCAST);
            hdr       <= hn;
            pb        <= pat_bytes(hn.plen);
            pat <= '0; byt <= '0;
            pay_done  <= (hn.npat == 16'd0);
          end
        end else if (accept && !pay_done) begin
          pl_valid <= 1'b1;
          pl_data  <= rx_data;
          pl_pat   <= pat;
          pl_byte  <= byt[4:0];
          if (byt == pb - 6'd1) begin
            byt <= '0;
            pat <= pat + 16'd1;
            if (pat == hdr.npat - 16'd1) pay_done <= 1'b1;
          end else byt <= byt + 6'd1;
        end
        if (rx_last) begin
          hcnt      <= '0;
          end_valid <= accept || ((hcnt == 4'd7) && ((hn.dst == my_addr) || (hn.dst == ADDR_BCAST)));
          // complete if the header is in and the payload finished (on this byte or before)
          end_ok    <= (hcnt == 4'd8) && (pay_done || (byt == pb - 6'd1 && pat == hdr.npat - 16'd1))
                    || (hcnt == 4'd7 && hn.npat == 16'd0);
          accept    <= 1'b0;
        end
      end
    end
  end

endmodule
