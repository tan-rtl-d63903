// tan_tdm_arbiter: time-division multiplexing of the server's packet
// wrapper between subnetworks.
//
// Each subnetwork controller raises req[i] when it has a frame to send. When
// the wrapper is free the arbiter grants one requester, chosen round-robin
// starting after the last one served: gnt is a one-clock one-hot pulse and
// `owner` keeps the granted index until `done` (the frame's last byte has
// left) frees the wrapper. The TDM slot is therefore one frame, and a
// subnetwork that is waiting for its test heads does not request, so the
// wrapper serves the other subnetworks meanwhile.
// That the server multiplexes its subnetworks in time follows the published TAN proposal;
// the slot of one frame and the round-robin order are this design's choices.
module tan_tdm_arbiter #(
  parameter int unsigned N  = 2,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,
  input  logic          done,
  output logic [N-1:0]  gnt,
  output logic [IW-1:0] owner,
  output logic          busy
);

  logic [IW-1:0] last;
  logic          found;
  logic [IW-1:0] pick;

  always_comb begin
    found = 1'b0;
    pick  = last;
    for (int k = 1; k <= N; k++) begin
      int unsigned c;
      c = (int'(last) + k) % N;
      if (!found && req[c]) begin
        found = 1'b1;
        pick  = IW'(c);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last <= IW'(N - 1); owner <= '0; busy <= 1'b0; gnt <= '0;
    end else begin
      gnt <= '0;
      if (!busy) begin
        if (found) begin
          gnt        <= '0;
          gnt[pick]  <= 1'b1;
          owner      <= pick;
          last       <= pick;
          busy       <= 1'b1;
        end
      end else if (done) busy <= 1'b0;
    end
  end

  // One grant at a time, only to a requester.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  assert property (@(posedge clk) disable iff (!rst_n) (gnt != '0) |-> busy);

endmodule
