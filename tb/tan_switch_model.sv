// tan_switch_model: behavioural model of one subnetwork's Ethernet switch
// (testbench only). Store-and-forward in both directions:
//  - a frame from the server is stored whole, then sent to every client if
//    its destination is broadcast, else to the client whose address matches
//    (client c has address BASE_ADDR + c);
//  - frames from clients are queued per port (tx_ready is always high) and
//    forwarded to the server whole, round-robin between ports.
// Fault injection for the tests: drop_up_first[c] drops the first frame
// client c sends, drop_up_all[c] every frame from client c, and
// drop_down[c] drops frames with CMD = drop_cmd addressed to client c.
module tan_switch_model #(
  parameter int unsigned CLI       = 4,
  parameter int unsigned BASE_ADDR = 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // server side
  input  logic            s_tx_valid,
  output logic            s_tx_ready,
  input  logic [7:0]      s_tx_data,
  input  logic            s_tx_last,
  output logic            s_rx_valid,
  output logic [7:0]      s_rx_data,
  output logic            s_rx_last,
  // client side
  output logic [CLI-1:0]  c_rx_valid,
  output logic [7:0]      c_rx_data [CLI],
  output logic [CLI-1:0]  c_rx_last,
  input  logic [CLI-1:0]  c_tx_valid,
  output logic [CLI-1:0]  c_tx_ready,
  input  logic [7:0]      c_tx_data [CLI],
  input  logic [CLI-1:0]  c_tx_last,
  // fault injection
  input  logic [CLI-1:0]  drop_up_first,
  input  logic [CLI-1:0]  drop_up_all,
  input  logic [CLI-1:0]  drop_down,
  input  logic [7:0]      drop_cmd
);
  logic [7:0] dq [$];         // downstream bytes
  int         dlen [$];       // downstream frame lengths
  logic [7:0] cur [$];        // frame being received from the server
  logic [7:0] rep [$];        // frame being replayed
  logic [CLI-1:0] rep_mask;
  logic [7:0] uq [CLI][$];    // upstream bytes per port
  logic [7:0] ucur [CLI][$];
  int         ulen [CLI][$];
  logic [CLI-1:0] seen_first;
  int         up_port, rr;
  logic [7:0] upf [$];        // upstream frame being forwarded

  assign s_tx_ready = 1'b1;
  assign c_tx_ready = '1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c_rx_valid <= '0; c_rx_last <= '0; s_rx_valid <= 1'b0; s_rx_last <= 1'b0; s_rx_data <= '0;
      for (int c = 0; c < CLI; c++) c_rx_data[c] <= '0;
      dq.delete(); dlen.delete(); cur.delete(); rep.delete(); upf.delete();
      for (int c = 0; c < CLI; c++) begin uq[c].delete(); ucur[c].delete(); ulen[c].delete(); end
      seen_first <= '0; rr <= 0; rep_mask <= '0;
    end else begin
      // ---- from the server
      if (s_tx_valid) begin
        cur.push_back(s_tx_data);
        if (s_tx_last) begin
          dlen.push_back(cur.size());
          foreach (cur[i]) dq.push_back(cur[i]);
          cur.delete();
        end
      end
      // ---- replay to clients
      c_rx_valid <= '0;
      c_rx_last  <= '0;
      if (rep.size() == 0 && dlen.size() > 0) begin
        int n;
        logic [15:0] dst;
        logic [CLI-1:0] m;
        n = dlen.pop_front();
        for (int i = 0; i < n; i++) rep.push_back(dq.pop_front());
        dst = {rep[0], rep[1]};
        m = '0;
        for (int c = 0; c < CLI; c++)
          if (dst == 16'hFFFF || dst == 16'(BASE_ADDR + c))
            m[c] = !(drop_down[c] && rep[4] == drop_cmd);
        rep_mask <= m;
      end else if (rep.size() > 0) begin
        logic [7:0] b;
        b = rep.pop_front();
        for (int c = 0; c < CLI; c++) begin
          c_rx_valid[c] <= rep_mask[c];
          c_rx_data[c]  <= b;
          c_rx_last[c]  <= rep_mask[c] && (rep.size() == 0);
        end
      end
      // ---- from the clients
      for (int c = 0; c < CLI; c++) begin
        if (c_tx_valid[c]) begin
          ucur[c].push_back(c_tx_data[c]);
          if (c_tx_last[c]) begin
            if (!drop_up_all[c] && !(drop_up_first[c] && !seen_first[c])) begin
              ulen[c].push_back(ucur[c].size());
              foreach (ucur[c][i]) uq[c].push_back(ucur[c][i]);
            end
            seen_first[c] <= 1'b1;
            ucur[c].delete();
          end
        end
      end
      // ---- forward to the server, whole frames, round-robin
      s_rx_valid <= 1'b0;
      s_rx_last  <= 1'b0;
      if (upf.size() == 0) begin
        for (int k = 1; k <= CLI; k++) begin
          int c;
          c = (rr + k) % CLI;
          if (upf.size() == 0 && ulen[c].size() > 0) begin
            int n;
            n = ulen[c].pop_front();
            for (int i = 0; i < n; i++) upf.push_back(uq[c].pop_front());
            rr <= c;
          end
        end
      end else begin
        s_rx_valid <= 1'b1;
        s_rx_data  <= upf.pop_front();
        s_rx_last  <= (upf.size() == 0);
      end
    end
  end
endmodule
