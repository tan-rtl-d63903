// tb_tan_frame_rx: checks the TAN packet parser.
// Feeds frames addressed to the parser, to the broadcast address and to
// another node, with padding, gaps between bytes and one frame cut short,
// and checks the header, every payload byte with its pattern and byte
// index, the dropped padding and end_ok against values built here.
`timescale 1ns/1ps
module tb_tan_frame_rx;
  import tan_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [15:0] my_addr = 16'h0023;
  logic rx_valid, rx_last, hdr_valid, pl_valid, end_valid, end_ok;
  logic [7:0] rx_data, pl_data;
  tan_hdr_t hdr;
  logic [15:0] pl_pat;
  logic [4:0] pl_byte;

  tan_frame_rx dut (.*);

  // capture
  int n_hdr, n_end;
  tan_hdr_t last_hdr;
  bit last_ok;
  logic [7:0] pd [$];
  logic [15:0] pp [$];
  logic [4:0]  pbq [$];
  always @(posedge clk) begin
    if (hdr_valid) begin n_hdr++; last_hdr = hdr; end
    if (pl_valid) begin pd.push_back(pl_data); pp.push_back(pl_pat); pbq.push_back(pl_byte); end
    if (end_valid) begin n_end++; last_ok = end_ok; end
  end

  task automatic feed(input tan_hdr_t h, input int pad_to, input int cut, input bit accept);
    logic [7:0] f [$];
    logic [63:0] hb;
    int pb, nb;
    hb = h;
    for (int i = 0; i < 8; i++) f.push_back(hb[63-8*i -: 8]);
    pb = (h.plen == 0) ? 32 : (h.plen + 7) / 8;
    for (int p = 0; p < h.npat; p++) for (int y = 0; y < pb; y++) f.push_back(8'(p * 5 + y * 3 + 11));
    nb = f.size();
    while (f.size() < pad_to) f.push_back(8'hEE);
    if (cut > 0) while (f.size() > cut) void'(f.pop_back());
    n_hdr = 0; n_end = 0; pd.delete(); pp.delete(); pbq.delete();
    foreach (f[i]) begin
      @(posedge clk);
      rx_valid <= 1; rx_data <= f[i]; rx_last <= (i == f.size() - 1);
      if ($urandom_range(0, 3) == 0) begin
        @(posedge clk); rx_valid <= 0; rx_last <= 0;
      end
    end
    @(posedge clk); rx_valid <= 0; rx_last <= 0;
    repeat (3) @(posedge clk);
    if (!accept) begin
      check(n_hdr == 0 && n_end == 0 && pd.size() == 0, "frame for another node ignored");
      return;
    end
    check(n_hdr == 1 && last_hdr == h, "header");
    check(n_end == 1, "one end");
    check(last_ok == (cut == 0), "end_ok");
    if (cut == 0) begin
      check(pd.size() == h.npat * pb, $sformatf("payload bytes %0d", pd.size()));
      for (int i = 0; i < pd.size(); i++)
        if (pd[i] != 8'((i / pb) * 5 + (i % pb) * 3 + 11) || pp[i] != 16'(i / pb) || pbq[i] != 5'(i % pb)) begin
          check(0, $sformatf("payload byte %0d", i)); break;
        end
      check(1, "payload");
    end
  endtask

  initial begin
    rx_valid = 0; rx_last = 0; rx_data = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    feed('{dst: 16'h0023, src: 0, cmd: CMD_STP, npat: 0, plen: 8'd8}, 46, 0, 1);
    feed('{dst: 16'hFFFF, src: 0, cmd: CMD_BRP, npat: 3, plen: 8'd12}, 46, 0, 1);
    feed('{dst: 16'h0024, src: 0, cmd: CMD_ALR, npat: 0, plen: 8'd8}, 46, 0, 0);
    feed('{dst: 16'hFFFF, src: 0, cmd: CMD_BRS, npat: 46, plen: 8'd0}, 0, 0, 1);
    feed('{dst: 16'hFFFF, src: 0, cmd: CMD_BRP, npat: 10, plen: 8'd64}, 0, 50, 1);
    feed('{dst: 16'h0023, src: 0, cmd: CMD_ALR, npat: 0, plen: 8'd1}, 46, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
