// tan_pattern_buffer: local pattern / response store of a test head.
//
// One entry per test pattern, WIDTH bits wide (the longest TAN pattern),
// written a byte lane at a time (wbe) by the frame parser or a whole entry
// at a time by the DUT controller. One synchronous read port: rdata holds
// entry raddr one clock after raddr is presented. A write and a read of the
// same entry in one clock return the old contents.
// The TAN proposal gives the buffer's purpose (store broadcast patterns so they
// can be applied in a burst); its organisation and depth are this design's.
// Contents are not reset: every entry is written before it is read.
module tan_pattern_buffer #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned NB   = WIDTH / 8
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [NB-1:0]    wbe,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we)
      for (int b = 0; b < NB; b++)
        if (wbe[b]) mem[waddr][8*b +: 8] <= wdata[8*b +: 8];
    rdata <= mem[raddr];
  end

endmodule
