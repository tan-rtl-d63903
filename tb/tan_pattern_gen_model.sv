// tan_pattern_gen_model: behavioural model of the ATE pattern generator
// (testbench only). Answers a byte read one clock later: byte pg_byte of
// pattern pg_pat of sequence pg_seq, or of its expected response when
// pg_exp is set, for the pattern length `plen`.
module tan_pattern_gen_model
  import tan_pkg::*;
  import tb_tan_pkg::*;
(
  input  logic        clk,
  input  logic        pg_rd_en,
  input  logic        pg_exp,
  input  logic [15:0] pg_seq,
  input  logic [15:0] pg_pat,
  input  logic [4:0]  pg_byte,
  input  logic [7:0]  plen,
  output logic [7:0]  pg_data
);
  always_ff @(posedge clk)
    if (pg_rd_en) begin
      logic [PINS-1:0] p;
      p = test_pattern(int'(pg_seq), int'(pg_pat), plen);
      pg_data <= pat_byte(pg_exp ? good_resp(p, plen) : p, int'(pg_byte));
    end
endmodule
