// tb_tan_pkg: reference functions shared by the TAN testbenches.
//
// test_pattern() gives the pattern generator's data, good_resp() the
// response of a fault-free DUT. Both are independent of the RTL and are used
// by the behavioural models and by the checkers.
package tb_tan_pkg;
  import tan_pkg::*;

  function automatic logic [PINS-1:0] test_pattern(input int seq, input int pat, input logic [7:0] plen);
    logic [PINS-1:0] p;
    for (int w = 0; w < PINS / 32; w++)
      p[32*w +: 32] = 32'(((seq + 1) * 32'h9E37_79B9) ^ ((pat + 3) * 32'h85EB_CA6B) ^ (w * 32'hC2B2_AE35) ^ (pat << 7));
    return p & pat_mask(plen);
  endfunction

  function automatic logic [PINS-1:0] good_resp(input logic [PINS-1:0] pi, input logic [7:0] plen);
    return (pi ^ (pi << 1) ^ {(PINS / 32){32'hA5C3_0F96}}) & pat_mask(plen);
  endfunction

  function automatic logic [7:0] pat_byte(input logic [PINS-1:0] p, input int b);
    return p[8*b +: 8];
  endfunction
endpackage
