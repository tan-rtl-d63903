// tan_dut_model: behavioural model of a chip under test (testbench only).
// Combinational: dut_po = good_resp(dut_pi) on all PINS pins. When `faulty`
// is set, output pin STUCK_PIN is stuck at 1, so every pattern whose good
// response has a 0 there fails.
module tan_dut_model
  import tan_pkg::*;
  import tb_tan_pkg::*;
#(
  parameter int unsigned STUCK_PIN = 3
) (
  input  logic            faulty,
  input  logic [PINS-1:0] dut_pi,
  output logic [PINS-1:0] dut_po
);
  always_comb begin
    dut_po = good_resp(dut_pi, 8'd0);
    if (faulty) dut_po[STUCK_PIN] = 1'b1;
  end
endmodule
