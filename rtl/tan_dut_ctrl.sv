// tan_dut_ctrl: DUT control and pattern application of a test head.
//
// Applies the buffered patterns to the chip under test in order, as soon as
// they are in the pattern buffer (`avail` counts them). Each pattern is held
// on dut_pi for TEST_CYCLES clocks; the response on dut_po is sampled on the
// last of them, masked to the pattern length, and written to the response
// buffer at the pattern's index. `applied` counts patterns whose response is
// stored. `clear` (RST/SYN) restarts at pattern 0 and drives the pins low.
//
// Timing: the pattern buffer read has one clock of latency; pattern i+1 is
// read while pattern i is on the pins, so back-to-back patterns change the
// pins every TEST_CYCLES clocks (TEST_CYCLES >= 2). The response is sampled
// TEST_CYCLES-1 clocks after the pattern reaches the pins. A pattern of `plen` bits drives pins
// 0..plen-1, the others are held at 0.
// Applying patterns from a local buffer in a burst follows the published TAN proposal; the
// pin mapping and TEST_CYCLES are this design's choices.
module tan_dut_ctrl
  import tan_pkg::*;
#(
  parameter int unsigned TEST_CYCLES = 4,
  parameter int unsigned DEPTH       = 1024,
  localparam int unsigned AW         = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic [7:0]      plen,
  input  logic [15:0]     avail,
  output logic [15:0]     applied,
  output logic            busy,
  // pattern buffer read port
  output logic [AW-1:0]   pb_raddr,
  input  logic [PINS-1:0] pb_rdata,
  // response buffer write port
  output logic            rb_we,
  output logic [AW-1:0]   rb_waddr,
  output logic [PINS-1:0] rb_wdata,
  // DUT pins
  output logic [PINS-1:0] dut_pi,
  input  logic [PINS-1:0] dut_po
);

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_APPLY} state_e;
  localparam int unsigned TW = (TEST_CYCLES > 1) ? $clog2(TEST_CYCLES) : 1;

  state_e         state;
  logic [15:0]    idx;
  logic [TW-1:0]  tcnt;
  logic [PINS-1:0] mask;

  assign mask     = pat_mask(plen);
  // While a pattern is applied the next one is read, so it is ready in S_FETCH.
  assign pb_raddr = AW'((state == S_APPLY) ? idx + 16'd1 : idx);
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; idx <= '0; tcnt <= '0; applied <= '0; dut_pi <= '0;
      rb_we <= 1'b0; rb_waddr <= '0; rb_wdata <= '0;
    end else begin
      rb_we <= 1'b0;
      if (clear) begin
        state <= S_IDLE; idx <= '0; applied <= '0; dut_pi <= '0;
      end else begin
        unique case (state)
          S_IDLE:  if (idx < avail) state <= S_FETCH;   // read issued this clock
          S_FETCH: begin
            dut_pi <= pb_rdata & mask;
            tcnt   <= '0;
            state  <= S_APPLY;
          end
          S_APPLY: begin
            if (32'(tcnt) == TEST_CYCLES - 2) begin
              rb_we    <= 1'b1;
              rb_waddr <= AW'(idx);
              rb_wdata <= dut_po & mask;
              applied  <= idx + 16'd1;
              idx      <= idx + 16'd1;
              state    <= (idx + 16'd1 < avail) ? S_FETCH : S_IDLE;
            end else tcnt <= tcnt + 1'b1;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  initial assert (TEST_CYCLES >= 2) else $error("TEST_CYCLES must be at least 2");

endmodule
