// Read-inhibit controller.
//
// A three-state Moore machine that watches the processor's read strobes oe_n
// (output enable, active low) and sel (0: high byte, 1: low byte), sampled on
// the falling clock edge. A read of the high byte (oe_n = 0, sel = 0) from
// IDLE starts a two-byte access and raises inh, which freezes the position
// latch. The machine moves to LOW_RD once the low byte is selected while
// output is enabled, and returns to IDLE when oe_n goes high after that, which
// releases the latch. A lone low-byte read from IDLE leaves inh low: that is
// the simple 8-bit mode, which needs no inhibit.
//
// Interface: clk, rst_n (asynchronous, active low, to IDLE), oe_n, sel, inh.
// Timing: state and inh change on the falling clock edge; inh equals the
// low state bit. States, encoding, transitions and the falling-edge sampling
// follow the published state table; the reset is this design's choice.
module inhibit_logic
  import qd_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic oe_n,
  input  logic sel,
  output logic inh
);

  inh_state_e state_q, state_d;

  always_comb begin
    state_d = INH_IDLE;
    unique case (state_q)
      INH_IDLE:    state_d = (!oe_n && !sel) ? INH_HIGH_RD : INH_IDLE;
      INH_HIGH_RD: state_d = (!oe_n &&  sel) ? INH_LOW_RD  : INH_HIGH_RD;
      INH_LOW_RD:  state_d = !oe_n           ? INH_LOW_RD  : INH_IDLE;
      default:     state_d = INH_IDLE;
    endcase
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= INH_IDLE;
    else        state_q <= state_d;
  end

  assign inh = state_q[0];

endmodule
