// 8-bit bus interface: byte multiplexer with output buffer.
//
// Selects the high byte of the latched position when sel is low and the low
// byte when sel is high, and drives it onto the processor data bus while the
// output is enabled (oe_n low). A 16-bit value is read in two cycles, high
// byte first; an 8-bit system reads only the low byte.
//
// Interface: oe_n, sel, latch_q (16-bit latched position), rout (bus data),
// rout_oe (bus driver enable).
// Timing: combinational. The byte order (sel = 0 gives bits 15..8) follows
// the published simulation. The tri-state buffer of the original is given as
// data plus an explicit enable, rout_oe; rout is zero while not enabled, and
// a pad or the enclosing design makes the tri-state driver from the two.
module bus_interface
  import qd_pkg::*;
(
  input  logic               oe_n,
  input  logic               sel,
  input  logic [COUNT_W-1:0] latch_q,
  output logic [BUS_W-1:0]   rout,
  output logic               rout_oe
);

  assign rout_oe = ~oe_n;
  assign rout    = oe_n ? '0
                 : (sel ? latch_q[BUS_W-1:0] : latch_q[COUNT_W-1:BUS_W]);

endmodule
