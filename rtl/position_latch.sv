// Position data latch with inhibit.
//
// A WIDTH-bit register that copies the position counter on every rising
// clock edge unless inh is high. While the processor reads the two bytes of a
// 16-bit value, the inhibit logic holds inh high, so both bytes come from the
// same count even though the counter keeps running.
//
// Interface: clk, rst_n (active-low clear), inh, d (counter), q (latched
// position; q[15:8] high byte, q[7:0] low byte at the default width).
// Timing: q follows d one clock later while inh is low. The follow/hold
// function is the published one; the clocking on the rising edge and the
// clear are this design's choices.
module position_latch #(
  parameter int unsigned WIDTH = qd_pkg::COUNT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             inh,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (!inh) q <= d;
  end

endmodule
