// Position up/down counter.
//
// A WIDTH-bit binary counter that steps once for every clock period in which
// the count input (the 4x pulse) is high: up when dn is low, down when dn is
// high. It wraps around modulo 2**WIDTH, so counter-clockwise motion from
// zero reads as a two's-complement negative number.
//
// Interface: clk, rst_n (active-low clear), cnt_en ("CNTIN"), dn ("U/D", the
// direction signal), q (count).
// Timing: q changes on the rising clock edge at the end of a period with
// cnt_en high. The width and the up/down function are the published ones; the
// published counter is clocked by the 4x signal itself, here it is a
// synchronous counter with that signal as its enable.
module updown_counter #(
  parameter int unsigned WIDTH = qd_pkg::COUNT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cnt_en,
  input  logic             dn,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= '0;
    else if (cnt_en) q <= dn ? q - 1'b1 : q + 1'b1;
  end

endmodule
