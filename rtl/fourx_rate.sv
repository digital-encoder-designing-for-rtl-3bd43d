// Four-times rate circuit of the quadrature decoder.
//
// Each filtered channel is delayed by one rising-edge flip-flop. The channel
// and its delayed copy differ for exactly one clock period after the channel
// changes, so XOR of each pair, ORed over both channels, gives one clock-wide
// pulse per edge of A and per edge of B: four pulses per encoder line, which
// is the count input of the position counter.
//
// Interface: clk, rst_n (active-low, clears the delay flip-flops), cha, chb
// (filtered channels), x4 (the "4xf" pulse).
// Timing: x4 is combinational from the channels and stays high from a
// channel change up to the next rising edge, where the counter samples it.
// Driven by the filters, whose outputs change on the falling edge, the pulse
// is half a clock period wide. The XOR/OR structure follows the published
// circuit; the reset is this design's choice.
module fourx_rate (
  input  logic clk,
  input  logic rst_n,
  input  logic cha,
  input  logic chb,
  output logic x4
);

  logic dcha, dchb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dcha <= 1'b0;
      dchb <= 1'b0;
    end else begin
      dcha <= cha;
      dchb <= chb;
    end
  end

  assign x4 = (cha ^ dcha) | (chb ^ dchb);

endmodule
