// Rotation direction decoder.
//
// Each filtered channel is delayed by one rising-edge flip-flop. The channel
// and its delayed copy form a 4-bit code {A, dA, B, dB}; while an edge moves
// through the delay stage the code takes values that name both the edge and
// the direction. Clockwise rotation (A leading B) passes through the codes 8,
// 14, 7 and 1, counter-clockwise rotation through 2, 11, 13 and 4. A 4-to-16
// one-hot decoder turns the code into 16 lines; the OR of the four clockwise
// lines is "upset", the OR of the four counter-clockwise lines "downset".
// They set and reset the direction latch, which holds its value for every
// other code (no edge in flight, or an illegal double change).
//
// Interface: clk, rst_n (active low: clears the delay flip-flops and forces
// dir low), cha, chb (filtered channels), dir.
// dir = 0: clockwise, A leading B, count up. dir = 1: counter-clockwise, A
// lagging B, count down.
// Timing: the set/reset latch of the published circuit is made here as a
// register plus a transparent bypass: dir already shows the new direction in
// the same clock period as the 4x pulse of that edge, and the register keeps
// it afterwards. The code assignment, the decoder and the two OR terms follow
// the published circuit; the bypass register is this design's synchronous
// form of the cross-coupled latch.
module dir_decoder (
  input  logic clk,
  input  logic rst_n,
  input  logic cha,
  input  logic chb,
  output logic dir
);

  logic        dcha, dchb;
  logic [3:0]  code;
  logic [15:0] q;        // one-hot demultiplexer outputs Q0..Q15
  logic        upset, downset;
  logic        dir_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dcha  <= 1'b0;
      dchb  <= 1'b0;
      dir_q <= 1'b0;
    end else begin
      dcha  <= cha;
      dchb  <= chb;
      dir_q <= dir;
    end
  end

  assign code = {cha, dcha, chb, dchb};

  // 4-to-16 demultiplexer
  always_comb begin
    q       = '0;
    q[code] = 1'b1;
  end

  assign upset   = q[8] | q[14] | q[7]  | q[1];
  assign downset = q[2] | q[11] | q[13] | q[4];

  // Set/reset latch: upset clears dir (clockwise), downset sets it.
  always_comb begin
    if (upset)        dir = 1'b0;
    else if (downset) dir = 1'b1;
    else              dir = dir_q;
  end

endmodule
