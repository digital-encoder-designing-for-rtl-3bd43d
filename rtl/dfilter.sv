// Digital noise filter for one quadrature channel, built as an FSM with
// datapath.
//
// The control unit is the three-in-a-row recognizer. Its output z selects a
// 2:1 multiplexer in the datapath: with z high the multiplexer passes the
// channel input x, with z low it feeds back the filter's own output. A D
// flip-flop clocked on the falling clock edge stores the result as dfout. A
// level is therefore accepted only after it was sampled on three rising edges
// in a row and still holds; shorter pulses never reach dfout.
//
// Interface: clk, rst_n (active-low clear, asynchronous), x, dfout.
// Timing: a clean level change of x reaches dfout two and a half clock
// periods after the first rising edge that samples it. The falling-edge output
// flip-flop and the mux/flip-flop datapath follow the published filter
// circuit; the asynchronous clear to 0 of both registers is this design's
// reset choice.
module dfilter (
  input  logic clk,
  input  logic rst_n,
  input  logic x,
  output logic dfout
);

  logic z;
  logic d_mux;

  recognizer u_recognizer (
    .clk  (clk),
    .rst_n(rst_n),
    .x    (x),
    .z    (z)
  );

  // Datapath: 2:1 mux (1 = input, 0 = hold) into a falling-edge flip-flop.
  assign d_mux = z ? x : dfout;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) dfout <= 1'b0;
    else        dfout <= d_mux;
  end

endmodule
