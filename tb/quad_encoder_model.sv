// Behavioural model of a two-channel incremental optical encoder, for
// testbenches only.
//
// The outputs a and b step through the quadrature sequence (a,b) = 00, 10,
// 11, 01 when step(1) is called (clockwise, A leading B) and through it
// backwards for step(0). set_noise() XORs a noise level onto either channel,
// so a testbench can lay short spikes over a steady signal. The model keeps
// the number of clockwise and counter-clockwise edges it produced.
module quad_encoder_model (
  output logic a,
  output logic b
);
  logic [1:0] phase = 2'd0;
  logic       na = 1'b0, nb = 1'b0;
  int         edges_cw = 0, edges_ccw = 0;

  function automatic logic [1:0] ab_of(logic [1:0] p);
    unique case (p)
      2'd0: return 2'b00;
      2'd1: return 2'b10;
      2'd2: return 2'b11;
      default: return 2'b01;
    endcase
  endfunction

  assign a = ab_of(phase)[1] ^ na;
  assign b = ab_of(phase)[0] ^ nb;

  task automatic step(input logic cw);
    if (cw) begin
      phase = phase + 2'd1;
      edges_cw++;
    end else begin
      phase = phase - 2'd1;
      edges_ccw++;
    end
  endtask

  task automatic set_noise(input logic noise_a, input logic noise_b);
    na = noise_a;
    nb = noise_b;
  endtask
endmodule
