// Three-in-a-row recognizer: the control unit of the channel noise filter.
//
// A seven-state Mealy machine samples the encoder channel x on every rising
// clock edge. It remembers whether the last samples were zeros or ones and
// how many of them came in a row (one, two, three or more). The output z is
// high while the machine has seen the same level on at least the last three
// samples and x still has that level, i.e. the input is a real level change
// and not a short noise pulse. States, their encoding and every transition
// and output follow the published next-state/output table of the filter.
//
// Interface: clk, rst_n (asynchronous, active low, to S0), x, z.
// Timing: z is combinational in the state and x (Mealy). After a clean step of
// x, z rises in the fourth clock period of the new level.
// Own choices: the reset, and the unused code 3'b111, which leads back to the
// one-sample states (S1/S2) with z low.
module recognizer
  import qd_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic x,
  output logic z
);

  rec_state_e state_q, state_d;

  always_comb begin
    state_d = REC_S0;
    z       = 1'b0;
    unique case (state_q)
      REC_S0: state_d = x ? REC_S2 : REC_S1;
      REC_S1: state_d = x ? REC_S2 : REC_S3;
      REC_S2: state_d = x ? REC_S4 : REC_S1;
      REC_S3: state_d = x ? REC_S2 : REC_S5;
      REC_S4: state_d = x ? REC_S6 : REC_S1;
      REC_S5: begin
        state_d = x ? REC_S2 : REC_S5;
        z       = ~x;
      end
      REC_S6: begin
        state_d = x ? REC_S6 : REC_S1;
        z       = x;
      end
      default: state_d = x ? REC_S2 : REC_S1;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= REC_S0;
    else        state_q <= state_d;
  end

endmodule
