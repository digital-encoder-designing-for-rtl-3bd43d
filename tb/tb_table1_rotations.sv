// Workload testbench: whole shaft revolutions of a 2000-line encoder.
//
// For 1 to 5 revolutions, clockwise and then counter-clockwise, the design is
// reset, the encoder model turns the shaft (2000 lines x 4 edges = 8000 edges
// per revolution, 4 clock periods per edge) and the count is read over the
// bus as a processor would: high byte, then low byte, with the latch
// inhibited. Expected clockwise readings: 1F40, 3E80, 5DC0, 7D00, 9C40
// (8000 x n). Counter-clockwise the counter holds the two's complement,
// 10000h - 8000 x n (E0C0, C180, A240, 8300, 63C0); the reference values
// E0BF, C17F, A23F, 82FF, 63BF listed for this measurement are the bitwise
// complements of the clockwise counts, one less than the two's complement,
// and that relation is checked as well.
module tb_table1_rotations;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        oe_n = 1'b1, sel = 1'b0;
  logic        cha, chb;
  logic        x4, dir, inh, rout_oe;
  logic [15:0] cntout;
  logic [7:0]  rout;
  int          checks = 0, failures = 0;

  localparam int LINES_PER_REV = 2000;
  localparam logic [15:0] CW_TABLE  [5] = '{16'h1F40, 16'h3E80, 16'h5DC0, 16'h7D00, 16'h9C40};
  localparam logic [15:0] CCW_TABLE [5] = '{16'hE0BF, 16'hC17F, 16'hA23F, 16'h82FF, 16'h63BF};

  quad_encoder_model enc (.a(cha), .b(chb));

  quad_decoder_ic dut (
    .clk(clk), .rst_n(rst_n), .cha(cha), .chb(chb), .oe_n(oe_n), .sel(sel),
    .x4(x4), .dir(dir), .cntout(cntout), .inh(inh), .rout(rout), .rout_oe(rout_oe)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_reset();
    @(posedge clk);
    #2 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #2 rst_n = 1'b1;
    repeat (2) @(posedge clk);
  endtask

  task automatic turn(input logic cw, input int revs);
    for (int e = 0; e < revs * LINES_PER_REV * 4; e++) begin
      @(posedge clk);
      #2 enc.step(cw);
      repeat (3) @(posedge clk);
    end
    repeat (8) @(posedge clk);
  endtask

  task automatic read16(output logic [15:0] v);
    @(posedge clk);
    #2 oe_n = 1'b0;
    sel = 1'b0;
    repeat (2) @(posedge clk);
    #1 v[15:8] = rout;
    @(posedge clk);
    #2 sel = 1'b1;
    repeat (2) @(posedge clk);
    #1 v[7:0] = rout;
    @(posedge clk);
    #2 oe_n = 1'b1;
    repeat (2) @(posedge clk);
  endtask

  initial begin
    logic [15:0] v;
    repeat (2) @(posedge clk);
    for (int n = 1; n <= 5; n++) begin
      do_reset();
      turn(1'b1, n);
      read16(v);
      checks++;
      if (v != CW_TABLE[n-1]) begin
        failures++;
        $display("%0d rev clockwise: read %h, expected %h", n, v, CW_TABLE[n-1]);
      end else $display("%0d rev clockwise: %h", n, v);

      do_reset();
      turn(1'b0, n);
      read16(v);
      checks++;
      if (v != 16'(32'h10000 - 8000 * n) || v != CCW_TABLE[n-1] + 16'd1 || v != ~CW_TABLE[n-1] + 16'd1) begin
        failures++;
        $display("%0d rev counter-clockwise: read %h, expected %h", n, v, 16'(32'h10000 - 8000 * n));
      end else $display("%0d rev counter-clockwise: %h (= -%0d)", n, v, 8000 * n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
