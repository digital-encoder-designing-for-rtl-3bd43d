// Scenario testbench: the reference simulation of the interface.
//
// From reset, the encoder turns forward (A leading B) for nine edges, so the
// counter goes 0, 1, ..., 9 with dir low. It then turns back (A lagging B);
// dir goes high and the counter steps down 8, 7, 6. With the count at 6 the
// processor reads the position as two bytes: oe_n low with sel low gives the
// high byte 00, then sel high gives the low byte 06. Meanwhile the encoder
// keeps turning back to 0: the latch stays at 6 and inh stays high until oe_n
// rises after the low byte. Every counter value on the way is checked in
// order.
module tb_fig10_sequence;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        oe_n = 1'b1, sel = 1'b0;
  logic        cha, chb;
  logic        x4, dir, inh, rout_oe;
  logic [15:0] cntout;
  logic [7:0]  rout;
  int          checks = 0, failures = 0;
  int          seq [$];

  quad_encoder_model enc (.a(cha), .b(chb));

  quad_decoder_ic dut (
    .clk(clk), .rst_n(rst_n), .cha(cha), .chb(chb), .oe_n(oe_n), .sel(sel),
    .x4(x4), .dir(dir), .cntout(cntout), .inh(inh), .rout(rout), .rout_oe(rout_oe)
  );

  always #5 clk = ~clk;

  // record every counter value in order
  logic [15:0] last_cnt = '0;
  always @(posedge clk) begin
    #1;
    if (rst_n && cntout != last_cnt) seq.push_back(int'(cntout));
    last_cnt = cntout;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("t=%0t FAIL %s: cntout=%0d latch=%0d rout=%h inh=%b dir=%b", $time, what,
               cntout, dut.latch_q, rout, inh, dir);
    end
  endtask

  task automatic edges(input logic cw, input int n);
    for (int i = 0; i < n; i++) begin
      @(posedge clk);
      #2 enc.step(cw);
      repeat (9) @(posedge clk);
    end
  endtask

  initial begin
    logic [7:0] hi, lo;
    int exp_seq [$];
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    repeat (5) @(posedge clk);
    check("rout released before the read", rout_oe == 1'b0 && inh == 1'b0);
    edges(1'b1, 9);
    #1 check("counted up to 9 with dir low", cntout == 16'd9 && dir == 1'b0);
    edges(1'b0, 3);
    #1 check("counted down to 6 with dir high", cntout == 16'd6 && dir == 1'b1);
    // two-byte read while the shaft keeps turning back
    @(posedge clk);
    #2 oe_n = 1'b0;
    sel = 1'b0;
    repeat (2) @(posedge clk);
    #1 hi = rout;
    check("inh high during read", inh == 1'b1);
    edges(1'b0, 3);
    #1 check("latch held at 6 while counter moves", dut.latch_q == 16'd6 && cntout == 16'd3);
    @(posedge clk);
    #2 sel = 1'b1;
    repeat (2) @(posedge clk);
    #1 lo = rout;
    check("high byte 00", hi == 8'h00);
    check("low byte 06", lo == 8'h06);
    edges(1'b0, 3);
    #1 check("inh still high until oe_n rises", inh == 1'b1 && dut.latch_q == 16'd6 && cntout == 16'd0);
    @(posedge clk);
    #2 oe_n = 1'b1;
    repeat (2) @(posedge clk);
    #1 check("inh released", inh == 1'b0 && rout_oe == 1'b0);
    check("latch follows again", dut.latch_q == 16'd0);
    exp_seq = '{1, 2, 3, 4, 5, 6, 7, 8, 9, 8, 7, 6, 5, 4, 3, 2, 1, 0};
    check("counter sequence 0..9..0", seq == exp_seq);
    if (seq != exp_seq) foreach (seq[i]) $display("  seq[%0d] = %0d", i, seq[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
