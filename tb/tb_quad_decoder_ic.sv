// End-to-end testbench of the quadrature decoder/counter interface, at the
// default parameters.
//
// An encoder model drives the two raw channels; the clock runs at least four
// periods per encoder edge. The test covers, and counts:
//   - clockwise motion with short noise spikes laid on the channels, which
//     must not be counted (noise rejection by the filters);
//   - counter-clockwise motion through zero (counter wrap-around) and the
//     direction reversals between the two;
//   - a 16-bit two-byte read (high byte, then low byte) during which the
//     motor keeps turning: the counter moves on, the latch is inhibited and
//     both bytes come from the count at the start of the read;
//   - an 8-bit read of the low byte only, which does not inhibit the latch;
//   - random motion with random direction changes.
// The expected count is the signed sum of the encoder's edges. The latency
// from a raw edge to the counter (four rising edges) is checked once.
module tb_quad_decoder_ic;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        oe_n = 1'b1, sel = 1'b0;
  logic        cha, chb;
  logic        x4, dir, inh, rout_oe;
  logic [15:0] cntout;
  logic [7:0]  rout;
  int          checks = 0, failures = 0;

  // mechanism counters
  int n_up = 0, n_down = 0, n_reversal = 0, n_wrap = 0, n_noise = 0;
  int n_inh_hold = 0, n_read16 = 0, n_read8 = 0;

  quad_encoder_model enc (.a(cha), .b(chb));

  quad_decoder_ic dut (
    .clk(clk), .rst_n(rst_n), .cha(cha), .chb(chb), .oe_n(oe_n), .sel(sel),
    .x4(x4), .dir(dir), .cntout(cntout), .inh(inh), .rout(rout), .rout_oe(rout_oe)
  );

  always #5 clk = ~clk;

  logic prev_dir = 1'b0;
  always @(posedge clk) begin
    if (rst_n && x4) begin
      if (dir) n_down++;
      else     n_up++;
      if (dir != prev_dir) n_reversal++;
      prev_dir <= dir;
      if ((dir && cntout == 16'h0000) || (!dir && cntout == 16'hFFFF)) n_wrap++;
    end
    if (rst_n && inh && dut.latch_q != cntout) n_inh_hold++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] expected();
    return 16'(enc.edges_cw - enc.edges_ccw);
  endfunction

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("t=%0t FAIL %s (cntout=%h expected %h)", $time, what, cntout, expected());
    end
  endtask

  // One encoder edge, then hold for `hold` periods; with `noisy`, a one- or
  // two-period spike is laid on one channel in the middle of the hold.
  task automatic move(input logic cw, input int hold, input logic noisy);
    @(posedge clk);
    #2 enc.step(cw);
    if (noisy && hold >= 9) begin
      repeat (4) @(posedge clk);
      #2 if ($urandom_range(0, 1) == 1) enc.set_noise(1'b1, 1'b0);
         else enc.set_noise(1'b0, 1'b1);
      repeat ($urandom_range(1, 2)) @(posedge clk);
      #2 enc.set_noise(1'b0, 1'b0);
      n_noise++;
      repeat (hold - 7) @(posedge clk);
    end else begin
      repeat (hold - 1) @(posedge clk);
    end
  endtask

  task automatic settle();
    repeat (8) @(posedge clk);
    #1;
  endtask

  initial begin
    logic [15:0] at_start;
    logic [7:0]  hi, lo;
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    settle();
    check("reset count", cntout == 16'h0000 && dir == 1'b0 && inh == 1'b0);

    // latency of one edge: count steps on the fourth rising edge
    @(posedge clk);
    #2 enc.step(1'b1);
    repeat (3) @(posedge clk);
    #1 check("no count at_start 4th edge", cntout == 16'h0000);
    @(posedge clk);
    #1 check("count on 4th edge", cntout == 16'h0001);
    settle();

    // clockwise with noise spikes
    for (int i = 0; i < 40; i++) move(1'b1, 10, 1'b1);
    settle();
    check("clockwise count", cntout == expected());
    check("clockwise dir low", dir == 1'b0);

    // counter-clockwise through zero
    for (int i = 0; i < 51; i++) move(1'b0, 10, i[0]);
    settle();
    check("counter-clockwise count", cntout == expected());
    check("counter-clockwise dir high", dir == 1'b1);
    check("below zero reads as two's complement", cntout == 16'hFFF6);

    // 16-bit read while the motor keeps turning
    at_start = cntout;
    @(posedge clk);
    #2 oe_n = 1'b0;
    sel = 1'b0;
    repeat (2) @(posedge clk);
    #1 check("inh high during read", inh == 1'b1 && rout_oe == 1'b1);
    hi = rout;
    for (int i = 0; i < 12; i++) move(1'b1, 5, 1'b0);
    settle();
    check("counter moves on during read", cntout == expected() && cntout != at_start);
    check("high byte held", rout == at_start[15:8]);
    @(posedge clk);
    #2 oe_n = 1'b1;          // strobe released between the two bytes
    repeat (2) @(posedge clk);
    #1 check("inh kept between bytes", inh == 1'b1 && rout_oe == 1'b0);
    @(posedge clk);
    #2 oe_n = 1'b0;
    sel = 1'b1;
    repeat (2) @(posedge clk);
    #1 lo = rout;
    check("16-bit value is the count at read start", {hi, lo} == at_start);
    if ({hi, lo} != at_start) $display("read %h%h, count at start %h", hi, lo, at_start);
    @(posedge clk);
    #2 oe_n = 1'b1;
    repeat (3) @(posedge clk);
    #1 check("inh released", inh == 1'b0);
    check("latch follows after read", dut.latch_q == cntout);
    if ({hi, lo} == at_start) n_read16++;

    // 8-bit read: low byte only, no inhibit, follows the counter
    @(posedge clk);
    #2 oe_n = 1'b0;
    sel = 1'b1;
    for (int i = 0; i < 5; i++) begin
      move(1'b1, 6, 1'b0);
      settle();
      check("8-bit read: no inhibit", inh == 1'b0);
      check("8-bit read follows count", rout == cntout[7:0]);
    end
    n_read8++;
    @(posedge clk);
    #2 oe_n = 1'b1;
    settle();

    // random motion
    for (int i = 0; i < 2000; i++) begin
      logic cw;
      cw = ($urandom_range(0, 9) < 6);
      move(cw, $urandom_range(4, 12), ($urandom_range(0, 3) == 0));
    end
    settle();
    check("random motion count", cntout == expected());

    $display("mechanisms: up=%0d down=%0d reversal=%0d wrap=%0d noise=%0d inh_hold=%0d read16=%0d read8=%0d",
             n_up, n_down, n_reversal, n_wrap, n_noise, n_inh_hold, n_read16, n_read8);
    check("up counting happened", n_up > 0);
    check("down counting happened", n_down > 0);
    check("direction reversal happened", n_reversal > 0);
    check("wrap-around happened", n_wrap > 0);
    check("noise spikes applied", n_noise > 0);
    check("latch inhibited while counter moved", n_inh_hold > 0);
    check("16-bit read happened", n_read16 > 0);
    check("8-bit read happened", n_read8 > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
