// Self-checking testbench for the channel noise filter.
//
// Drives random runs of 1 to 7 clock periods, so some pulses are too short to
// pass and others are accepted. The reference is written from the filter's
// stated rule: on each falling edge the output takes the input if the input
// was sampled equal on the last three rising edges and still holds,
// otherwise it keeps its value. Also checks the latency of a clean step: the
// output follows 2.5 clock periods after the first rising edge that sees it.
module tb_dfilter;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic x = 1'b0;
  logic dfout;
  int   checks = 0, failures = 0;
  int   rejected = 0, accepted = 0;

  dfilter dut (.clk(clk), .rst_n(rst_n), .x(x), .dfout(dfout));

  always #5 clk = ~clk;

  logic run_val = 1'b0;
  int   run_len = 0;
  logic ref_out = 1'b0;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (run_len > 0 && run_val == x) run_len <= run_len + 1;
      else begin
        if (run_len > 0 && run_len < 3 && run_val != ref_out) rejected <= rejected + 1;
        run_val <= x;
        run_len <= 1;
      end
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      if (run_len >= 3 && run_val == x) begin
        if (ref_out != x) accepted <= accepted + 1;
        ref_out <= x;
      end
      #1;
      checks++;
      if (dfout !== ref_out) begin
        failures++;
        $display("t=%0t dfout=%b expected %b", $time, dfout, ref_out);
      end
    end
  end

  initial begin
    int left;
    time t_edge;
    left = 0;
    repeat (2) @(posedge clk);
    #2 rst_n = 1'b1;
    // clean step: latency check
    @(posedge clk);
    #2 x = 1'b1;
    @(posedge clk);
    t_edge = $time;
    @(posedge dfout);
    checks++;
    if ($time - t_edge != 25) begin
      failures++;
      $display("step latency %0t, expected 25 (2.5 periods)", $time - t_edge);
    end
    repeat (3) @(posedge clk);
    for (int i = 0; i < 6000; i++) begin
      @(posedge clk);
      #2;
      if (left == 0) begin
        x    = ~x;
        left = $urandom_range(1, 7);
      end
      left--;
    end
    repeat (8) @(posedge clk);
    checks++;
    if (rejected == 0 || accepted == 0) begin
      failures++;
      $display("coverage: rejected=%0d accepted=%0d", rejected, accepted);
    end
    $display("noise pulses rejected=%0d, levels accepted=%0d", rejected, accepted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
