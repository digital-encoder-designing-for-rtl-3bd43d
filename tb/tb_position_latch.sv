// Self-checking testbench for the position data latch.
//
// Random counter values and random inhibit levels; the reference copies the
// input on every rising edge with inh low and holds otherwise.
module tb_position_latch;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        inh = 1'b0;
  logic [15:0] d = '0;
  logic [15:0] q;
  logic [15:0] ref_q = '0;
  int          checks = 0, failures = 0;
  int          holds = 0;

  position_latch dut (.clk(clk), .rst_n(rst_n), .inh(inh), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #2 rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      #2;
      d   = 16'($urandom);
      if ($urandom_range(0, 7) == 0) inh = ~inh;
      @(posedge clk);
      if (!inh) ref_q = d;
      else if (d != ref_q) holds++;
      #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("t=%0t q=%h expected %h inh=%b", $time, q, ref_q, inh);
      end
    end
    checks++;
    if (holds == 0) begin
      failures++;
      $display("inhibit never held a changing input");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
