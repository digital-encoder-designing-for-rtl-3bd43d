// Self-checking testbench for the three-in-a-row recognizer.
//
// The input is a random sequence of runs of 1 to 6 clock periods, so both
// short noise pulses and stable levels occur. Two independent references are
// checked every period: the sum-of-products excitation and output equations
// of the recognizer (D2, D1, D0, Z over y2 y1 y0 and x), and the plain rule
// "z is high when the last three samples and the present input are equal".
// x changes 2 time units after the rising edge; z is checked just before the
// falling edge.
module tb_recognizer;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic x = 1'b0;
  logic z;
  int   checks = 0, failures = 0;
  int   z_high = 0;

  recognizer dut (.clk(clk), .rst_n(rst_n), .x(x), .z(z));

  always #5 clk = ~clk;

  // Reference 1: excitation and output equations.
  logic [2:0] y = 3'b000;
  function automatic logic [2:0] next_eq(logic [2:0] s, logic xi);
    logic d2, d1, d0;
    d2 = (s[1] & ~s[0] & xi) | (s[2] & ~s[0] & xi) | (s[1] & s[0] & ~xi) | (s[2] & s[0] & ~xi);
    d1 = (s[2] & xi) | (~s[1] & xi) | (s[0] & xi) | (~s[2] & ~s[1] & s[0]);
    d0 = ~xi;
    return {d2, d1, d0};
  endfunction
  function automatic logic z_eq(logic [2:0] s, logic xi);
    return (s[2] & s[1] & xi) | (s[2] & s[0] & ~xi);
  endfunction

  // Reference 2: run length of equal samples.
  logic run_val = 1'b0;
  int   run_len = 0;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int left;
    left = 0;
    repeat (2) @(posedge clk);
    #2 rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(posedge clk);
      // model update with the value sampled on this edge
      y = next_eq(y, x);
      if (run_len > 0 && run_val == x) run_len++;
      else begin
        run_val = x;
        run_len = 1;
      end
      #2;
      if (left == 0) begin
        x    = ~x;
        left = $urandom_range(1, 6);
      end
      left--;
      #2;
      checks++;
      if (z !== z_eq(y, x)) begin
        failures++;
        $display("t=%0t z=%b, equations give %b (y=%b x=%b)", $time, z, z_eq(y, x), y, x);
      end
      checks++;
      if (z !== (run_len >= 3 && run_val == x)) begin
        failures++;
        $display("t=%0t z=%b, run rule gives %b", $time, z, (run_len >= 3 && run_val == x));
      end
      if (z) z_high++;
    end
    checks++;
    if (z_high == 0) begin
      failures++;
      $display("z never went high");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
