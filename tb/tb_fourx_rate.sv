// Self-checking testbench for the 4x rate circuit.
//
// Random changes of cha and chb (one, both or none per period). The reference
// keeps the values sampled on the previous rising edge; x4 must be high
// exactly when a channel differs from that sample. Also checks that a full
// quadrature cycle (four edges) gives four pulses.
module tb_fourx_rate;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic cha = 1'b0, chb = 1'b0;
  logic x4;
  int   checks = 0, failures = 0;
  int   pulses = 0;

  fourx_rate dut (.clk(clk), .rst_n(rst_n), .cha(cha), .chb(chb), .x4(x4));

  always #5 clk = ~clk;

  logic pa = 1'b0, pb = 1'b0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (x4) pulses <= pulses + 1;
    pa <= cha;
    pb <= chb;
  end

  task automatic check_now();
    checks++;
    if (x4 !== ((cha != pa) || (chb != pb))) begin
      failures++;
      $display("t=%0t x4=%b cha=%b/%b chb=%b/%b", $time, x4, cha, pa, chb, pb);
    end
  endtask

  initial begin
    int p0;
    logic [1:0] mode;
    repeat (2) @(posedge clk);
    #2 rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(posedge clk);
      #2;
      mode = 2'($urandom_range(0, 3));
      if (mode[0]) cha = ~cha;
      if (mode[1]) chb = ~chb;
      #2 check_now();
    end
    // one quadrature cycle, three periods per state: four pulses
    @(posedge clk);
    #2 {cha, chb} = 2'b00;
    repeat (3) @(posedge clk);
    p0 = pulses;
    for (int s = 0; s < 4; s++) begin
      #2 {cha, chb} = (s == 0) ? 2'b10 : (s == 1) ? 2'b11 : (s == 2) ? 2'b01 : 2'b00;
      repeat (3) @(posedge clk);
    end
    checks++;
    if (pulses - p0 != 4) begin
      failures++;
      $display("one quadrature cycle gave %0d pulses", pulses - p0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
