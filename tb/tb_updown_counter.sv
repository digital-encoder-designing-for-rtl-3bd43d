// Self-checking testbench for the 16-bit position up/down counter.
//
// Random count enables and directions against a reference count kept in an
// int and reduced modulo 2**16. A directed part counts down from zero and up
// from 16'hFFFF to check both wrap-arounds.
module tb_updown_counter;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        cnt_en = 1'b0, dn = 1'b0;
  logic [15:0] q;
  int          checks = 0, failures = 0;
  int          ref_cnt = 0;
  int          wraps = 0;

  updown_counter dut (.clk(clk), .rst_n(rst_n), .cnt_en(cnt_en), .dn(dn), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic en, input logic down);
    #2 cnt_en = en;
    dn = down;
    @(posedge clk);
    if (en) begin
      if (down && ref_cnt == 0) wraps++;
      if (!down && ref_cnt == 65535) wraps++;
      ref_cnt = down ? (ref_cnt + 65535) % 65536 : (ref_cnt + 1) % 65536;
    end
    #1;
    checks++;
    if (q !== 16'(ref_cnt)) begin
      failures++;
      $display("t=%0t q=%h expected %h", $time, q, 16'(ref_cnt));
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #2 rst_n = 1'b1;
    @(posedge clk);
    checks++;
    if (q !== 16'h0000) begin
      failures++;
      $display("not zero after reset: %h", q);
    end
    // down from zero wraps to FFFF
    repeat (3) step(1'b1, 1'b1);
    repeat (5) step(1'b1, 1'b0);
    for (int i = 0; i < 20000; i++) step(1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)));
    // run up to FFFF and across it
    while (ref_cnt != 65530) step(1'b1, ref_cnt > 65530);
    repeat (10) step(1'b1, 1'b0);
    checks++;
    if (wraps < 2) begin
      failures++;
      $display("wrap-arounds seen: %0d", wraps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
