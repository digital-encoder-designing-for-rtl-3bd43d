// Self-checking testbench for the read-inhibit controller.
//
// Reference: the excitation equations D1 = y1 oe' + y0 oe' sel and
// D0 = oe' sel' + y0 oe' + y1' y0, evaluated on the falling edge, with
// inh = y0. Random strobes exercise every state and input pair; a directed
// two-byte read (high byte, low byte, release) and an 8-bit low-byte read
// check the intended use. Inputs change 2 time units after the rising edge.
module tb_inhibit_logic;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic oe_n = 1'b1, sel = 1'b0;
  logic inh;
  logic [1:0] y = 2'b00;
  int   checks = 0, failures = 0;
  int   visits [4];

  inhibit_logic dut (.clk(clk), .rst_n(rst_n), .oe_n(oe_n), .sel(sel), .inh(inh));

  always #5 clk = ~clk;

  always @(negedge clk) begin
    if (rst_n) begin
      logic d1, d0;
      d1 = (y[1] & ~oe_n) | (y[0] & ~oe_n & sel);
      d0 = (~oe_n & ~sel) | (y[0] & ~oe_n) | (~y[1] & y[0]);
      y  = {d1, d0};
      visits[y]++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(input logic o, input logic s, input int exp_inh);
    @(posedge clk);
    #2 oe_n = o;
    sel = s;
    @(negedge clk);
    #1;
    checks++;
    if (inh !== y[0] || (exp_inh >= 0 && int'(inh) != exp_inh)) begin
      failures++;
      $display("t=%0t oe_n=%b sel=%b inh=%b, equations %b, expected %0d", $time, o, s, inh, y[0], exp_inh);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #2 rst_n = 1'b1;
    // two-byte read: high byte, low byte, release
    drive(1'b1, 1'b0, 0);
    drive(1'b0, 1'b0, 1);
    drive(1'b0, 1'b0, 1);
    drive(1'b1, 1'b0, 1);   // strobe released between the two reads
    drive(1'b0, 1'b1, 1);
    drive(1'b0, 1'b1, 1);
    drive(1'b1, 1'b1, 0);
    // 8-bit mode: low byte only, no inhibit
    drive(1'b0, 1'b1, 0);
    drive(1'b0, 1'b1, 0);
    drive(1'b1, 1'b1, 0);
    for (int i = 0; i < 4000; i++) begin
      logic o, s;
      o = 1'($urandom_range(0, 1));
      s = 1'($urandom_range(0, 1));
      drive(o, s, -1);
    end
    checks++;
    if (visits[0] == 0 || visits[1] == 0 || visits[3] == 0) begin
      failures++;
      $display("state coverage %0d %0d %0d", visits[0], visits[1], visits[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
