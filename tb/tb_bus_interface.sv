// Self-checking testbench for the 8-bit bus interface.
//
// For random latched values and every combination of oe_n and sel, checks
// that the high byte appears with sel low, the low byte with sel high, and
// that the bus is released (enable low, data zero) with oe_n high.
module tb_bus_interface;
  logic        oe_n = 1'b1, sel = 1'b0;
  logic [15:0] latch_q = '0;
  logic [7:0]  rout;
  logic        rout_oe;
  int          checks = 0, failures = 0;

  bus_interface dut (.oe_n(oe_n), .sel(sel), .latch_q(latch_q), .rout(rout), .rout_oe(rout_oe));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      latch_q = 16'($urandom);
      for (int m = 0; m < 4; m++) begin
        logic [7:0] exp_d;
        {oe_n, sel} = 2'(m);
        exp_d = oe_n ? 8'h00 : sel ? 8'(latch_q & 16'h00FF) : 8'(latch_q >> 8);
        #1;
        checks++;
        if (rout !== exp_d || rout_oe !== !oe_n) begin
          failures++;
          $display("latch=%h oe_n=%b sel=%b: rout=%h oe=%b, expected %h", latch_q, oe_n, sel, rout, rout_oe, exp_d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
