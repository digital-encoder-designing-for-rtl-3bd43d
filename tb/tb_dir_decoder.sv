// Self-checking testbench for the direction decoder.
//
// Drives quadrature sequences that change direction at random, with hold
// times of one to four periods, and occasional illegal steps where both
// channels change at once. The reference applies the Gray-code rule: the
// sequence (A,B) = 00, 10, 11, 01, 00 is clockwise (dir = 0), its reverse is
// counter-clockwise (dir = 1), a double change keeps the direction. dir must
// show the new direction already in the period of the edge.
module tb_dir_decoder;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic cha = 1'b0, chb = 1'b0;
  logic dir;
  int   checks = 0, failures = 0;
  int   to_cw = 0, to_ccw = 0, illegal = 0;

  dir_decoder dut (.clk(clk), .rst_n(rst_n), .cha(cha), .chb(chb), .dir(dir));

  always #5 clk = ~clk;

  logic [1:0] prev = 2'b00;   // {A,B} sampled on the last rising edge
  logic       dir_ref_q = 1'b0;
  logic       dir_ref;

  function automatic logic [1:0] cw_next(logic [1:0] ab);
    unique case (ab)
      2'b00: return 2'b10;
      2'b10: return 2'b11;
      2'b11: return 2'b01;
      default: return 2'b00;
    endcase
  endfunction

  always_comb begin
    dir_ref = dir_ref_q;
    if ({cha, chb} == cw_next(prev))           dir_ref = 1'b0;
    else if (prev == cw_next({cha, chb}))      dir_ref = 1'b1;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (dir_ref_q && !dir_ref) to_cw <= to_cw + 1;
      if (!dir_ref_q && dir_ref) to_ccw <= to_ccw + 1;
      dir_ref_q <= dir_ref;
      prev      <= {cha, chb};
    end
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic cw;
    logic [1:0] ab;
    cw = 1'b1;
    ab = 2'b00;
    repeat (2) @(posedge clk);
    #2 rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      if ($urandom_range(0, 9) == 0) cw = ~cw;
      if ($urandom_range(0, 29) == 0) begin
        ab = ~ab;
        illegal++;
      end else if (cw) ab = cw_next(ab);
      else begin
        // reverse step: find the state whose clockwise successor is ab
        for (int k = 0; k < 4; k++) if (cw_next(2'(k)) == ab) begin ab = 2'(k); break; end
      end
      @(posedge clk);
      #2 {cha, chb} = ab;
      repeat ($urandom_range(1, 4)) begin
        #2;
        checks++;
        if (dir !== dir_ref) begin
          failures++;
          $display("t=%0t dir=%b expected %b (prev=%b now=%b%b)", $time, dir, dir_ref, prev, cha, chb);
        end
        @(posedge clk);
      end
    end
    checks++;
    if (to_cw == 0 || to_ccw == 0 || illegal == 0) begin
      failures++;
      $display("coverage: to_cw=%0d to_ccw=%0d illegal=%0d", to_cw, to_ccw, illegal);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
