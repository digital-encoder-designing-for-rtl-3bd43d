// Quadrature decoder/counter interface for an optical shaft encoder.
//
// Channels A and B of the encoder each pass a digital noise filter. From the
// filtered pair, the 4x rate circuit makes one pulse per edge of either
// channel and the direction decoder tells clockwise from counter-clockwise.
// The 16-bit up/down counter counts the pulses in that direction; the
// position latch copies the counter except while the inhibit logic holds it
// during a two-byte read; the bus interface puts the high or low byte of the
// latch on the 8-bit bus.
//
// Interface: clk (sampling clock, much faster than the encoder signals),
// rst_n (active-low reset), cha/chb (raw encoder channels), oe_n and sel (read
// strobes: oe_n low enables the bus, sel 0 = high byte, 1 = low byte);
// outputs x4 (4x pulse), dir (0 = clockwise/count up), cntout (counter), inh
// (latch inhibited), rout/rout_oe (bus byte and its driver enable).
// Timing: a raw edge sampled by rising edge 1 reaches the filter outputs on
// the falling edge after rising edge 3; x4 and dir respond at once, the
// counter steps on rising edge 4 and the latch copies it on rising edge 5.
// The read strobes are sampled on the falling edge. The block structure and
// the signal names follow the published schematic; the synchronous counter
// enable and the explicit bus enable rout_oe are this design's choices.
module quad_decoder_ic
  import qd_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cha,
  input  logic               chb,
  input  logic               oe_n,
  input  logic               sel,
  output logic               x4,
  output logic               dir,
  output logic [COUNT_W-1:0] cntout,
  output logic               inh,
  output logic [BUS_W-1:0]   rout,
  output logic               rout_oe
);

  logic fa, fb;
  logic [COUNT_W-1:0] latch_q;

  dfilter u_filt_a (.clk(clk), .rst_n(rst_n), .x(cha), .dfout(fa));
  dfilter u_filt_b (.clk(clk), .rst_n(rst_n), .x(chb), .dfout(fb));

  fourx_rate u_4x (.clk(clk), .rst_n(rst_n), .cha(fa), .chb(fb), .x4(x4));

  dir_decoder u_dir (.clk(clk), .rst_n(rst_n), .cha(fa), .chb(fb), .dir(dir));

  updown_counter #(.WIDTH(COUNT_W)) u_cnt (
    .clk   (clk),
    .rst_n (rst_n),
    .cnt_en(x4),
    .dn    (dir),
    .q     (cntout)
  );

  inhibit_logic u_inh (.clk(clk), .rst_n(rst_n), .oe_n(oe_n), .sel(sel), .inh(inh));

  position_latch #(.WIDTH(COUNT_W)) u_latch (
    .clk  (clk),
    .rst_n(rst_n),
    .inh  (inh),
    .d    (cntout),
    .q    (latch_q)
  );

  bus_interface u_bus (
    .oe_n   (oe_n),
    .sel    (sel),
    .latch_q(latch_q),
    .rout   (rout),
    .rout_oe(rout_oe)
  );

endmodule
