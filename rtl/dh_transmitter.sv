// dh_transmitter: transmitter of the image-in-image hiding scheme. Hides a
// stream of 4-bit message pixels in a stream of 8-bit cover pixels, 16 cover
// pixels per message pixel, in bit plane st.
//
// tx_control counts the 144-clock hiding cycle and issues the load and shift
// pulses. tx_msg_ext turns the message pixel into 16 bits (9 + 5 + 1 + 1
// repeats). tx_bit_select flags the rotate step in which cover bit st passes
// the feedback point, and tx_embed rotates each cover pixel once around its
// shift register, putting the current extended bit in place of cover bit st.
// The four units and their cooperation follow the scheme; the enable input,
// the take strobes and the stego valid strobe are this design's interface.
// Timing: the unit takes a cover pixel every 9 clocks (cover_take) and a
// message pixel every 144 clocks (msg_take); both are sampled in the clock
// their take strobe is high. The stego pixel of a cover pixel appears with
// stego_valid 9 clocks after it was taken. With en low everything holds.
// Reset: asynchronous, active low.
module dh_transmitter
  import dh_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [PLANE_W-1:0] st,
  input  logic [COVER_W-1:0] cover_pixel,
  output logic               cover_take,
  input  logic [MSG_W-1:0]   msg_pixel,
  output logic               msg_take,
  output logic [COVER_W-1:0] stego_pixel,
  output logic               stego_valid
);

  tx_ctl_t    ctl;
  logic       insert, ext_bit;


  tx_control u_control (.clk, .rst_n, .en, .ctl, .count());

  tx_bit_select u_bit_select (
    .clk, .rst_n, .load(~ctl.cov_load_n), .shift(ctl.shift), .st, .insert
  );

  tx_msg_ext u_msg_ext (
    .clk, .rst_n, .load_n(ctl.msg_load_n), .sync_n(ctl.sync_n), .step(ctl.step),
    .msg_pixel, .bit_out(ext_bit), .position()
  );

  tx_embed u_embed (
    .clk, .rst_n, .load_n(ctl.cov_load_n), .shift(ctl.shift), .insert,
    .msg_bit(ext_bit), .cover_pixel, .pixel_out(stego_pixel)
  );

  assign cover_take  = ~ctl.cov_load_n;
  assign msg_take    = ~ctl.msg_load_n;
  assign stego_valid = ctl.out_valid;

endmodule
