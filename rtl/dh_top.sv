// dh_top: image-in-image data hiding, transmitter and receiver.
//
// The transmitter hides a 4-bit grey message image in bit plane st of an
// 8-bit grey cover image, spreading each message pixel over 16 cover pixels
// with graded repetition (MSB 9 times, next bit 5 times, two LSBs once). The
// receiver reads that plane back and decides each repeated bit by majority,
// so the important bits of the message survive moderate damage to the stego
// image. Both halves sit side by side: the channel between stego_pixel and
// rx_pixel, where an attack would act, is left to the user. Both must be
// given the same st.
// Timing: see dh_transmitter (cover pixel every 9 clocks, message pixel every
// 144) and dh_receiver (up to one stego pixel per clock, result two clocks
// after the 16th). Reset: asynchronous, active low.
module dh_top
  import dh_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PLANE_W-1:0] st,
  // transmitter
  input  logic               tx_en,
  input  logic [COVER_W-1:0] cover_pixel,
  output logic               cover_take,
  input  logic [MSG_W-1:0]   msg_pixel,
  output logic               msg_take,
  output logic [COVER_W-1:0] stego_pixel,
  output logic               stego_valid,
  // receiver
  input  logic               rx_valid,
  input  logic [COVER_W-1:0] rx_pixel,
  output logic [MSG_W-1:0]   dec_pixel,
  output logic               dec_valid
);

  dh_transmitter u_tx (
    .clk, .rst_n, .en(tx_en), .st, .cover_pixel, .cover_take,
    .msg_pixel, .msg_take, .stego_pixel, .stego_valid
  );

  dh_receiver u_rx (
    .clk, .rst_n, .st, .pixel_valid(rx_valid), .pixel_in(rx_pixel),
    .msg_pixel(dec_pixel), .msg_valid(dec_valid)
  );

endmodule
