// dh_receiver: receiver of the image-in-image hiding scheme. Takes a stream of
// stego pixels, one per pixel_valid, and recovers one 4-bit message pixel from
// every 16 of them.
//
// Chain: rx_bit_extract picks the hidden bit plane st from each pixel;
// rx_decision groups the bits 9 + 5 + 1 + 1 and takes majority decisions for
// the two repeated groups; rx_msg_form shifts the four decided bits into the
// message pixel. The chain follows the scheme; the stream is assumed to start
// on a message pixel boundary after reset (there is no frame marker).
// Timing: any rate up to one stego pixel per clock; msg_valid comes two clocks
// after the 16th stego pixel of a message pixel. Reset: asynchronous, active
// low.
module dh_receiver
  import dh_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PLANE_W-1:0] st,
  input  logic               pixel_valid,
  input  logic [COVER_W-1:0] pixel_in,
  output logic [MSG_W-1:0]   msg_pixel,
  output logic               msg_valid
);

  logic       bit_x, bit_v;
  logic [1:0] grp;
  logic       grp_end, maj_hi, maj_mid;

  rx_bit_extract u_extract (
    .clk, .rst_n, .pixel_valid, .pixel_in, .st,
    .bit_out(bit_x), .bit_valid(bit_v)
  );

  rx_decision u_decision (
    .clk, .rst_n, .bit_in(bit_x), .bit_valid(bit_v),
    .grp, .grp_end, .maj_hi, .maj_mid, .position()
  );

  rx_msg_form u_form (
    .clk, .rst_n, .grp, .grp_end, .maj_hi, .maj_mid, .bit_in(bit_x),
    .pixel_out(msg_pixel), .pixel_valid(msg_valid)
  );

endmodule
