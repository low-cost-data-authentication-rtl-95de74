// dh_pkg: constants and types shared by the image-in-image data hiding
// transmitter and receiver.
//
// A 4-bit message pixel is spread over 16 cover pixels: its most significant
// bit is repeated 9 times, the next bit 5 times and the two low bits once
// each. One message bit is hidden in one bit plane of each 8-bit cover pixel,
// and each cover pixel takes 9 clocks in the transmitter (one parallel load
// and 8 rotate steps), so one message pixel takes a hiding cycle of
// 16 x 9 = 144 clocks. These numbers are the ones the scheme is built around;
// the struct bundling the control pulses is this design's own.
package dh_pkg;

  localparam int unsigned COVER_W = 8;                   // bits per cover pixel
  localparam int unsigned MSG_W   = 4;                   // bits per message pixel
  localparam int unsigned REP_HI  = 9;                   // repeats of message bit 4 (MSB)
  localparam int unsigned REP_MID = 5;                   // repeats of message bit 3
  localparam int unsigned EXT_LEN = REP_HI + REP_MID + (MSG_W - 2); // 16 extended bits
  localparam int unsigned PHASE   = COVER_W + 1;         // clocks per cover pixel
  localparam int unsigned CYCLE   = EXT_LEN * PHASE;     // 144 clocks per message pixel
  localparam int unsigned PLANE_W = $clog2(COVER_W);     // width of the bit-plane select

  // Pulses from the transmitter control unit. The document's load pulses are
  // active low; they are kept active low here under the same names plus _n.
  typedef struct packed {
    logic cov_load_n;  // load the next cover pixel into the embedding register
    logic msg_load_n;  // load the next message pixel into the extension PISO
    logic sync_n;      // clear the extension unit's 0-15 counter
    logic shift;       // rotate the embedding register one place
    logic step;        // last rotate of a cover pixel: extended bit consumed
    logic out_valid;   // the embedding register holds a finished stego pixel
  } tx_ctl_t;

endpackage
