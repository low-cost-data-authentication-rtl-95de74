// tx_embed: embedding unit. Hides one message bit in one bit plane of a cover
// pixel by rotating the pixel once around an 8-bit shift register.
//
// On load the cover pixel enters the register in parallel (the document's 2-
// to-1 multiplexer in front of each flip-flop). On each of the next 8 clocks
// the register rotates one place towards bit 0, the bit leaving bit 0 being
// fed back into bit 7. In the rotate step flagged by insert (from the bit
// select unit) the message bit is fed back instead, so it takes the place of
// that cover bit. After 8 rotations every cover bit is back in its own
// position, except the replaced one, and the stego pixel is read in parallel
// while the next cover pixel is loaded.
// Follows the scheme: load every 9th clock, 8 rotate steps, substitution of
// the fed-back bit. This design's choice: the rotate direction (towards bit 0,
// so rotate step k carries original bit k) and the active-low load taken
// straight from the control unit.
// Timing: pixel_out is the register; it is the finished stego pixel in the
// clock after the 8th rotate step. Reset: asynchronous, active low.
module tx_embed
  import dh_pkg::*;
#(
  parameter int unsigned COVER_W_P = dh_pkg::COVER_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load_n,     // active low: parallel load of cover_pixel
  input  logic                 shift,      // rotate one place
  input  logic                 insert,     // feed msg_bit back instead of bit 0
  input  logic                 msg_bit,
  input  logic [COVER_W_P-1:0] cover_pixel,
  output logic [COVER_W_P-1:0] pixel_out
);

  logic [COVER_W_P-1:0] sr_q;
  logic                 feedback;

  assign feedback = insert ? msg_bit : sr_q[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       sr_q <= '0;
    else if (!load_n) sr_q <= cover_pixel;
    else if (shift)   sr_q <= {feedback, sr_q[COVER_W_P-1:1]};
  end

  assign pixel_out = sr_q;

  // the message bit may only enter during a rotate step
  a_insert_in_shift: assert property (@(posedge clk) disable iff (!rst_n) insert |-> shift);

endmodule
