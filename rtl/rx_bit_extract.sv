// rx_bit_extract: bit extraction unit of the receiver.
//
// Each received stego pixel is captured in an 8-bit parallel-in parallel-out
// register; an 8-to-1 multiplexer addressed by the plane select st then
// delivers the bit plane in which the transmitter hid the message.
// Follows the scheme: register plus 8-to-1 mux. This design's choice: a valid
// strobe that loads the register and is delayed alongside it.
// Timing: bit_out/bit_valid appear one clock after pixel_in/pixel_valid.
// Reset: asynchronous, active low.
module rx_bit_extract
  import dh_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               pixel_valid,
  input  logic [COVER_W-1:0] pixel_in,
  input  logic [PLANE_W-1:0] st,
  output logic               bit_out,
  output logic               bit_valid
);

  logic [COVER_W-1:0] pipo_q;
  logic               valid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pipo_q  <= '0;
      valid_q <= 1'b0;
    end else begin
      valid_q <= pixel_valid;
      if (pixel_valid) pipo_q <= pixel_in;
    end
  end

  assign bit_out   = pipo_q[st];
  assign bit_valid = valid_q;

endmodule
