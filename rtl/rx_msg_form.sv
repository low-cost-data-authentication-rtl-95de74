// rx_msg_form: message formation unit of the receiver. Assembles the four
// decided bits of a message pixel in a serial-in parallel-out register.
//
// A 4-to-1 multiplexer, addressed by the group select of the decision unit,
// picks the bit to store: the majority of the 9 copies (group 0), the
// majority of the 5 copies (group 1), or the received bit itself (groups 2
// and 3). The register shifts it in, MSB first, at the end of each group. A D
// flip-flop marks the end of the fourth group; in the next clock the pixel is
// presented with pixel_valid, and the same flip-flop clears the register so
// that the next pixel starts from zero.
// Follows the scheme: the 4-to-1 mux, the SIPO register, the D flip-flop
// reset and the clock-enabled loading. This design's choice: the valid strobe.
// Timing: pixel_out/pixel_valid are registered, one clock after the 16th
// decided bit. Reset: asynchronous, active low.
module rx_msg_form
  import dh_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [1:0]       grp,
  input  logic             grp_end,
  input  logic             maj_hi,
  input  logic             maj_mid,
  input  logic             bit_in,
  output logic [MSG_W-1:0] pixel_out,
  output logic             pixel_valid
);

  logic [MSG_W-1:0] sipo_q;
  logic             done_q;
  logic             sel_bit;

  always_comb begin
    unique case (grp)                     // 4-to-1 multiplexer
      2'b00:   sel_bit = maj_hi;
      2'b01:   sel_bit = maj_mid;
      default: sel_bit = bit_in;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sipo_q <= '0;
      done_q <= 1'b0;
    end else begin
      done_q <= grp_end & (grp == 2'b11);
      if (grp_end)     sipo_q <= {sipo_q[MSG_W-2:0], sel_bit};
      else if (done_q) sipo_q <= '0;
    end
  end

  assign pixel_out   = sipo_q;
  assign pixel_valid = done_q;

endmodule
