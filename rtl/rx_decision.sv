// rx_decision: decision making unit of the receiver. Removes the redundancy
// the transmitter added, by majority vote within each group of repeats.
//
// A 0-15 position counter advances with every extracted bit. A small decode
// of the position gives the group select: 00 for the first REP_HI (9) bits,
// 01 for the next REP_MID (5), 10 and 11 for the two single bits. A 2-to-4
// decoder on the select enables one of two ones-counters: the first counts
// the ones among the 9 copies of message bit 4, the second among the 5 copies
// of message bit 3. A group decides '1' when more than half its bits are '1'
// (at least 5 of 9, at least 3 of 5). On the last bit of each group grp_end
// is raised with grp naming the group, and maj_hi, maj_mid and bit_in carry
// the candidates for the message formation unit's 4-to-1 multiplexer. The
// ones-counters are cleared when their group ends.
// Follows the scheme: the counters, the group select codes, the decoder and
// the majority rule. This design's choice: the majority taken combinationally
// from counter plus current bit, so the decision is ready on the group's last
// bit; the receiver assumes the stream starts on a message pixel boundary.
// Timing: all outputs are combinational from the counters and bit_in/
// bit_valid. Reset: asynchronous, active low.
module rx_decision
  import dh_pkg::*;
#(
  parameter int unsigned REP_HI_P  = dh_pkg::REP_HI,
  parameter int unsigned REP_MID_P = dh_pkg::REP_MID
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bit_in,
  input  logic       bit_valid,
  output logic [1:0] grp,       // group of the current bit
  output logic       grp_end,   // current bit is the last of its group
  output logic       maj_hi,    // majority decision for message bit 4
  output logic       maj_mid,   // majority decision for message bit 3
  output logic [3:0] position
);

  logic [3:0] pos_q;
  logic [3:0] ones_hi_q, ones_mid_q;
  logic [3:0] grp_en;           // 2-to-4 decoder output
  logic [3:0] ones_hi_d, ones_mid_d;

  always_comb begin
    if (pos_q < 4'(REP_HI_P))                   grp = 2'b00;
    else if (pos_q < 4'(REP_HI_P + REP_MID_P))  grp = 2'b01;
    else if (pos_q == 4'(REP_HI_P + REP_MID_P)) grp = 2'b10;
    else                                        grp = 2'b11;
    grp_en      = 4'b0001 << grp;
    grp_end     = bit_valid & ((pos_q == 4'(REP_HI_P - 1)) ||
                               (pos_q >= 4'(REP_HI_P + REP_MID_P - 1)));
    ones_hi_d   = ones_hi_q  + 4'(bit_in & grp_en[0]);
    ones_mid_d  = ones_mid_q + 4'(bit_in & grp_en[1]);
    maj_hi      = (ones_hi_d  > 4'(REP_HI_P / 2));
    maj_mid     = (ones_mid_d > 4'(REP_MID_P / 2));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_q      <= '0;
      ones_hi_q  <= '0;
      ones_mid_q <= '0;
    end else if (bit_valid) begin
      pos_q <= pos_q + 1'b1;
      if (grp_en[0]) ones_hi_q  <= grp_end ? '0 : ones_hi_d;
      if (grp_en[1]) ones_mid_q <= grp_end ? '0 : ones_mid_d;
    end
  end

  assign position = pos_q;

endmodule
