// tx_msg_ext: message extension unit. Turns one 4-bit message pixel into 16
// serial bits with redundancy graded by bit significance: message bit 4
// (MSB) nine times, bit 3 five times, bits 2 and 1 once each.
//
// The pixel is loaded into a 4-bit parallel-in serial-out register whose
// output is the flip-flop that receives the MSB. A 0-15 counter advances once
// per hidden bit (step). The register shifts when step arrives at counts
// REP_HI-1 (8), REP_HI+REP_MID-1 (13), 14 and 15, so the output holds each bit
// for its number of repeats. The counter is cleared by sync_n, which the
// control unit drives low just before the load.
// Follows the scheme: the PISO, the counter, the shift counts and the active-
// low load and synchronisation pulses. This design's choice: a zero shifted in
// at the register's low end, and the parameterised shift counts.
// Timing: bit_out is the registered MSB flip-flop; it changes on the clock
// edge after a load or a shift. Load has priority over shift.
// Reset: asynchronous, active low.
module tx_msg_ext
  import dh_pkg::*;
#(
  parameter int unsigned MSG_W_P   = dh_pkg::MSG_W,
  parameter int unsigned REP_HI_P  = dh_pkg::REP_HI,
  parameter int unsigned REP_MID_P = dh_pkg::REP_MID
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load_n,    // active low: load msg_pixel
  input  logic               sync_n,    // active low: clear the 0-15 counter
  input  logic               step,      // one extended bit has been hidden
  input  logic [MSG_W_P-1:0] msg_pixel,
  output logic               bit_out,   // current extended bit
  output logic [3:0]         position   // index of bit_out in the extended string
);

  localparam int unsigned LEN = REP_HI_P + REP_MID_P + MSG_W_P - 2;

  logic [MSG_W_P-1:0] piso_q;
  logic [3:0]         cnt_q;
  logic               shift_now;

  // shift points: end of the REP_HI group, end of the REP_MID group, and
  // after each single bit
  always_comb begin
    shift_now = 1'b0;
    if (cnt_q == 4'(REP_HI_P - 1))               shift_now = 1'b1;
    if (cnt_q >= 4'(REP_HI_P + REP_MID_P - 1)) shift_now = 1'b1;
    shift_now = shift_now & step;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      piso_q <= '0;
      cnt_q  <= '0;
    end else begin
      if (!load_n)        piso_q <= msg_pixel;
      else if (shift_now) piso_q <= {piso_q[MSG_W_P-2:0], 1'b0};

      if (!sync_n)        cnt_q <= '0;
      else if (step)      cnt_q <= cnt_q + 1'b1;
    end
  end

  assign bit_out  = piso_q[MSG_W_P-1];
  assign position = cnt_q;

  initial begin
    assert (LEN == 16) else $error("tx_msg_ext: extended length must fit the 0-15 counter");
  end

endmodule
