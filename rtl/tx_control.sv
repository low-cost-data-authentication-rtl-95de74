// tx_control: master timing of the transmitter.
//
// An 8-bit counter runs through one hiding cycle, 0 .. EXT_LEN*PHASE-1
// (0 .. 143), and is then cleared so that the next message pixel starts
// afresh, as the scheme describes. From the count it decodes:
//   cov_load_n  low at every 9th clock (count a multiple of PHASE): the
//               embedding unit loads a new cover pixel in parallel;
//   msg_load_n  low at count 0, the start of the hiding cycle: the message
//               extension unit loads the next message pixel;
//   sync_n      low at the last count, just before the message load: clears
//               the extension unit's internal 0-15 counter;
//   shift       high on the 8 clocks between cover loads;
//   step        high on the last of those 8 clocks: the current extended
//               bit has been hidden, the extension unit advances;
//   out_valid   high on a cover-load clock once a pixel has been processed:
//               the embedding register then holds the finished stego pixel.
// The active-low pulses, the counter width and the 144-clock cycle follow the
// scheme; the exact counts chosen for the pulses, out_valid and the enable
// input are this design's choice. Decoding uses equality compares against a
// constant table of multiples of PHASE instead of a divider.
// Timing: all outputs are combinational decodes of the registered counter
// (plus the primed flag). en low freezes the counter. Reset: asynchronous,
// active low, to count 0.
module tx_control
  import dh_pkg::*;
#(
  parameter int unsigned EXT_LEN_P = dh_pkg::EXT_LEN,  // extended bits per message pixel
  parameter int unsigned PHASE_P   = dh_pkg::PHASE,    // clocks per cover pixel
  parameter int unsigned CNT_W     = 8                 // hiding-cycle counter width
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  output tx_ctl_t ctl,
  output logic [CNT_W-1:0] count
);

  localparam int unsigned LAST = EXT_LEN_P * PHASE_P - 1;

  logic [CNT_W-1:0] cnt_q;
  logic             primed_q;   // at least one cover pixel has been rotated
  logic             at_load;    // count is a multiple of PHASE
  logic             at_last;    // count is the last rotate of a cover pixel

  always_comb begin
    at_load = 1'b0;
    at_last = 1'b0;
    for (int unsigned k = 0; k < EXT_LEN_P; k++) begin
      if (cnt_q == CNT_W'(k * PHASE_P))               at_load = 1'b1;
      if (cnt_q == CNT_W'(k * PHASE_P + PHASE_P - 1)) at_last = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q    <= '0;
      primed_q <= 1'b0;
    end else if (en) begin
      cnt_q <= (cnt_q == CNT_W'(LAST)) ? '0 : cnt_q + 1'b1;
      if (at_last) primed_q <= 1'b1;
    end
  end

  always_comb begin
    ctl.cov_load_n = ~(en & at_load);
    ctl.msg_load_n = ~(en & (cnt_q == '0));
    ctl.sync_n     = ~(en & (cnt_q == CNT_W'(LAST)));
    ctl.shift      = en & ~at_load;
    ctl.step       = en & at_last;
    ctl.out_valid  = en & at_load & primed_q;
  end

  assign count = cnt_q;

  initial begin
    assert (LAST < (1 << CNT_W)) else $error("tx_control: hiding cycle does not fit the counter");
  end

endmodule
