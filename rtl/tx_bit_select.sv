// tx_bit_select: chooses the moment at which the message bit enters the
// embedding register, and so the bit plane that carries it.
//
// A 3-bit counter (the document's three T flip-flops) counts the rotate steps
// of the current cover pixel; it is cleared by the cover load. A 3-to-8
// decoder turns the count into a one-hot word and an 8-to-1 multiplexer,
// addressed by the plane select st, picks one line of it. The result, insert,
// is high during the rotate step in which original cover bit st sits at the
// register's serial output, so the embedding unit replaces exactly that bit.
// The structure follows the scheme; the width of st (3 bits, enough to
// address the 8-to-1 mux) and the clear on load are this design's reading.
// Timing: insert is combinational from the registered step counter and st.
// Reset: asynchronous, active low.
module tx_bit_select
  import dh_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,    // cover pixel load (clears the step counter)
  input  logic               shift,   // a rotate step happens this clock
  input  logic [PLANE_W-1:0] st,      // bit plane that carries the message
  output logic               insert   // replace the fed-back bit with the message bit
);

  logic [PLANE_W-1:0] step_q;
  logic [COVER_W-1:0] onehot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      step_q <= '0;
    else if (load)   step_q <= '0;
    else if (shift)  step_q <= step_q + 1'b1;   // each T flip-flop toggles on carry
  end

  always_comb begin
    onehot = '0;
    onehot[step_q] = 1'b1;                      // 3-to-8 decoder
  end

  assign insert = shift & onehot[st];           // 8-to-1 multiplexer

endmodule
