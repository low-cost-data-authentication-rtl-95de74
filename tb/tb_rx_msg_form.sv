// tb_rx_msg_form: plays the decision unit's outputs for a message pixel (the
// four group ends with their candidate bits, other clocks with random
// candidates) and checks the assembled 4-bit pixel, that pixel_valid comes
// one clock after the last group end and only then, and that the register
// starts from zero for the next pixel.
module tb_rx_msg_form;
  import dh_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] grp = '0;
  logic grp_end = 1'b0, maj_hi = 1'b0, maj_mid = 1'b0, bit_in = 1'b0;
  logic [3:0] pixel_out;
  logic pixel_valid;
  int checks = 0, failures = 0;

  rx_msg_form dut (.clk, .rst_n, .grp, .grp_end, .maj_hi, .maj_mid, .bit_in, .pixel_out, .pixel_valid);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      logic [3:0] p;
      p = 4'($urandom);
      for (int k = 0; k < 16; k++) begin
        @(negedge clk);
        check(!pixel_valid, "no valid inside a pixel");
        grp = (k < 9) ? 2'd0 : (k < 14) ? 2'd1 : (k == 14) ? 2'd2 : 2'd3;
        grp_end = (k == 8 || k >= 13);
        maj_hi  = (k == 8)  ? p[3] : 1'($urandom);
        maj_mid = (k == 13) ? p[2] : 1'($urandom);
        bit_in  = (k == 14) ? p[1] : (k == 15) ? p[0] : 1'($urandom);
      end
      @(negedge clk);
      grp_end = 1'b0; grp = 2'd0;
      check(pixel_valid, "valid after the fourth bit");
      check(pixel_out == p, "assembled pixel");
      @(negedge clk);
      check(!pixel_valid, "valid lasts one clock");
      check(pixel_out == '0, "register cleared for the next pixel");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
