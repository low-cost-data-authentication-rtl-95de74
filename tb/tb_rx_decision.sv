// tb_rx_decision: feeds strings of 16 bits (the 9 + 5 + 1 + 1 groups of a
// message pixel) with random numbers of ones in each repeated group, with
// gaps between bits, and checks the group select, the group-end strobe and
// the majority decisions against counts made by the testbench.
module tb_rx_decision;
  import dh_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic bit_in = 1'b0, bit_valid = 1'b0;
  logic [1:0] grp;
  logic grp_end, maj_hi, maj_mid;
  logic [3:0] position;
  int checks = 0, failures = 0;
  int hi_ties = 0;

  rx_decision dut (.clk, .rst_n, .bit_in, .bit_valid, .grp, .grp_end, .maj_hi, .maj_mid, .position);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      bit s[16];
      int ones_hi, ones_mid, p_hi, p_mid;
      p_hi = $urandom_range(0, 9);   // number of ones wanted in each group
      p_mid = $urandom_range(0, 5);
      if (p_hi == 4 || p_hi == 5) hi_ties++;
      foreach (s[k]) s[k] = 1'b0;
      // scatter p_hi ones over positions 0..8, p_mid over 9..13
      for (int c = 0; c < p_hi; ) begin
        automatic int k = $urandom_range(0, 8);
        if (!s[k]) begin s[k] = 1'b1; c++; end
      end
      for (int c = 0; c < p_mid; ) begin
        automatic int k = $urandom_range(9, 13);
        if (!s[k]) begin s[k] = 1'b1; c++; end
      end
      s[14] = 1'($urandom); s[15] = 1'($urandom);
      ones_hi = 0; ones_mid = 0;
      for (int k = 0; k < 16; k++) begin
        @(negedge clk);
        bit_valid = 1'b0;
        if ($urandom_range(0, 3) == 0) @(negedge clk);
        bit_valid = 1'b1; bit_in = s[k];
        if (k < 9) ones_hi += s[k]; else if (k < 14) ones_mid += s[k];
        #1;
        check(position == 4'(k), "position counter");
        check(grp == ((k < 9) ? 2'd0 : (k < 14) ? 2'd1 : (k == 14) ? 2'd2 : 2'd3), "group select");
        check(grp_end == (k == 8 || k >= 13), "group end strobe");
        if (k == 8)  check(maj_hi == (ones_hi >= 5), "majority of 9");
        if (k == 13) check(maj_mid == (ones_mid >= 3), "majority of 5");
      end
      @(negedge clk);
      bit_valid = 1'b0;
    end
    check(hi_ties > 0, "near-tie votes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
