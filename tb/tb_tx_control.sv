// tb_tx_control: checks the transmitter timing against an independent cycle
// counter kept by the testbench: cover load every 9th clock, message load
// every 144 clocks with the counter synchronisation pulse one clock before
// it, 8 shifts per cover pixel, step on the last shift, out_valid from the
// second cover load on, and nothing moving while en is low.
module tb_tx_control;
  import dh_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    en = 1'b0;
  tx_ctl_t ctl;
  logic [7:0] count;
  int checks = 0, failures = 0;

  tx_control dut (.clk, .rst_n, .en, .ctl, .count);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  int t = 0;             // enabled clocks since reset, testbench's own count
  int last_msg = -1;
  int gaps = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3 * 144 + 20; i++) begin
      @(negedge clk);
      en = ($urandom_range(0, 5) != 0) || (i < 10);
      #1;
      if (!en) begin
        check(ctl.cov_load_n && ctl.msg_load_n && ctl.sync_n && !ctl.shift && !ctl.step,
              "no pulse while disabled");
        gaps++;
      end else begin
        automatic int ph = t % 9;
        automatic int cy = t % 144;
        check(count == 8'(cy), "counter value");
        check(ctl.cov_load_n == (ph != 0), "cover load every 9th clock");
        check(ctl.shift == (ph != 0), "shift between loads");
        check(ctl.step == (ph == 8), "step on last shift");
        check(ctl.msg_load_n == (cy != 0), "message load at cycle start");
        check(ctl.sync_n == (cy != 143), "sync one clock before message load");
        check(ctl.out_valid == (ph == 0 && t > 0), "stego valid on later loads");
        if (cy == 0) begin
          if (last_msg >= 0) check(t - last_msg == 144, "144 enabled clocks per hiding cycle");
          last_msg = t;
        end
        t++;
      end
    end
    check(gaps > 0, "enable gaps exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
