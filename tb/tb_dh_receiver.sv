// tb_dh_receiver: builds stego pixel streams with the reference model,
// corrupts the hidden plane (random flips, some in numbers the majority vote
// can correct and some it cannot), sends them with random gaps and checks each
// decoded message pixel against the reference decision on the corrupted bits
// and, where the damage was correctable, against the original pixel.
module tb_dh_receiver;
  import dh_pkg::*;
  import dh_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] st = '0;
  logic pixel_valid = 1'b0;
  logic [7:0] pixel_in = '0;
  logic [3:0] msg_pixel;
  logic msg_valid;
  int checks = 0, failures = 0;
  int corrected = 0, uncorrectable = 0;

  dh_receiver dut (.clk, .rst_n, .st, .pixel_valid, .pixel_in, .msg_pixel, .msg_valid);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  logic [3:0] exp_q[$];
  logic [3:0] orig_q[$];
  bit         fixable_q[$];
  int got = 0;

  always @(posedge clk) if (rst_n && msg_valid) begin
    logic [3:0] e, o;
    bit f;
    got++;
    check(exp_q.size() > 0, "decoded pixel expected");
    if (exp_q.size() > 0) begin
      e = exp_q.pop_front(); o = orig_q.pop_front(); f = fixable_q.pop_front();
      check(msg_pixel == e, "decoded pixel matches reference decision");
      if (f) check(msg_pixel == o, "correctable damage corrected");
    end
  end

  initial begin
    int s, total;
    s = 5; st = 3'(s);
    total = 300;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < total; n++) begin
      logic [3:0] p;
      logic [15:0] bits;
      int fl_hi, fl_mid;
      bit fl_lo;
      p = 4'($urandom);
      for (int k = 0; k < 16; k++) bits[k] = ext_bit(p, k);
      // choose damage: up to 4 of 9 and 2 of 5 are correctable
      fl_hi  = $urandom_range(0, (n % 7 == 0) ? 9 : 4);
      fl_mid = $urandom_range(0, (n % 5 == 0) ? 5 : 2);
      fl_lo  = (n % 11 == 0);
      for (int c = 0; c < fl_hi; ) begin
        automatic int k = $urandom_range(0, 8);
        if (bits[k] == p[3]) begin bits[k] = ~p[3]; c++; end
      end
      for (int c = 0; c < fl_mid; ) begin
        automatic int k = $urandom_range(9, 13);
        if (bits[k] == p[2]) begin bits[k] = ~p[2]; c++; end
      end
      if (fl_lo) bits[15] = ~bits[15];
      exp_q.push_back(decide(bits));
      orig_q.push_back(p);
      fixable_q.push_back(fl_hi <= 4 && fl_mid <= 2 && !fl_lo);
      if (fl_hi <= 4 && fl_mid <= 2 && (fl_hi + fl_mid) > 0) corrected++;
      if (decide(bits) != p) uncorrectable++;
      for (int k = 0; k < 16; k++) begin
        @(negedge clk);
        pixel_valid = 1'b0;
        while ($urandom_range(0, 2) == 0) @(negedge clk);
        pixel_valid = 1'b1;
        pixel_in = embed(8'($urandom), s, bits[k]);
      end
    end
    @(negedge clk);
    pixel_valid = 1'b0;
    repeat (4) @(negedge clk);
    check(got == total, "one decoded pixel per 16 stego pixels");
    check(corrected > 0, "correctable errors exercised");
    check(uncorrectable > 0, "uncorrectable errors exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
