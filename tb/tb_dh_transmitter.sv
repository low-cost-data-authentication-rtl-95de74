// tb_dh_transmitter: runs the transmitter on random cover and message pixels
// with random pauses of its enable, for all eight plane selects, and checks every
// stego pixel against the reference model, the take rates (a cover pixel per
// 9 enabled clocks, a message pixel per 144) and the latency from cover take
// to stego output (9 enabled clocks).
module tb_dh_transmitter;
  import dh_pkg::*;
  import dh_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [2:0] st = '0;
  logic [7:0] cover_pixel = '0, stego_pixel;
  logic [3:0] msg_pixel = '0;
  logic cover_take, msg_take, stego_valid;
  int checks = 0, failures = 0;

  dh_transmitter dut (.clk, .rst_n, .en, .st, .cover_pixel, .cover_take,
                      .msg_pixel, .msg_take, .stego_pixel, .stego_valid);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  logic [7:0] exp_q[$];
  int en_clk, last_cov, last_msg, cov_idx, stalls;
  logic [3:0] cur_msg;
  int take_clk_q[$];

  // drive inputs at negedge, observe outputs just before the rising edge
  task automatic run(input int s, input int n_msg);
    st = 3'(s);
    rst_n = 1'b0; en = 1'b0;
    exp_q.delete(); take_clk_q.delete();
    en_clk = 0; last_cov = -1; last_msg = -1; cov_idx = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (cov_idx < n_msg * 16 || exp_q.size() > 0) begin
      @(negedge clk);
      en = ($urandom_range(0, 7) != 0);
      cover_pixel = 8'($urandom);
      msg_pixel = 4'($urandom);
      #1;
      if (!en) begin
        stalls++;
        check(!cover_take && !msg_take && !stego_valid, "nothing while disabled");
        continue;
      end
      if (stego_valid) begin
        check(exp_q.size() > 0, "stego output expected");
        if (exp_q.size() > 0) begin
          logic [7:0] e;
          e = exp_q.pop_front();
          check(stego_pixel == e, "stego pixel");
          if (stego_pixel != e) $display("  got %h exp %h", stego_pixel, e);
          check(en_clk - take_clk_q.pop_front() == 9, "latency 9 clocks");
        end
      end
      if (msg_take) begin
        if (last_msg >= 0) check(en_clk - last_msg == 144, "message pixel every 144 clocks");
        last_msg = en_clk;
        cur_msg = msg_pixel;
        check(cov_idx % 16 == 0, "message taken at pixel boundary");
      end
      if (cover_take) begin
        if (last_cov >= 0) check(en_clk - last_cov == 9, "cover pixel every 9 clocks");
        last_cov = en_clk;
        if (cov_idx < n_msg * 16) begin
          exp_q.push_back(embed(cover_pixel, s, ext_bit(cur_msg, cov_idx % 16)));
          take_clk_q.push_back(en_clk);
        end
        cov_idx++;
      end
      en_clk++;
    end
  endtask

  initial begin
    stalls = 0;
    run(3, 20);
    for (int s = 0; s < 8; s++) run(s, 4);
    check(stalls > 0, "enable pauses exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
