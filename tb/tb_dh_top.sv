// tb_dh_top: end-to-end run of the whole design at its built-in sizes. A
// 64 x 64 message image of 4-bit pixels is hidden in bit plane 2 of a
// 256 x 256 cover image of 8-bit pixels (16 cover pixels per message pixel,
// so the cover is used exactly), the stego stream passes a channel that flips
// the hidden bit with a small probability, and the receiver decodes it.
// Checks: every stego pixel against the reference model, the take rates,
// every decoded pixel against the reference decision on the damaged bits,
// one decoded pixel per message pixel. Counts and requires at least once each:
// transmitter pauses, cover loads, message loads, receiver input gaps, damage
// corrected in the 9-copy group, damage corrected in the 5-copy group, and
// damage the vote cannot correct. Prints the bit error rate before and after
// the vote.
module tb_dh_top;
  import dh_pkg::*;
  import dh_ref_pkg::*;

  localparam int N = 256;                 // cover image side
  localparam int M = 64;                  // message image side
  localparam int PLANE = 2;               // hidden bit plane (third LSB)
  localparam int FLIP_PER_1024 = 40;      // channel flip probability of the hidden bit

  logic clk = 1'b0, rst_n = 1'b0, tx_en = 1'b0;
  logic [2:0] st = 3'(PLANE);
  logic [7:0] cover_pixel = '0, stego_pixel, rx_pixel = '0;
  logic [3:0] msg_pixel = '0, dec_pixel;
  logic cover_take, msg_take, stego_valid, rx_valid = 1'b0, dec_valid;
  int checks = 0, failures = 0;

  dh_top dut (.clk, .rst_n, .st, .tx_en, .cover_pixel, .cover_take, .msg_pixel, .msg_take,
              .stego_pixel, .stego_valid, .rx_valid, .rx_pixel, .dec_pixel, .dec_valid);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // test images: smooth ramps with a little hashed texture
  function automatic logic [7:0] cover_at(input int j);
    int x, y;
    x = j % N; y = j / N;
    return 8'((x + y) / 2 + (mix(32'(j)) % 16));
  endfunction

  function automatic logic [3:0] msg_at(input int i);
    int x, y;
    x = i % M; y = i / M;
    return 4'((((x / 8) ^ (y / 8)) % 2 == 1) ? 12 + (x % 4) : (y / 4));
  endfunction

  int cov_idx = 0, msg_idx = 0, stego_idx = 0, rx_idx = 0, dec_idx = 0;
  int all_clk = 0, en_clk = 0, last_cov = -1, last_msg = -1;
  int n_stall = 0, n_cov = 0, n_msg = 0, n_gap = 0;
  int n_fix_hi = 0, n_fix_mid = 0, n_bad = 0;
  int raw_errs = 0, dec_errs = 0;
  logic [7:0]  chan_q[$];
  logic [15:0] rx_bits;
  logic [3:0]  exp_q[$];

  // transmitter side and channel
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (stego_idx < N * N) begin
      @(negedge clk);
      tx_en = (mix(32'(all_clk++) ^ 32'h55aa) % 16) != 0;
      cover_pixel = (cov_idx < N * N) ? cover_at(cov_idx) : 8'h00;
      msg_pixel   = (msg_idx < M * M) ? msg_at(msg_idx) : 4'h0;
      #1;
      if (!tx_en) begin
        n_stall++;
        check(!cover_take && !msg_take && !stego_valid, "transmitter holds while paused");
        continue;
      end
      if (stego_valid && stego_idx < N * N) begin
        logic [7:0] e, a;
        e = embed(cover_at(stego_idx), PLANE, ext_bit(msg_at(stego_idx / 16), stego_idx % 16));
        check(stego_pixel == e, "stego pixel");
        a = stego_pixel;
        if ((mix(32'(stego_idx) ^ 32'hc0ffee) % 1024) < FLIP_PER_1024) a[PLANE] = ~a[PLANE];
        chan_q.push_back(a);
        stego_idx++;
      end
      if (msg_take) begin
        if (last_msg >= 0) check(en_clk - last_msg == 144, "message pixel every 144 clocks");
        last_msg = en_clk;
        if (msg_idx < M * M) begin msg_idx++; n_msg++; end
      end
      if (cover_take) begin
        if (last_cov >= 0) check(en_clk - last_cov == 9, "cover pixel every 9 clocks");
        last_cov = en_clk;
        if (cov_idx < N * N) begin cov_idx++; n_cov++; end
      end
      en_clk++;
    end
  end

  // receiver side: drain the channel with random gaps
  always @(negedge clk) begin
    rx_valid <= 1'b0;
    if (chan_q.size() > 0) begin
      if ($urandom_range(0, 3) == 0) n_gap++;
      else begin
        logic [7:0] a;
        int k;
        a = chan_q.pop_front();
        k = rx_idx % 16;
        rx_bits[k] = a[PLANE];
        if (a[PLANE] != ext_bit(msg_at(rx_idx / 16), k)) raw_errs++;
        if (k == 15) begin
          logic [3:0] o;
          int e_hi, e_mid;
          o = msg_at(rx_idx / 16);
          e_hi = 0; e_mid = 0;
          for (int b = 0; b < 9; b++)  e_hi  += int'(rx_bits[b] != o[3]);
          for (int b = 9; b < 14; b++) e_mid += int'(rx_bits[b] != o[2]);
          if (e_hi > 0 && e_hi < 5)   n_fix_hi++;
          if (e_mid > 0 && e_mid < 3) n_fix_mid++;
          if (decide(rx_bits) != o)   n_bad++;
          exp_q.push_back(decide(rx_bits));
        end
        rx_valid <= 1'b1;
        rx_pixel <= a;
        rx_idx++;
      end
    end
  end

  always @(posedge clk) if (rst_n && dec_valid) begin
    check(exp_q.size() > 0, "decoded pixel expected");
    if (exp_q.size() > 0) begin
      logic [3:0] e;
      e = exp_q.pop_front();
      check(dec_pixel == e, "decoded pixel");
      for (int b = 0; b < 4; b++) dec_errs += int'(dec_pixel[b] != msg_at(dec_idx)[b]);
    end
    dec_idx++;
  end

  initial begin
    wait (dec_idx == M * M);
    repeat (20) @(posedge clk);
    check(dec_idx == M * M, "one decoded pixel per message pixel");
    check(cov_idx == N * N && msg_idx == M * M, "whole images consumed");
    check(n_stall > 0, "transmitter pause happened");
    check(n_cov > 0 && n_msg > 0, "cover and message loads happened");
    check(n_gap > 0, "receiver input gap happened");
    check(n_fix_hi > 0, "damage corrected in the 9-copy group");
    check(n_fix_mid > 0, "damage corrected in the 5-copy group");
    check(n_bad > 0, "uncorrectable damage happened");
    $display("pauses=%0d cover_loads=%0d message_loads=%0d rx_gaps=%0d", n_stall, n_cov, n_msg, n_gap);
    $display("fixed_hi=%0d fixed_mid=%0d wrong_pixels=%0d", n_fix_hi, n_fix_mid, n_bad);
    $display("channel bit errors %0d of %0d, decoded bit errors %0d of %0d",
             raw_errs, N * N, dec_errs, M * M * 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired: cover %0d message %0d stego %0d received %0d decoded %0d",
             cov_idx, msg_idx, stego_idx, rx_idx, dec_idx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
