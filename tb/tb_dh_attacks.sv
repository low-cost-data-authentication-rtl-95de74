// tb_dh_attacks: the image attacks the scheme is evaluated against, applied
// to a full-size stego image. A 64 x 64 message is hidden in plane 2 of a
// 256 x 256 cover by the transmitter; the testbench keeps the whole stego
// image, damages it with each attack in turn and plays it into the receiver
// (reset before each attack, one pixel per clock):
//   none          the stego image as sent
//   mean 3x3      each pixel replaced by the rounded mean of its 3 x 3 window
//   median 3x3    each pixel replaced by the median of its 3 x 3 window
//   noise         additive zero-mean noise of variance 0.05 on the [0, 1]
//                 intensity scale (standard deviation about 57 grey levels),
//                 approximated by a sum of uniform samples, then clipped
// Window edges repeat the border pixels. Checks: every stego pixel against
// the reference model; every decoded pixel against the reference majority
// decision on the damaged hidden plane; exact recovery with no attack. Prints
// the hidden-bit error rate p(e) and the decoded message bit error rate per
// attack. The test images are synthetic, and the transmitter has no
// protection against filtering, so the rates only show how the circuit
// behaves; they are not a reproduction of published figures.
module tb_dh_attacks;
  import dh_pkg::*;
  import dh_ref_pkg::*;

  localparam int N = 256;
  localparam int M = 64;
  localparam int PLANE = 2;

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

  logic [7:0] stego [N*N];
  logic [7:0] attacked [N*N];

  function automatic logic [7:0] at_clamped(input int x, input int y);
    if (x < 0) x = 0;
    if (x > N - 1) x = N - 1;
    if (y < 0) y = 0;
    if (y > N - 1) y = N - 1;
    return stego[y * N + x];
  endfunction

  task automatic make_attack(input int kind);
    for (int j = 0; j < N * N; j++) begin
      int x, y, sum;
      logic [7:0] w[9];
      x = j % N; y = j / N;
      case (kind)
        0: attacked[j] = stego[j];
        1: begin
          sum = 0;
          for (int dy = -1; dy <= 1; dy++)
            for (int dx = -1; dx <= 1; dx++) sum += int'(at_clamped(x + dx, y + dy));
          attacked[j] = 8'((sum + 4) / 9);
        end
        2: begin
          int n;
          n = 0;
          for (int dy = -1; dy <= 1; dy++)
            for (int dx = -1; dx <= 1; dx++) begin w[n] = at_clamped(x + dx, y + dy); n++; end
          for (int a = 1; a < 9; a++)            // insertion sort
            for (int b = a; b > 0 && w[b-1] > w[b]; b--) begin
              logic [7:0] t;
              t = w[b]; w[b] = w[b-1]; w[b-1] = t;
            end
          attacked[j] = w[4];
        end
        default: begin
          // sum of 12 uniforms in [0, 1) minus 6 has unit variance; scale to
          // sigma = sqrt(0.05) * 255, about 57 grey levels
          int v;
          sum = 0;
          for (int k = 0; k < 12; k++) sum += int'(mix(32'(j * 12 + k) ^ 32'h9e3779b9) % 1000);
          v = int'(stego[j]) + ((sum - 6000) * 57) / 1000;
          attacked[j] = (v < 0) ? 8'd0 : (v > 255) ? 8'd255 : 8'(v);
        end
      endcase
    end
  endtask

  // transmitter run: collect the stego image
  task automatic transmit();
    int cov_idx, msg_idx, stego_idx;
    cov_idx = 0; msg_idx = 0; stego_idx = 0;
    while (stego_idx < N * N) begin
      @(negedge clk);
      tx_en = 1'b1;
      cover_pixel = (cov_idx < N * N) ? cover_at(cov_idx) : 8'h00;
      msg_pixel   = (msg_idx < M * M) ? msg_at(msg_idx) : 4'h0;
      #1;
      if (stego_valid) begin
        logic [7:0] e;
        e = embed(cover_at(stego_idx), PLANE, ext_bit(msg_at(stego_idx / 16), stego_idx % 16));
        check(stego_pixel == e, "stego pixel");
        if (stego_pixel != e && failures < 5) $display("  #%0d got %h exp %h", stego_idx, stego_pixel, e);
        stego[stego_idx] = stego_pixel;
        stego_idx++;
      end
      if (msg_take && msg_idx < M * M) msg_idx++;
      if (cover_take && cov_idx < N * N) cov_idx++;
    end
    @(negedge clk);
    tx_en = 1'b0;
  endtask

  logic [3:0] exp_q[$];
  int dec_idx, dec_bit_errs, dec_pix_errs;

  always @(posedge clk) if (rst_n && dec_valid) begin
    check(exp_q.size() > 0, "decoded pixel expected");
    if (exp_q.size() > 0) check(dec_pixel == exp_q.pop_front(), "decoded pixel");
    for (int b = 0; b < 4; b++) dec_bit_errs += int'(dec_pixel[b] != msg_at(dec_idx)[b]);
    dec_pix_errs += int'(dec_pixel != msg_at(dec_idx));
    dec_idx++;
  end

  task automatic receive(input string name);
    int raw_errs;
    logic [15:0] bits;
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    exp_q.delete();
    dec_idx = 0; dec_bit_errs = 0; dec_pix_errs = 0; raw_errs = 0;
    for (int j = 0; j < N * N; j++) begin
      @(negedge clk);
      rx_valid = 1'b1;
      rx_pixel = attacked[j];
      bits[j % 16] = attacked[j][PLANE];
      raw_errs += int'(attacked[j][PLANE] != ext_bit(msg_at(j / 16), j % 16));
      if (j % 16 == 15) exp_q.push_back(decide(bits));
    end
    @(negedge clk);
    rx_valid = 1'b0;
    repeat (4) @(negedge clk);
    check(dec_idx == M * M, "one decoded pixel per message pixel");
    $display("%-11s hidden-bit p(e) = %0d/%0d = %f, message bit errors %0d/%0d, wrong pixels %0d/%0d",
             name, raw_errs, N * N, real'(raw_errs) / (N * N), dec_bit_errs, 4 * M * M,
             dec_pix_errs, M * M);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    transmit();
    make_attack(0); receive("none");
    check(dec_bit_errs == 0, "exact recovery without attack");
    make_attack(1); receive("mean 3x3");
    make_attack(2); receive("median 3x3");
    make_attack(3); receive("noise");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
