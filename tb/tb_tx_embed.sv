// tb_tx_embed: loads random cover pixels, rotates them 8 times with the
// message bit inserted in rotate step st, and checks the result is the cover
// pixel with only bit st replaced; also checks that 8 rotations without an
// insertion give the cover pixel back unchanged.
module tb_tx_embed;
  import dh_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load_n = 1'b1, shift = 1'b0, insert = 1'b0, msg_bit = 1'b0;
  logic [7:0] cover_pixel = '0, pixel_out;
  int checks = 0, failures = 0;

  tx_embed dut (.clk, .rst_n, .load_n, .shift, .insert, .msg_bit, .cover_pixel, .pixel_out);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      logic [7:0] cov, exp;
      int s;
      bit m, use_ins;
      cov = 8'($urandom);
      s = $urandom_range(0, 7);
      m = 1'($urandom);
      use_ins = (n % 5 != 4);
      exp = cov;
      if (use_ins) exp[s] = m;
      @(negedge clk);
      load_n = 1'b0; cover_pixel = cov; shift = 1'b0; insert = 1'b0;
      @(negedge clk);
      load_n = 1'b1; cover_pixel = 8'($urandom);
      check(pixel_out == cov, "parallel load");
      for (int k = 0; k < 8; k++) begin
        shift = 1'b1; insert = use_ins && (k == s); msg_bit = insert ? m : 1'($urandom);
        @(negedge clk);
      end
      shift = 1'b0; insert = 1'b0;
      check(pixel_out == exp, "stego pixel after 8 rotations");
      if (pixel_out != exp) $display("  cover %h st %0d bit %0d got %h exp %h", cov, s, m, pixel_out, exp);
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
