// tb_tx_msg_ext: drives the message extension unit with the load, sync and
// step pulses of a hiding cycle (made by the testbench, with idle clocks
// between steps) and checks the 16 output bits of each message pixel against
// the expected string: bit 4 nine times, bit 3 five times, bit 2, bit 1.
module tb_tx_msg_ext;
  import dh_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load_n = 1'b1, sync_n = 1'b1, step = 1'b0;
  logic [3:0] msg_pixel = '0;
  logic bit_out;
  logic [3:0] position;
  int checks = 0, failures = 0;

  tx_msg_ext dut (.clk, .rst_n, .load_n, .sync_n, .step, .msg_pixel, .bit_out, .position);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  function automatic bit ext_bit(input logic [3:0] p, input int k);
    if (k < 9)  return p[3];
    if (k < 14) return p[2];
    if (k == 14) return p[1];
    return p[0];
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 40; n++) begin
      logic [3:0] p;
      p = (n < 16) ? 4'(n) : 4'($urandom);
      @(negedge clk);
      load_n = 1'b0; msg_pixel = p;
      @(negedge clk);
      load_n = 1'b1; msg_pixel = 4'($urandom);
      for (int k = 0; k < 16; k++) begin
        repeat ($urandom_range(0, 3)) begin
          @(negedge clk);
          check(bit_out == ext_bit(p, k), "bit held between steps");
        end
        check(position == 4'(k), "position counter");
        check(bit_out == ext_bit(p, k), "extended bit value");
        step = 1'b1;
        sync_n = (k != 15);
        @(negedge clk);
        step = 1'b0; sync_n = 1'b1;
      end
    end
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
