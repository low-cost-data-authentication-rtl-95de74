// tb_rx_bit_extract: sends random pixels with random plane selects and gaps,
// and checks that one clock later the unit delivers bit st of the pixel with
// bit_valid, and holds the last pixel while no new one arrives.
module tb_rx_bit_extract;
  import dh_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic pixel_valid = 1'b0;
  logic [7:0] pixel_in = '0;
  logic [2:0] st = '0;
  logic bit_out, bit_valid;
  int checks = 0, failures = 0;

  rx_bit_extract dut (.clk, .rst_n, .pixel_valid, .pixel_in, .st, .bit_out, .bit_valid);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    logic [7:0] held;
    bit was_valid;
    held = '0; was_valid = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      check(bit_valid == was_valid, "valid delayed by one clock");
      st = 3'($urandom);
      #1 check(bit_out == held[st], "selected bit plane");
      pixel_valid = ($urandom_range(0, 3) != 0);
      pixel_in = 8'($urandom);
      was_valid = pixel_valid;
      if (pixel_valid) held = pixel_in;
    end
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
