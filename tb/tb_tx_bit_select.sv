// tb_tx_bit_select: for every plane select, loads and then rotates 8 times,
// checking that insert rises in exactly one rotate step, the one whose index
// equals st, and never during a load or a pause between rotate steps.
module tb_tx_bit_select;
  import dh_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0, shift = 1'b0, insert;
  logic [PLANE_W-1:0] st = '0;
  int checks = 0, failures = 0;

  tx_bit_select dut (.clk, .rst_n, .load, .shift, .st, .insert);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s st=%0d (t=%0t)", what, st, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 4; rep++) begin
      for (int s = 0; s < 8; s++) begin
        automatic int hits = 0;
        @(negedge clk);
        st = PLANE_W'(s); load = 1'b1; shift = 1'b0;
        #1 check(!insert, "no insert during load");
        for (int k = 0; k < 8; k++) begin
          @(negedge clk);
          load = 1'b0; shift = 1'b0;
          if (rep > 1 && $urandom_range(0, 2) == 0) begin   // idle clock
            #1 check(!insert, "no insert while idle");
            @(negedge clk);
          end
          shift = 1'b1;
          #1;
          check(insert == (k == s), "insert in step st only");
          if (insert) hits++;
        end
        check(hits == 1, "one insertion per pixel");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
