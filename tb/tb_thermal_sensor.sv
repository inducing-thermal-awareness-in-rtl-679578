// tb_thermal_sensor: checks the sensor register's reset value (300 K in
// 1/16 K units), that a write shows on the output in the next cycle and that
// the value holds while no write is made.
module tb_thermal_sensor;
  import thermal_pkg::*;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [TEMP_W-1:0] wr_temp = '0, temp;
  int checks = 0, failures = 0;

  thermal_sensor dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic [TEMP_W-1:0] exp, input string what);
    checks++;
    if (temp !== exp) begin
      failures++;
      $display("FAIL %s: temp=%0d expected %0d", what, temp, exp);
    end
  endtask

  initial begin
    #1000 failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [TEMP_W-1:0] v;
    repeat (2) @(posedge clk);
    check(16'd4800, "reset value");
    rst_n = 1;
    for (int k = 0; k < 20; k++) begin
      v = TEMP_W'($urandom_range(4800, 5600));
      @(negedge clk); wr_en = 1; wr_temp = v;
      @(negedge clk); wr_en = 0; wr_temp = ~v;
      check(v, "after write");
      repeat (2) @(negedge clk);
      check(v, "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
