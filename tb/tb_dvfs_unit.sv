// tb_dvfs_unit: sets the four processors to different operating points over
// the slave bus and counts clock-enable pulses over 256 cycles: 256, 128, 64
// or 32 for 500, 250, 125 or 62.5 MHz. Also checks the reset point (500 MHz),
// the voltage codes, read-back, an out-of-range write and freeze.
module tb_dvfs_unit;
  import thermal_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, freeze = 0;
  logic bus_valid = 0, bus_we = 0;
  logic [ADDR_W-1:0] bus_addr = '0;
  logic [DATA_W-1:0] bus_wdata = '0, bus_rdata;
  freq_level_e [N-1:0] pe_level;
  logic [N-1:0][1:0]   pe_vsel;
  logic [N-1:0]        pe_clk_en;
  int checks = 0, failures = 0;
  int cnt [N];

  dvfs_unit #(.N_PE(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input int a, input int lv);
    @(negedge clk); bus_valid = 1; bus_we = 1; bus_addr = ADDR_W'(a); bus_wdata = DATA_W'(lv);
    @(negedge clk); bus_valid = 0; bus_we = 0;
  endtask

  task automatic count(input int cycles);
    for (int i = 0; i < N; i++) cnt[i] = 0;
    repeat (cycles) begin
      @(posedge clk);
      for (int i = 0; i < N; i++) if (pe_clk_en[i]) cnt[i]++;
    end
  endtask

  initial begin
    #100000 failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lv [N];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) chk(pe_level[i] == F_500M, "reset level 500 MHz");
    count(64);
    for (int i = 0; i < N; i++) chk(cnt[i] == 64, "500 MHz enables every cycle");
    for (int round = 0; round < 4; round++) begin
      for (int i = 0; i < N; i++) begin
        lv[i] = (i + round) % 4;
        wr(i, lv[i]);
      end
      wr(7, 0);  // outside the PE range: ignored
      count(256);
      for (int i = 0; i < N; i++) begin
        chk(cnt[i] == (256 >> (3 - lv[i])), $sformatf("pe%0d level %0d pulses %0d", i, lv[i], cnt[i]));
        chk(int'(pe_vsel[i]) == lv[i], "vsel");
        chk(int'(pe_level[i]) == lv[i], "level");
        @(negedge clk); bus_valid = 1; bus_we = 0; bus_addr = ADDR_W'(i);
        @(negedge clk); bus_valid = 0;
        chk(bus_rdata == DATA_W'(lv[i]), "read back");
      end
    end
    freeze = 1;
    count(64);
    for (int i = 0; i < N; i++) chk(cnt[i] == 0, "freeze stops every clock");
    freeze = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
