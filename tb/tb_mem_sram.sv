// tb_mem_sram: writes random words to random addresses of a 256-word memory,
// keeps a reference copy, and reads addresses back, checking the data one
// cycle after each read request.
module tb_mem_sram;
  import thermal_pkg::*;
  localparam int DEPTH = 256;
  logic clk = 0, bus_valid = 0, bus_we = 0;
  logic [ADDR_W-1:0] bus_addr = '0;
  logic [DATA_W-1:0] bus_wdata = '0, bus_rdata;
  logic [DATA_W-1:0] ref_mem [DEPTH];
  bit               written [DEPTH];
  int checks = 0, failures = 0;

  mem_sram #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000 failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    for (int i = 0; i < DEPTH; i++) written[i] = 0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      a = $urandom_range(0, DEPTH - 1);
      bus_valid = 1;
      bus_addr  = ADDR_W'(a);
      if ($urandom_range(0, 1) == 0 || !written[a]) begin
        bus_we = 1; bus_wdata = $urandom;
        ref_mem[a] = bus_wdata; written[a] = 1;
      end else begin
        bus_we = 0;
        @(negedge clk);
        bus_valid = 0;
        checks++;
        if (bus_rdata !== ref_mem[a]) begin
          failures++;
          $display("FAIL read %0d: %h expected %h", a, bus_rdata, ref_mem[a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
