// thermal_sensor: temperature register of one processing element.
//
// In the emulated system the sensor is a register: the emulation control
// processor writes the temperature computed by the thermal model (wr_en,
// wr_temp), and the PE's network interface reads it continuously on temp.
// A write appears on temp in the next cycle. Reset loads RESET_TEMP.
//
// Format: unsigned Kelvin with TEMP_FRAC fraction bits (thermal_pkg). The
// register-based sensor follows the document; the 300 K reset value is read
// from the start of its temperature traces, and the format is this design's.
module thermal_sensor
  import thermal_pkg::*;
#(
  parameter logic [TEMP_W-1:0] RESET_TEMP = 16'd4800   // 300 K
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [TEMP_W-1:0] wr_temp,
  output logic [TEMP_W-1:0] temp
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     temp <= RESET_TEMP;
    else if (wr_en) temp <= wr_temp;
  end
endmodule
