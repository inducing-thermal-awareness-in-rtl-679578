// vtc_pe_model: behavioural processor running one share of a parallel
// texture-coding kernel, used only by the workload testbench. It is not the
// real core.
//
// Each iteration multiplies, element by element, 8 rows of two 32x32
// complex windows held in the processor's private memory (window A at word
// t*1024, window B at t*1024+512, real and imaginary parts interleaved)
// and writes the products to the processor's 512-word region of the shared
// memory. It then writes iteration+1 to its flag word (2048 + ID) in the
// shared memory. Processor 0 then also gathers: it waits for every flag,
// reads back all 2048 product words and reports their 32-bit sum on
// `checksum` with a `gathered` pulse. The others sleep, issuing no
// transactions, until `go` for the next iteration. Every step waits for
// cycles on which the processor's clock enable is high, and each complex
// product costs COMPUTE enabled cycles. `busy` is low while sleeping.
module vtc_pe_model #(
  parameter int ID      = 0,
  parameter int N_ITER  = 3,
  parameter int COMPUTE = 4
) (
  input  logic        clk,
  input  logic        clk_en,
  input  logic        run,
  input  int          go,           // number of iterations released
  output logic        req_valid,
  input  logic        req_ready,
  output logic        req_we,
  output logic [31:0] req_addr,
  output logic [31:0] req_wdata,
  input  logic        resp_valid,
  input  logic [31:0] resp_rdata,
  output logic        busy,
  output logic        gathered,
  output logic [31:0] checksum,
  output logic        finished
);
  localparam logic [3:0] SHM = 4'd8;

  initial begin
    req_valid = 0; req_we = 0; req_addr = '0; req_wdata = '0;
    busy = 0; gathered = 0; checksum = '0; finished = 0;
  end

  task automatic en_cycle();
    @(posedge clk);
    while (!clk_en) @(posedge clk);
  endtask

  task automatic xact(input bit we, input logic [3:0] node, input int word,
                      input logic [31:0] wd, output logic [31:0] rd);
    en_cycle();
    req_valid <= 1; req_we <= we; req_wdata <= wd;
    req_addr  <= {node, 10'd0, 16'(word), 2'b00};
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    req_valid <= 0;
    @(posedge clk);
    while (!resp_valid) @(posedge clk);
    rd = resp_rdata;
  endtask

  initial forever begin
    logic [31:0] a, b, c, d, dummy, s;
    wait (run);
    finished = 0;
    for (int t = 0; t < N_ITER && run; t++) begin
      busy = 0;
      while (go <= t) @(posedge clk);
      busy = 1;
      for (int e = 0; e < 256; e++) begin
        xact(0, 4'(4 + ID), t * 1024 + 2 * e,           '0, a);
        xact(0, 4'(4 + ID), t * 1024 + 2 * e + 1,       '0, b);
        xact(0, 4'(4 + ID), t * 1024 + 512 + 2 * e,     '0, c);
        xact(0, 4'(4 + ID), t * 1024 + 512 + 2 * e + 1, '0, d);
        repeat (COMPUTE) en_cycle();
        xact(1, SHM, ID * 512 + 2 * e,     a * c - b * d, dummy);
        xact(1, SHM, ID * 512 + 2 * e + 1, a * d + b * c, dummy);
      end
      xact(1, SHM, 2048 + ID, 32'(t + 1), dummy);
      if (ID == 0) begin
        for (int p = 1; p < 4; p++) begin
          do xact(0, SHM, 2048 + p, '0, s); while (s != 32'(t + 1));
        end
        s = '0;
        for (int w = 0; w < 2048; w++) begin
          xact(0, SHM, w, '0, a);
          s = s + a;
        end
        checksum = s;
        gathered = 1;
        @(posedge clk);
        gathered = 0;
      end
    end
    busy = 0;
    finished = 1;
    wait (!run);
  end
endmodule
