// pe_model: behavioural stand-in for a processor core, used only by the
// system testbenches. It is not the real core (an ARM9 in the case study).
//
// While `active` is high it issues one transaction at a time, advancing only
// on cycles where its clock enable is high, so its rate follows the DVFS
// operating point. It writes random words to its private memory (node 4+ID)
// and to its own 64-word region of the shared memory (node 8), and reads
// back words it has written, comparing them with its own copy. `done`
// counts completed transactions, `errors` wrong read data. When `active`
// falls it finishes the transaction in flight and stops.
module pe_model #(
  parameter int ID = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clk_en,
  input  logic        active,
  output logic        req_valid,
  input  logic        req_ready,
  output logic        req_we,
  output logic [31:0] req_addr,
  output logic [31:0] req_wdata,
  input  logic        resp_valid,
  input  logic        resp_we,
  input  logic [31:0] resp_rdata,
  output int          done,
  output int          errors
);
  logic [31:0] shadow [2][64];
  bit          valid_w [2][64];
  bit          waiting;
  bit          exp_we;
  logic [31:0] exp_data;

  initial begin
    for (int m = 0; m < 2; m++) for (int w = 0; w < 64; w++) valid_w[m][w] = 0;
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      req_valid <= 0; req_we <= 0; req_addr <= '0; req_wdata <= '0;
      waiting = 0; done <= 0; errors <= 0;
    end else begin
      if (req_valid && req_ready) req_valid <= 0;
      if (resp_valid && waiting) begin
        waiting = 0;
        done <= done + 1;
        if (resp_we != exp_we || (!exp_we && resp_rdata != exp_data)) begin
          errors <= errors + 1;
          $display("FAIL pe%0d: response %h (we=%0d) expected %h", ID, resp_rdata, resp_we, exp_data);
        end
      end else if (!waiting && !req_valid && active && clk_en) begin
        int m, w, word;
        m = $urandom_range(0, 1);
        w = $urandom_range(0, 63);
        word = (m == 0) ? w : ID * 64 + w;
        req_addr  <= {(m == 0) ? 4'(4 + ID) : 4'd8, 10'd0, 16'(word), 2'b00};
        if (!valid_w[m][w] || $urandom_range(0, 1) == 0) begin
          logic [31:0] d;
          d = $urandom;
          req_we <= 1; req_wdata <= d;
          shadow[m][w] = d; valid_w[m][w] = 1;
          exp_we = 1;
        end else begin
          req_we <= 0;
          exp_we = 0; exp_data = shadow[m][w];
        end
        req_valid <= 1;
        waiting = 1;
      end
    end
  end
endmodule
