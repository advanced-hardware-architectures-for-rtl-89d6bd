// delay_line: fixed-length shift register (FIFO without back-pressure).
//
// Used as the configuration FIFO that carries a frame slot's valid bit and
// configuration word alongside the half-iteration pipeline, and to delay
// border state metrics and hard decisions by one stage latency. Every cycle
// the word moves one place; dout is din from DEPTH cycles before. With
// RESET = 1 the contents are cleared by rst_n (used for valid bits);
// otherwise the register holds no reset. DEPTH = 0 is a wire.
module delay_line #(
  parameter int WIDTH = 2,
  parameter int DEPTH = 16,
  parameter bit RESET = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  if (DEPTH == 0) begin : g_wire
    assign dout = din;
  end else begin : g_reg
    logic [WIDTH-1:0] sr [DEPTH];
    if (RESET) begin : g_rst
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int i = 0; i < DEPTH; i++) sr[i] <= '0;
        end else begin
          sr[0] <= din;
          for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
        end
      end
    end else begin : g_norst
      always_ff @(posedge clk) begin
        sr[0] <= din;
        for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
      end
    end
    assign dout = sr[DEPTH-1];
  end
endmodule
