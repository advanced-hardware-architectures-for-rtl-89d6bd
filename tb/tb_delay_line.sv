// tb_delay_line: the configuration FIFO. Streams random words through a
// 16-deep delay line with reset and checks each comes out exactly 16 cycles
// later, that the reset empties it (zeros for the first 16 cycles), and that
// a 3-deep line without reset and a zero-depth line behave likewise.
module tb_delay_line;
  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0, cycles = 0;
  logic [7:0] din, d16, d3, d0;

  delay_line #(.WIDTH(8), .DEPTH(16), .RESET(1'b1)) dut   (.clk, .rst_n, .din, .dout(d16));
  delay_line #(.WIDTH(8), .DEPTH(3),  .RESET(1'b0)) u_nr  (.clk, .rst_n, .din, .dout(d3));
  delay_line #(.WIDTH(8), .DEPTH(0),  .RESET(1'b0)) u_w   (.clk, .rst_n, .din, .dout(d0));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] hist [$];

  initial begin
    din = 8'hff;
    repeat (20) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      din = 8'($urandom);
      hist.push_back(din);
      #1;
      checks++;
      if (d0 != din) begin failures++; $display("wire %0d", n); end
      @(posedge clk);
      #1;
      if (n >= 16) begin
        checks++;
        if (d16 != hist[n - 15]) begin
          failures++;
          if (failures < 10) $display("cycle %0d: %h expected %h", n, d16, hist[n - 15]);
        end
      end else if (n < 14) begin
        checks++;
        if (d16 != 8'h00) begin failures++; $display("reset %0d %h", n, d16); end
      end
      if (n >= 3) begin
        checks++;
        if (d3 != hist[n - 2]) begin failures++; $display("d3 %0d", n); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
