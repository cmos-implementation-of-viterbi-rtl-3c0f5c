// tb_pipe_buffer: checks the delay buffer at depths 5 and 0.
//
// A random byte stream goes into both instances; the 5-deep one must return
// each byte exactly five clocks later (zero during the first five cycles
// after reset), the 0-deep one in the same cycle. The comparison uses a
// history queue kept by the testbench.
module tb_pipe_buffer;

  logic       clk = 0, rst_n = 0;
  logic [7:0] din, dout5, dout0;
  int checks = 0, failures = 0;
  logic [7:0] hist[$];

  pipe_buffer #(.WIDTH(8), .DEPTH(5)) dut5 (.clk, .rst_n, .din, .dout(dout5));
  pipe_buffer #(.WIDTH(8), .DEPTH(0)) dut0 (.clk, .rst_n, .din, .dout(dout0));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 5; k++) hist.push_back(8'h00);
    for (int cyc = 0; cyc < 300; cyc++) begin
      din = 8'($urandom);
      #1;
      checks++;
      if (dout0 !== din) begin failures++; $display("depth 0 mismatch at %0d", cyc); end
      checks++;
      if (dout5 !== hist[hist.size()-5]) begin
        failures++; $display("depth 5 mismatch at %0d: %h vs %h", cyc, dout5, hist[hist.size()-5]);
      end
      hist.push_back(din);
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
