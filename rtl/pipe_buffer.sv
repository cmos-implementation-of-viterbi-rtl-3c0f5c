// pipe_buffer: parameterized delay buffer.
//
// A chain of DEPTH registers of WIDTH bits: dout equals din delayed by DEPTH
// clock cycles. DEPTH = 0 is a plain wire, so a generate loop can give each
// lane of a skew or alignment buffer its own depth. Synchronous active-low
// reset clears every stage. The decoder uses it to skew the input symbols
// into the pipeline, to hold ACS decisions until the trace back reaches them
// and to align the decoded bits; that use follows the source design, the
// shift-register form is this design's choice.
module pipe_buffer #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  if (DEPTH == 0) begin : g_wire
    assign dout = din;
    // no registers: clock and reset are left unused
    logic unused_ok;
    assign unused_ok = clk ^ rst_n;
  end else begin : g_regs
    logic [WIDTH-1:0] q [DEPTH];

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < DEPTH; i++) q[i] <= '0;
      end else begin
        q[0] <= din;
        for (int i = 1; i < DEPTH; i++) q[i] <= q[i-1];
      end
    end

    assign dout = q[DEPTH-1];
  end

endmodule
