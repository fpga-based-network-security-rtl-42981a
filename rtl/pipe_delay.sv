// Delay line: DEPTH clocked registers in series (DEPTH = 0 is a wire). Used to keep
// operands aligned with the pipelined multipliers. Data registers have no reset.
module pipe_delay #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [WIDTH-1:0] r [DEPTH];
    always_ff @(posedge clk) begin
      r[0] <= d;
      for (int i = 1; i < DEPTH; i++) r[i] <= r[i-1];
    end
    assign q = r[DEPTH-1];
  end
endmodule
