// md_delay: fixed-length register delay line.
//
// Carries side information (indices, displacement, coefficients) alongside
// the arithmetic units of the force pipeline so that it arrives in the same
// cycle as the result it belongs to. DEPTH registers of WIDTH bits; DEPTH = 0
// gives a wire. No reset: the data is qualified by a valid bit that travels
// in a separately reset delay line. Latency is exactly DEPTH cycles.
module md_delay #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [WIDTH-1:0] sr [DEPTH];
    always_ff @(posedge clk) begin
      sr[0] <= d;
      for (int unsigned k = 1; k < DEPTH; k++) sr[k] <= sr[k-1];
    end
    assign q = sr[DEPTH-1];
  end
endmodule
