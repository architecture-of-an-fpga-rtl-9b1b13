// md_isqrt_pipe: fully pipelined integer square root.
//
// Computes root = floor(sqrt(x)) for an IN_W = 2*OUT_W bit operand with the
// restoring digit-by-digit method: each of the OUT_W stages brings down the
// next two operand bits, tries to subtract (4*root + 1) from the partial
// remainder and shifts one result bit into the root. A new operand is
// accepted every cycle (initiation interval 1); the result appears exactly
// OUT_W cycles later with in_valid delayed to out_valid. The one-loop,
// one-result-per-cycle pipelining follows the accelerator's loop-pipelining
// scheme; the square-root algorithm itself is this design's choice.
module md_isqrt_pipe #(
  parameter int unsigned OUT_W = 26,
  localparam int unsigned IN_W = 2 * OUT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [IN_W-1:0]  x,
  output logic             out_valid,
  output logic [OUT_W-1:0] root
);
  localparam int unsigned REM_W = OUT_W + 3;

  logic [REM_W-1:0] rem_s  [OUT_W+1];
  logic [OUT_W-1:0] root_s [OUT_W+1];
  logic [IN_W-1:0]  x_s    [OUT_W+1];
  logic             v_s    [OUT_W+1];

  assign rem_s[0]  = '0;
  assign root_s[0] = '0;
  assign x_s[0]    = x;
  assign v_s[0]    = in_valid;

  for (genvar k = 0; k < OUT_W; k++) begin : g_stage
    logic [REM_W-1:0] shifted, trial;
    logic             take;
    always_comb begin
      shifted = {rem_s[k][REM_W-3:0], x_s[k][IN_W-1 -: 2]};
      trial   = REM_W'({root_s[k], 2'b01});
      take    = (shifted >= trial);
    end
    always_ff @(posedge clk) begin
      rem_s[k+1]  <= take ? shifted - trial : shifted;
      root_s[k+1] <= {root_s[k][OUT_W-2:0], take};
      x_s[k+1]    <= x_s[k] << 2;
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v_s[k+1] <= 1'b0;
      else        v_s[k+1] <= v_s[k];
    end
  end

  assign root      = root_s[OUT_W];
  assign out_valid = v_s[OUT_W];
endmodule
