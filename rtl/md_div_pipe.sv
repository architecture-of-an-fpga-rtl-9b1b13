// md_div_pipe: fully pipelined unsigned restoring divider.
//
// quotient = floor(dividend / divisor), QUO_W quotient bits, one per stage.
// The upper DEND_W-QUO_W dividend bits seed the partial remainder, so the
// caller must guarantee dividend >> QUO_W < divisor (the quotient then fits
// QUO_W bits); an assertion checks it. Each stage shifts in the next lower
// dividend bit and subtracts the divisor when it fits. One operation is
// accepted per cycle; results leave QUO_W cycles later with out_valid. Used
// as the reciprocal unit (dividend = 2^60) of the force pipeline; the
// restoring algorithm is this design's choice.
module md_div_pipe #(
  parameter int unsigned DEND_W = 61,
  parameter int unsigned DSOR_W = 26,
  parameter int unsigned QUO_W  = 41
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [DEND_W-1:0] dividend,
  input  logic [DSOR_W-1:0] divisor,
  output logic              out_valid,
  output logic [QUO_W-1:0]  quotient
);
  localparam int unsigned HI_W = DEND_W - QUO_W;

  logic [DSOR_W-1:0] rem_s [QUO_W+1];
  logic [DSOR_W-1:0] dsr_s [QUO_W+1];
  logic [QUO_W-1:0]  lo_s  [QUO_W+1];
  logic [QUO_W-1:0]  quo_s [QUO_W+1];
  logic              v_s   [QUO_W+1];

  assign rem_s[0] = DSOR_W'(dividend[DEND_W-1:QUO_W]);
  assign dsr_s[0] = divisor;
  assign lo_s[0]  = dividend[QUO_W-1:0];
  assign quo_s[0] = '0;
  assign v_s[0]   = in_valid;

  for (genvar k = 0; k < QUO_W; k++) begin : g_stage
    logic [DSOR_W:0] shifted;
    logic            take;
    always_comb begin
      shifted = {rem_s[k], lo_s[k][QUO_W-1]};
      take    = (shifted >= {1'b0, dsr_s[k]});
    end
    always_ff @(posedge clk) begin
      rem_s[k+1] <= take ? DSOR_W'(shifted - {1'b0, dsr_s[k]}) : DSOR_W'(shifted);
      dsr_s[k+1] <= dsr_s[k];
      lo_s[k+1]  <= lo_s[k] << 1;
      quo_s[k+1] <= {quo_s[k][QUO_W-2:0], take};
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v_s[k+1] <= 1'b0;
      else        v_s[k+1] <= v_s[k];
    end
  end

  assign quotient  = quo_s[QUO_W];
  assign out_valid = v_s[QUO_W];

  // The seed remainder must be smaller than the divisor.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> ({{DSOR_W{1'b0}}, dividend[DEND_W-1:QUO_W]} < {{HI_W{1'b0}}, divisor}));
endmodule
