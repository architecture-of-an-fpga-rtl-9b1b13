// md_pair_distance: displacement, squared distance and cut-off test of one
// atom pair per cycle.
//
// Stage 1 forms d = r_i - r_j per axis and applies the minimum-image rule of
// a periodic cubic box of edge box_len: a component above +box_len/2 has
// box_len subtracted, one below -box_len/2 has box_len added. Coordinates are
// expected inside [0, box_len), so one correction is enough. Stage 2 forms
// r2 = dx^2 + dy^2 + dz^2 (saturated to R2_W bits) and flags the pair
// in_range when R2_MIN <= r2 < cutoff2. Latency DIST_LAT = 2 cycles,
// initiation interval 1.
//
// The periodic box and the cut-off distance follow the accelerator's
// simulation method; applying them per pair inside the pipeline, the cubic
// box and the 1 A lower limit are this design's choices.
module md_pair_distance
  import md_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  vec_t            ri,
  input  vec_t            rj,
  input  logic [COORD_W-1:0] box_len,   // box edge, Q.20
  input  logic [R2_W-1:0] cutoff2,      // squared cut-off, Q.20
  output logic            out_valid,
  output vec_t            d,            // minimum-image displacement r_i - r_j
  output logic [R2_W-1:0] r2,
  output logic            in_range
);
  function automatic coord_t min_image(coord_t a, coord_t b, logic [COORD_W-1:0] len);
    logic signed [COORD_W+1:0] diff, half, l;
    diff = $signed({{2{a[COORD_W-1]}}, a}) - $signed({{2{b[COORD_W-1]}}, b});
    l    = $signed({2'b00, len});
    half = $signed({3'b000, len[COORD_W-1:1]});
    if (diff > half)       diff = diff - l;
    else if (diff < -half) diff = diff + l;
    return coord_t'(diff);
  endfunction

  vec_t d1;
  logic v1, v2;

  always_ff @(posedge clk) begin
    d1.x <= min_image(ri.x, rj.x, box_len);
    d1.y <= min_image(ri.y, rj.y, box_len);
    d1.z <= min_image(ri.z, rj.z, box_len);
  end

  function automatic logic [2*COORD_W-1:0] square(coord_t a);
    logic signed [2*COORD_W-1:0] e;
    e = (2*COORD_W)'(a);
    return $unsigned(e * e);
  endfunction

  logic [2*COORD_W+1:0] sum_sq;
  logic [R2_W-1:0]      r2_next;
  always_comb begin
    sum_sq = (2*COORD_W+2)'(square(d1.x)) + (2*COORD_W+2)'(square(d1.y))
           + (2*COORD_W+2)'(square(d1.z));
    if ((sum_sq >> COORD_FR) > (2*COORD_W+2)'({R2_W{1'b1}})) r2_next = '1;
    else                                                     r2_next = R2_W'(sum_sq >> COORD_FR);
  end

  always_ff @(posedge clk) begin
    d        <= d1;
    r2       <= r2_next;
    in_range <= (r2_next < cutoff2) && (r2_next >= R2_MIN);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
    end else begin
      v1 <= in_valid;
      v2 <= v1;
    end
  end
  assign out_valid = v2;
endmodule
