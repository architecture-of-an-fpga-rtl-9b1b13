// md_force_pipe: pipelined non-bonded force of one atom pair per cycle.
//
// For the pair (i, j) it computes the force on atom i
//     F_i = d * (1/r^2) * ( A/r^12 - B/r^6 + qq/r ),   d = r_i - r_j,
// the Lennard-Jones (van der Waals) term with A = 12*C12, B = 6*C6 and the
// cut-off Coulomb (electrostatic) term with qq = qi*qj (charges pre-scaled
// by sqrt of the Coulomb constant). The force on atom j is -F_i. Pairs that
// are not in range (see md_pair_distance) leave with a zero force.
//
// Stages: md_pair_distance (2 cycles), square root r = sqrt(r^2)
// (SQRT_LAT = 26), reciprocal 1/r = 2^60 / r (DIV_LAT = 41), then seven
// product stages: 1/r^2 and qq; 1/r^4 and Coulomb; 1/r^6; 1/r^12 and the B
// term; the A term and the sum; times 1/r^2; times d. Everything that a
// later stage needs travels in md_delay lines. A new pair is accepted every
// cycle and its force leaves FORCE_LAT = 76 cycles later; the tag (the two
// atom indices) leaves with it. There is no back-pressure: like the
// accelerator's single pipelined loop, the pipeline never stalls and idle
// cycles travel through it as bubbles (valid low).
//
// The pipeline structure (one deep pipeline over a flat list of atom pairs)
// and the two force kinds follow the accelerator; the force formulas, the
// fixed-point formats (md_pkg) and the stage split are this design's own.
module md_force_pipe
  import md_pkg::*;
#(
  parameter int unsigned TAG_W = 30
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [TAG_W-1:0]   in_tag,
  input  vec_t               ri,
  input  vec_t               rj,
  input  charge_t            qi,
  input  charge_t            qj,
  input  ljcoef_t            coef,
  input  logic [COORD_W-1:0] box_len,
  input  logic [R2_W-1:0]    cutoff2,
  output logic               out_valid,
  output logic [TAG_W-1:0]   out_tag,
  output logic               out_in_range,
  output fvec_t              force_i
);
  localparam int unsigned ROOT_DIV = SQRT_LAT + DIV_LAT;
  localparam int unsigned S_W      = 80;   // signed Q.32 intermediate sums

  // ---------------------------------------------------------------- distance
  logic            dv;
  vec_t            dvec;
  logic [R2_W-1:0] r2;
  logic            inr;

  md_pair_distance u_dist (
    .clk, .rst_n, .in_valid, .ri, .rj, .box_len, .cutoff2,
    .out_valid(dv), .d(dvec), .r2, .in_range(inr)
  );

  // Side information delayed to the distance output.
  typedef struct packed {
    logic [TAG_W-1:0] tag;
    charge_t          qi;
    charge_t          qj;
    ljcoef_t          coef;
  } side_t;

  side_t side_in, side_d;
  assign side_in = '{tag: in_tag, qi: qi, qj: qj, coef: coef};
  md_delay #(.WIDTH($bits(side_t)), .DEPTH(DIST_LAT)) u_side0 (.clk, .d(side_in), .q(side_d));

  // -------------------------------------------------- square root, reciprocal
  // Out-of-range pairs are fed a harmless r^2 = R2_MIN so that the divider's
  // operand stays within its range; their force is zeroed at the end.
  logic [R2_W-1:0]      r2_op;
  logic [SQRT_IN_W-1:0] sqrt_in;
  logic                 sv;
  logic [R_W-1:0]       r;
  logic                 qv;
  logic [INVR_W-1:0]    inv_r;

  assign r2_op   = inr ? r2 : R2_MIN;
  assign sqrt_in = SQRT_IN_W'(r2_op) << COORD_FR;

  md_isqrt_pipe #(.OUT_W(R_W)) u_sqrt (
    .clk, .rst_n, .in_valid(dv), .x(sqrt_in), .out_valid(sv), .root(r)
  );

  md_div_pipe #(.DEND_W(COORD_FR + INVR_FR + 1), .DSOR_W(R_W), .QUO_W(INVR_W)) u_recip (
    .clk, .rst_n, .in_valid(sv),
    .dividend((COORD_FR + INVR_FR + 1)'(1) << (COORD_FR + INVR_FR)),
    .divisor(r), .out_valid(qv), .quotient(inv_r)
  );

  typedef struct packed {
    side_t side;
    vec_t  d;
    logic  inr;
  } side2_t;

  side2_t s2_in, s2;
  assign s2_in = '{side: side_d, d: dvec, inr: inr};
  md_delay #(.WIDTH($bits(side2_t)), .DEPTH(ROOT_DIV)) u_side1 (.clk, .d(s2_in), .q(s2));

  // ---------------------------------------------------------- product stages
  // Unsigned power products keep POW_FR fraction bits; all are <= 1 because
  // r >= 1 A.
  function automatic logic [POW_W-1:0] pmul(logic [POW_W-1:0] a, logic [POW_W-1:0] b);
    logic [2*POW_W-1:0] p;
    p = (2*POW_W)'(a) * (2*POW_W)'(b);
    return POW_W'(p >> POW_FR);
  endfunction

  // Signed (Q.32) times unsigned power (Q.48), result Q.32.
  function automatic logic signed [S_W-1:0] smul_pow(logic signed [S_W-1:0] s, logic [POW_W-1:0] p);
    logic signed [S_W+POW_W:0] prod;
    prod = (S_W+POW_W+1)'(s) * $signed({1'b0, p});
    return S_W'(prod >>> POW_FR);
  endfunction

  typedef struct packed {
    logic [TAG_W-1:0] tag;
    vec_t             d;
    logic             inr;
    ljcoef_t          coef;
  } carry_t;

  logic                     v1, v2, v3, v4, v5, v6, v7;
  carry_t                   c1, c2, c3, c4, c5, c6;
  logic [TAG_W-1:0]         tag7;
  logic                     inr7;
  logic [INVR_W-1:0]        ir1;
  logic [POW_W-1:0]         p2_1, p2_2, p2_3, p2_4, p2_5;   // 1/r^2
  logic [POW_W-1:0]         p4_2, p6_3, p12_4;
  logic signed [2*Q_W-1:0]  qq1;                            // Q.48
  logic signed [S_W-1:0]    coul2, coul3, coul4, tb4, s5, fs6;
  fvec_t                    f7;

  // M1: 1/r^2 = (1/r)^2, qq = qi*qj
  always_ff @(posedge clk) begin
    c1   <= '{tag: s2.side.tag, d: s2.d, inr: s2.inr, coef: s2.side.coef};
    ir1  <= inv_r;
    p2_1 <= POW_W'(((2*INVR_W)'(inv_r) * (2*INVR_W)'(inv_r)) >> (2*INVR_FR - POW_FR));
    qq1  <= (2*Q_W)'(s2.side.qi) * (2*Q_W)'(s2.side.qj);
  end

  // M2: 1/r^4, Coulomb term qq/r in Q.32
  logic signed [2*Q_W+INVR_W:0] cprod;
  assign cprod = (2*Q_W+INVR_W+1)'(qq1) * $signed({1'b0, ir1});
  always_ff @(posedge clk) begin
    c2    <= c1;
    p2_2  <= p2_1;
    p4_2  <= pmul(p2_1, p2_1);
    coul2 <= S_W'(cprod >>> (2*Q_FR + INVR_FR - FORCE_FR));
  end

  // M3: 1/r^6
  always_ff @(posedge clk) begin
    c3    <= c2;
    p2_3  <= p2_2;
    p6_3  <= pmul(p4_2, p2_2);
    coul3 <= coul2;
  end

  // M4: 1/r^12, B/r^6 in Q.32
  logic [COEF_W+POW_W-1:0] bprod, aprod;
  assign bprod = (COEF_W+POW_W)'(c3.coef.b) * (COEF_W+POW_W)'(p6_3);
  always_ff @(posedge clk) begin
    c4    <= c3;
    p2_4  <= p2_3;
    p12_4 <= pmul(p6_3, p6_3);
    tb4   <= S_W'(bprod >> (COEF_FR + POW_FR - FORCE_FR));
    coul4 <= coul3;
  end

  // M5: A/r^12 and the bracket sum
  assign aprod = (COEF_W+POW_W)'(c4.coef.a) * (COEF_W+POW_W)'(p12_4);
  always_ff @(posedge clk) begin
    c5   <= c4;
    p2_5 <= p2_4;
    s5   <= S_W'(aprod >> (COEF_FR + POW_FR - FORCE_FR)) - tb4 + coul4;
  end

  // M6: scalar force factor fs = bracket / r^2
  always_ff @(posedge clk) begin
    c6  <= c5;
    fs6 <= smul_pow(s5, p2_5);
  end

  // M7: force vector fs * d, zero for pairs out of range, saturated to 64 bit
  function automatic force_t scale(logic signed [S_W-1:0] fs, coord_t dc);
    logic signed [S_W+COORD_W-1:0] p;
    logic signed [S_W+COORD_W-1:0] lim;
    p   = ((S_W+COORD_W)'(fs) * (S_W+COORD_W)'(dc)) >>> COORD_FR;
    lim = (S_W+COORD_W)'({1'b0, {(FORCE_W-1){1'b1}}});
    if (p > lim)        return {1'b0, {(FORCE_W-1){1'b1}}};
    else if (p < -lim)  return {1'b1, {(FORCE_W-2){1'b0}}, 1'b1};
    else                return force_t'(p);
  endfunction

  always_ff @(posedge clk) begin
    tag7 <= c6.tag;
    inr7 <= c6.inr;
    if (c6.inr) begin
      f7.x <= scale(fs6, c6.d.x);
      f7.y <= scale(fs6, c6.d.y);
      f7.z <= scale(fs6, c6.d.z);
    end else begin
      f7 <= '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {v1, v2, v3, v4, v5, v6, v7} <= '0;
    else        {v1, v2, v3, v4, v5, v6, v7} <= {qv, v1, v2, v3, v4, v5, v6};
  end

  assign out_valid    = v7;
  assign out_tag      = tag7;
  assign out_in_range = inr7;
  assign force_i      = f7;
endmodule
