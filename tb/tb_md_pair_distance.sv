// tb_md_pair_distance: pairs of atoms in a 60 A periodic box, many of them
// placed across a box face so that the minimum-image correction is needed,
// plus self pairs and pairs closer than 1 A. Displacement, r^2 and the
// in-range flag are compared with a 64-bit integer model, and every result
// must appear DIST_LAT = 2 cycles after its pair.
module tb_md_pair_distance;
  import md_pkg::*;
  typedef longint unsigned u64;
  localparam int unsigned N = 4000;
  localparam longint L   = 60 * (64'sd1 << COORD_FR);
  localparam longint RC2 = 144 * (64'sd1 << COORD_FR);  // 12 A cut-off

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic            in_valid;
  vec_t            ri, rj;
  logic [COORD_W-1:0] box_len;
  logic [R2_W-1:0] cutoff2;
  logic            out_valid;
  vec_t            d;
  logic [R2_W-1:0] r2;
  logic            in_range;

  int checks = 0, failures = 0, wraps = 0, inr_cnt = 0;
  longint unsigned cyc = 0;

  md_pair_distance dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { longint dx, dy, dz; longint unsigned r2; bit inr; longint unsigned t; } exp_t;
  exp_t q[$];

  function automatic longint wrap1(longint a, longint b, ref int nw);
    longint dd;
    dd = a - b;
    if (dd > L / 2)       begin dd -= L; nw++; end
    else if (dd < -(L / 2)) begin dd += L; nw++; end
    return dd;
  endfunction

  function automatic longint rnd_coord();
    return longint'({$urandom, $urandom} % 64'(L));
  endfunction

  function automatic longint near(longint c, longint span);
    longint v;
    v = c + longint'($urandom_range(0, 2 * 32'(span))) - span;
    if (v < 0) v += L;
    if (v >= L) v -= L;
    return v;
  endfunction

  initial begin
    in_valid = 1'b0;
    box_len  = COORD_W'(L);
    cutoff2  = R2_W'(RC2);
    ri = '0; rj = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < N; ) begin
      @(negedge clk);
      if ($urandom_range(0, 4) == 0) begin
        in_valid = 1'b0;
      end else begin
        longint xi, yi, zi, xj, yj, zj, span;
        exp_t e;
        xi = rnd_coord(); yi = rnd_coord(); zi = rnd_coord();
        case ($urandom_range(0, 3))
          0: begin xj = rnd_coord(); yj = rnd_coord(); zj = rnd_coord(); end
          1: begin xi = xi % (64'sd4 << COORD_FR); xj = L - 1 - (rnd_coord() % (64'sd8 << COORD_FR));
                   yj = near(yi, 64'sd6 << COORD_FR); zj = near(zi, 64'sd6 << COORD_FR); end
          2: begin span = 64'sd1 << (COORD_FR - 1);
                   xj = near(xi, span); yj = near(yi, span); zj = near(zi, span); end
          default: begin span = 64'sd10 << COORD_FR;
                   xj = near(xi, span); yj = near(yi, span); zj = near(zi, span); end
        endcase
        if (n == 0) begin xj = xi; yj = yi; zj = zi; end
        ri = '{x: coord_t'(xi), y: coord_t'(yi), z: coord_t'(zi)};
        rj = '{x: coord_t'(xj), y: coord_t'(yj), z: coord_t'(zj)};
        e.dx = wrap1(xi, xj, wraps);
        e.dy = wrap1(yi, yj, wraps);
        e.dz = wrap1(zi, zj, wraps);
        e.r2 = (u64'(e.dx * e.dx) + u64'(e.dy * e.dy)
                + u64'(e.dz * e.dz)) >> COORD_FR;
        if (e.r2 > 64'hFFFF_FFFF) e.r2 = 64'hFFFF_FFFF;
        e.inr = (e.r2 < u64'(RC2)) && (e.r2 >= (64'd1 << COORD_FR));
        e.t = cyc;
        q.push_back(e);
        in_valid = 1'b1;
        n++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (8) @(posedge clk);
    checks += 3;
    if (q.size() != 0) begin failures++; $display("FAIL: results missing"); end
    if (wraps < 100) begin failures++; $display("FAIL: only %0d wraps", wraps); end
    if (inr_cnt < 100) begin failures++; $display("FAIL: only %0d in range", inr_cnt); end
    $display("pairs %0d, minimum-image corrections %0d, in range %0d", N, wraps, inr_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected result");
      end else begin
        exp_t e;
        e = q.pop_front();
        checks += 6;
        if (longint'(d.x) != e.dx) begin failures++; $display("FAIL dx %0d exp %0d", d.x, e.dx); end
        if (longint'(d.y) != e.dy) begin failures++; $display("FAIL dy %0d exp %0d", d.y, e.dy); end
        if (longint'(d.z) != e.dz) begin failures++; $display("FAIL dz %0d exp %0d", d.z, e.dz); end
        if (64'(r2) != e.r2) begin failures++; $display("FAIL r2 %0d exp %0d", r2, e.r2); end
        if (in_range != e.inr) begin failures++; $display("FAIL in_range %0b r2=%0d", in_range, e.r2); end
        if (cyc - e.t != 64'(DIST_LAT)) begin failures++; $display("FAIL latency %0d", cyc - e.t); end
        if (e.inr) inr_cnt++;
      end
    end
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
