// tb_md_force_pipe: random atom pairs (mostly inside a 12 A cut-off, some
// beyond it, some closer than 1 A, some across the periodic boundary) with
// random Lennard-Jones coefficients and charges of water-like magnitude go
// through the force pipeline with random idle cycles. Each force vector is
// compared with a double-precision evaluation of
//   F = d * (A/r^14 - B/r^8 + qq/r^3)
// within 1e-4 absolute plus 1e-4 relative; out-of-range pairs must give
// exactly zero. Tags must come back in order, FORCE_LAT = 76 cycles later.
module tb_md_force_pipe;
  import md_pkg::*;
  typedef longint unsigned u64;
  localparam int unsigned N     = 3000;
  localparam int unsigned TAG_W = 30;
  localparam real SC   = real'(64'd1 << COORD_FR);
  localparam real FSC  = 4294967296.0;
  localparam longint L = 60 * (64'sd1 << COORD_FR);
  localparam real RC2R = 144.0;

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  logic               in_valid;
  logic [TAG_W-1:0]   in_tag;
  vec_t               ri, rj;
  charge_t            qi, qj;
  ljcoef_t            coef;
  logic [COORD_W-1:0] box_len;
  logic [R2_W-1:0]    cutoff2;
  logic               out_valid;
  logic [TAG_W-1:0]   out_tag;
  logic               out_in_range;
  fvec_t              force_i;

  int checks = 0, failures = 0, n_inr = 0, n_out = 0;
  longint unsigned cyc = 0;
  real max_err = 0.0;

  md_force_pipe #(.TAG_W(TAG_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { real fx, fy, fz; bit inr; logic [TAG_W-1:0] tag; u64 t; } exp_t;
  exp_t q[$];

  function automatic real mi(longint a, longint b);
    longint dd;
    dd = a - b;
    if (dd > L / 2) dd -= L;
    else if (dd < -(L / 2)) dd += L;
    return real'(dd) / SC;
  endfunction

  function automatic longint wrapc(longint v);
    if (v < 0) return v + L;
    if (v >= L) return v - L;
    return v;
  endfunction

  function automatic bit close(real got, real e);
    real err;
    err = (got > e) ? got - e : e - got;
    if (err > max_err) max_err = err;
    return err <= 1.0e-4 + 1.0e-4 * ((e < 0) ? -e : e);
  endfunction

  initial begin
    in_valid = 1'b0;
    in_tag = '0; ri = '0; rj = '0; qi = '0; qj = '0; coef = '0;
    box_len = COORD_W'(L);
    cutoff2 = R2_W'(longint'(RC2R * SC));
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < N; ) begin
      @(negedge clk);
      if ($urandom_range(0, 4) == 0) begin
        in_valid = 1'b0;
      end else begin
        longint xi, yi, zi, xj, yj, zj, span;
        real dx, dy, dz, r2r, rr, a, b, qq, s;
        exp_t e;
        xi = longint'({$urandom, $urandom} % u64'(L));
        yi = longint'({$urandom, $urandom} % u64'(L));
        zi = longint'({$urandom, $urandom} % u64'(L));
        span = (n % 10 == 0) ? (64'sd16 << COORD_FR) : (64'sd7 << COORD_FR);
        xj = wrapc(xi + longint'($urandom_range(0, 2 * 32'(span))) - span);
        yj = wrapc(yi + longint'($urandom_range(0, 2 * 32'(span))) - span);
        zj = wrapc(zi + longint'($urandom_range(0, 2 * 32'(span))) - span);
        if (n == 0) begin xj = xi; yj = yi; zj = zi; end
        ri = '{x: coord_t'(xi), y: coord_t'(yi), z: coord_t'(zi)};
        rj = '{x: coord_t'(xj), y: coord_t'(yj), z: coord_t'(zj)};
        coef.a = COEF_W'($urandom_range(0, 7000000) * 256 + $urandom_range(0, 255));
        coef.b = COEF_W'($urandom_range(0, 4000 * 256));
        qi = charge_t'($signed($urandom_range(0, 32 << Q_FR)) - (16 <<< Q_FR));
        qj = charge_t'($signed($urandom_range(0, 32 << Q_FR)) - (16 <<< Q_FR));
        in_tag = TAG_W'($urandom);
        dx = mi(xi, xj); dy = mi(yi, yj); dz = mi(zi, zj);
        r2r = real'(((u64'((longint'(dx * SC)) * (longint'(dx * SC)))
                    + u64'((longint'(dy * SC)) * (longint'(dy * SC)))
                    + u64'((longint'(dz * SC)) * (longint'(dz * SC)))) >> COORD_FR)) / SC;
        e.inr = (r2r < RC2R) && (r2r >= 1.0);
        rr = $sqrt(dx * dx + dy * dy + dz * dz);
        a  = real'(coef.a) / 256.0;
        b  = real'(coef.b) / 256.0;
        qq = (real'(qi) / real'(1 << Q_FR)) * (real'(qj) / real'(1 << Q_FR));
        if (e.inr) begin
          s = a / (rr ** 14) - b / (rr ** 8) + qq / (rr ** 3);
          e.fx = s * dx; e.fy = s * dy; e.fz = s * dz;
        end else begin
          e.fx = 0.0; e.fy = 0.0; e.fz = 0.0;
        end
        e.tag = in_tag;
        e.t = cyc;
        q.push_back(e);
        in_valid = 1'b1;
        n++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (FORCE_LAT + 5) @(posedge clk);
    checks += 3;
    if (q.size() != 0) begin failures++; $display("FAIL: results missing"); end
    if (n_inr < 1000) begin failures++; $display("FAIL: few in-range pairs %0d", n_inr); end
    if (n_out < 100) begin failures++; $display("FAIL: few out-of-range pairs %0d", n_out); end
    $display("in range %0d, out of range %0d, largest error %g", n_inr, n_out, max_err);
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
        real gx, gy, gz;
        e = q.pop_front();
        gx = real'(force_i.x) / FSC;
        gy = real'(force_i.y) / FSC;
        gz = real'(force_i.z) / FSC;
        checks += 4;
        if (e.inr) n_inr++; else n_out++;
        if (out_in_range != e.inr || out_tag != e.tag) begin
          failures++;
          $display("FAIL: tag/in_range %h %0b expected %h %0b", out_tag, out_in_range, e.tag, e.inr);
        end
        if (cyc - e.t != 64'(FORCE_LAT)) begin failures++; $display("FAIL: latency %0d", cyc - e.t); end
        if (e.inr) begin
          if (!(close(gx, e.fx) && close(gy, e.fy) && close(gz, e.fz))) begin
            failures++;
            $display("FAIL: force (%g %g %g) expected (%g %g %g)", gx, gy, gz, e.fx, e.fy, e.fz);
          end
        end else if (force_i != '0) begin
          failures++;
          $display("FAIL: out-of-range pair gave a force");
        end
        checks++;
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
