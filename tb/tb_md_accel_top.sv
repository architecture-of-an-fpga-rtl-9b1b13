// tb_md_accel_top: end-to-end run of the accelerator at its default sizes.
//
// The testbench plays the host. It places 1,000 charged atoms of four LJ types
// at random in a periodic 32 A box (one pair of atoms deliberately 0.6 A
// apart), loads the atom and coefficient tables, and builds the atom-pair
// list the way the host side of the accelerator does: the box is cut into
// 4 x 4 x 4 cells of 8 A, every cell is paired with itself and its 13
// half-shell neighbours (periodic), and for each cell pair every atom of the
// first cell is paired with every atom of the second. Two self pairs are
// added. The list is streamed with random gaps; the kernel runs twice on it.
//
// Reference: an all-pairs double-precision loop (independent of the cell
// list) with a minimum-image 8 A cut-off. Each atom's force must match within
// a tolerance summed over its pairs, and must not double on the second run.
// The kernel time must be n_atoms + n_pairs + starved cycles + 79, i.e. one
// pair per cycle. Each mechanism must occur: starved stream cycles, pairs
// rejected by the cut-off, minimum-image corrections, pairs closer than
// 1 A dropped, back-to-back updates of one atom, the force clear and, with
// more than one lane, updates of one atom by several lanes in one cycle.
module tb_md_accel_top;
  import md_pkg::*;
  typedef longint unsigned u64;
  localparam int unsigned N_ATOMS = 22795;
  localparam int unsigned AW      = $clog2(N_ATOMS);
  localparam int unsigned TW      = 5;
  localparam int          NA      = 1000;
  localparam int          NC      = 4;          // cells per axis
  localparam real         SC      = real'(64'd1 << COORD_FR);
  localparam real         FSC     = 4294967296.0;
  localparam real         BOX     = 32.0;
  localparam real         RC      = 8.0;
  localparam int          TOP_LAT = 2 + FORCE_LAT + 1;
  localparam int unsigned LANES   = 1;

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  logic               atom_wr_en;
  logic [AW-1:0]      atom_wr_addr;
  atom_t              atom_wr_data;
  logic               lj_wr_en;
  logic [TW-1:0]      lj_wr_ti, lj_wr_tj;
  ljcoef_t            lj_wr_data;
  logic [COORD_W-1:0] box_len;
  logic [R2_W-1:0]    cutoff2;
  logic               start;
  logic [AW:0]        n_atoms;
  logic [31:0]        n_pairs;
  logic               busy, done;
  logic [31:0]        cycles, accepted, starved, in_range_pairs;
  logic [LANES-1:0]   pair_valid;
  logic               pair_ready;
  logic [LANES-1:0][AW-1:0] pair_i, pair_j;
  logic [AW-1:0]      force_rd_addr;
  fvec_t              force_rd_data;

  md_accel_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  atom_t   atoms [NA];
  ljcoef_t lj [4][4];
  int      pl_i[$], pl_j[$];
  real     ef [NA][3];
  real     tol [NA];
  real     got [NA][3];
  int      ev_starved = 0, ev_cutoff = 0, ev_wrap = 0, ev_close = 0, ev_b2b = 0, ev_clear = 0;
  int      ev_collide = 0, ev_close_hw = 0;

  // pairs that the distance stage of lane 0 finds closer than 1 A
  always @(posedge clk)
    if (rst_n && dut.g_lane[0].u_force.dv && dut.g_lane[0].u_force.r2 < R2_MIN) ev_close_hw++;

  function automatic real mi(coord_t a, coord_t b);
    longint dd;
    dd = longint'(a) - longint'(b);
    if (dd > longint'(box_len) / 2) dd -= longint'(box_len);
    else if (dd < -(longint'(box_len) / 2)) dd += longint'(box_len);
    return real'(dd) / SC;
  endfunction

  function automatic bit wraps(coord_t a, coord_t b);
    longint dd;
    dd = longint'(a) - longint'(b);
    return (dd > longint'(box_len) / 2) || (dd < -(longint'(box_len) / 2));
  endfunction

  function automatic int cell_of(atom_t a);
    int cx, cy, cz;
    cx = int'(longint'(a.x) / longint'(RC * SC));
    cy = int'(longint'(a.y) / longint'(RC * SC));
    cz = int'(longint'(a.z) / longint'(RC * SC));
    return (cx * NC + cy) * NC + cz;
  endfunction

  // Host side: atoms, coefficients, cell list and atom-pair list.
  task automatic build_system();
    int cells [NC*NC*NC][$];
    int offs [13][3] = '{'{1,0,0}, '{0,1,0}, '{0,0,1}, '{1,1,0}, '{1,-1,0}, '{1,0,1},
                         '{1,0,-1}, '{0,1,1}, '{0,1,-1}, '{1,1,1}, '{1,1,-1}, '{1,-1,1},
                         '{1,-1,-1}};
    real a_t [4] = '{6.98e6, 2.4e6, 8.0e5, 0.0};
    real b_t [4] = '{3565.0, 2100.0, 900.0, 0.0};
    for (int k = 0; k < NA; k++) begin
      atoms[k].x = coord_t'($urandom_range(0, 32'(int'(BOX * SC)) - 1));
      atoms[k].y = coord_t'($urandom_range(0, 32'(int'(BOX * SC)) - 1));
      atoms[k].z = coord_t'($urandom_range(0, 32'(int'(BOX * SC)) - 1));
      atoms[k].q = charge_t'($signed($urandom_range(0, 30 << Q_FR)) - (15 <<< Q_FR));
      atoms[k].atype = atype_t'($urandom_range(0, 3));
    end
    // a close pair across the x face of the box
    atoms[1].x = coord_t'(int'(0.2 * SC));
    atoms[2] = atoms[1];
    atoms[2].x = coord_t'(int'((BOX - 0.4) * SC));
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++)
        lj[a][b] = '{a: COEF_W'(longint'($sqrt(a_t[a] * a_t[b]) * 256.0)),
                     b: COEF_W'(longint'($sqrt(b_t[a] * b_t[b]) * 256.0))};
    for (int k = 0; k < NA; k++) cells[cell_of(atoms[k])].push_back(k);
    for (int c = 0; c < NC * NC * NC; c++) begin
      int cx, cy, cz;
      cx = c / (NC * NC); cy = (c / NC) % NC; cz = c % NC;
      // the cell with itself
      foreach (cells[c][p])
        for (int q = p + 1; q < cells[c].size(); q++) begin
          pl_i.push_back(cells[c][p]); pl_j.push_back(cells[c][q]);
        end
      // the cell with its half shell
      for (int o = 0; o < 13; o++) begin
        int d;
        d = (((cx + offs[o][0] + NC) % NC) * NC + ((cy + offs[o][1] + NC) % NC)) * NC
            + ((cz + offs[o][2] + NC) % NC);
        foreach (cells[c][p])
          foreach (cells[d][q]) begin
            pl_i.push_back(cells[c][p]); pl_j.push_back(cells[d][q]);
          end
      end
    end
    pl_i.push_back(7);  pl_j.push_back(7);
    pl_i.push_back(11); pl_j.push_back(11);
  endtask

  // Independent reference: all pairs, double precision.
  task automatic reference();
    for (int k = 0; k < NA; k++) begin
      ef[k] = '{0.0, 0.0, 0.0};
      tol[k] = 1.0e-3;
    end
    for (int i = 0; i < NA; i++)
      for (int j = i + 1; j < NA; j++) begin
        real dx, dy, dz, r2, r, s, a, b, qq, fx, fy, fz, t;
        dx = mi(atoms[i].x, atoms[j].x);
        dy = mi(atoms[i].y, atoms[j].y);
        dz = mi(atoms[i].z, atoms[j].z);
        r2 = dx * dx + dy * dy + dz * dz;
        if (r2 < 1.0) begin
          if (r2 < RC * RC) ev_close++;
          continue;
        end
        if (r2 >= RC * RC) continue;
        r = $sqrt(r2);
        a = real'(lj[atoms[i].atype[1:0]][atoms[j].atype[1:0]].a) / 256.0;
        b = real'(lj[atoms[i].atype[1:0]][atoms[j].atype[1:0]].b) / 256.0;
        qq = (real'(atoms[i].q) / real'(1 << Q_FR)) * (real'(atoms[j].q) / real'(1 << Q_FR));
        s = a / (r ** 14) - b / (r ** 8) + qq / (r ** 3);
        fx = s * dx; fy = s * dy; fz = s * dz;
        ef[i][0] += fx; ef[i][1] += fy; ef[i][2] += fz;
        ef[j][0] -= fx; ef[j][1] -= fy; ef[j][2] -= fz;
        t = 2.0e-4 + 1.0e-4 * ((s < 0) ? -s : s) * r;
        tol[i] += t; tol[j] += t;
      end
  endtask

  task automatic run_kernel(int run);
    int sent, n_ready, n_busy_lanes;
    int last [$];
    @(negedge clk);
    n_atoms = (AW+1)'(NA); n_pairs = 32'(pl_i.size()); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    sent = 0; n_ready = 0; n_busy_lanes = 0;
    while (!done) begin
      int k, idx [LANES];
      k = sent;
      // each lane offers the next pair of the list unless it idles this cycle
      for (int l = 0; l < LANES; l++) begin
        if (k < pl_i.size() && $urandom_range(0, 19) != 0) begin
          pair_valid[l] = 1'b1;
          pair_i[l] = AW'(pl_i[k]);
          pair_j[l] = AW'(pl_j[k]);
          idx[l] = k;
          k++;
        end else begin
          pair_valid[l] = 1'b0;
        end
      end
      @(posedge clk);
      if (pair_ready) begin
        int cur [$];
        n_ready++;
        if (pair_valid != '0) n_busy_lanes++;
        for (int l = 0; l < LANES; l++)
          if (pair_valid[l]) begin
            if (run == 0) begin
              atom_t ai, aj;
              ai = atoms[pl_i[idx[l]]]; aj = atoms[pl_j[idx[l]]];
              if (wraps(ai.x, aj.x) || wraps(ai.y, aj.y) || wraps(ai.z, aj.z)) ev_wrap++;
              foreach (last[p]) if (last[p] == pl_i[idx[l]] || last[p] == pl_j[idx[l]]) ev_b2b++;
              foreach (cur[p]) if (cur[p] == pl_i[idx[l]] || cur[p] == pl_j[idx[l]]) ev_collide++;
              cur.push_back(pl_i[idx[l]]); cur.push_back(pl_j[idx[l]]);
            end
            sent++;
          end
        last = cur;
      end
      @(negedge clk);
    end
    pair_valid = '0;
    ev_starved += int'(starved);
    ev_cutoff  += int'(accepted - in_range_pairs);
    checks += 3;
    if (int'(accepted) != pl_i.size() || sent != pl_i.size()) begin
      failures++; $display("FAIL: accepted %0d of %0d pairs", accepted, pl_i.size());
    end
    // one cycle per offered cycle: every offered pair is taken at once
    if (int'(cycles) != NA + n_ready + TOP_LAT || n_ready != n_busy_lanes + int'(starved)) begin
      failures++;
      $display("FAIL: kernel cycles %0d expected %0d", cycles, NA + n_ready + TOP_LAT);
    end
    if (LANES == 1 && int'(cycles) != NA + pl_i.size() + int'(starved) + TOP_LAT) begin
      failures++;
      $display("FAIL: kernel cycles %0d expected %0d", cycles, NA + pl_i.size() + int'(starved) + TOP_LAT);
    end
    $display("run %0d: %0d pairs, %0d in range, %0d starved cycles, %0d kernel cycles",
             run, accepted, in_range_pairs, starved, cycles);
    // read back and compare
    for (int k = 0; k < NA; k++) begin
      force_rd_addr = AW'(k);
      @(negedge clk);
      got[k][0] = real'(force_rd_data.x) / FSC;
      got[k][1] = real'(force_rd_data.y) / FSC;
      got[k][2] = real'(force_rd_data.z) / FSC;
      for (int c = 0; c < 3; c++) begin
        real e;
        e = got[k][c] - ef[k][c];
        checks++;
        if (e > tol[k] || -e > tol[k]) begin
          failures++;
          if (failures < 10) $display("FAIL: run %0d atom %0d axis %0d: %g expected %g (tol %g)",
                                      run, k, c, got[k][c], ef[k][c], tol[k]);
        end
      end
    end
    if (run > 0) ev_clear++;
  endtask

  initial begin
    atom_wr_en = 1'b0; atom_wr_addr = '0; atom_wr_data = '0;
    lj_wr_en = 1'b0; lj_wr_ti = '0; lj_wr_tj = '0; lj_wr_data = '0;
    box_len = COORD_W'(int'(BOX * SC)); cutoff2 = R2_W'(int'(RC * RC * SC));
    start = 1'b0; n_atoms = '0; n_pairs = '0; pair_valid = '0; pair_i = '0; pair_j = '0;
    force_rd_addr = '0;
    build_system();
    reference();
    $display("system: %0d atoms, %0d pairs in the list", NA, pl_i.size());
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int k = 0; k < NA; k++) begin
      @(negedge clk);
      atom_wr_en = 1'b1; atom_wr_addr = AW'(k); atom_wr_data = atoms[k];
    end
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++) begin
        @(negedge clk);
        atom_wr_en = 1'b0;
        lj_wr_en = 1'b1; lj_wr_ti = TW'(a); lj_wr_tj = TW'(b); lj_wr_data = lj[a][b];
      end
    @(negedge clk);
    atom_wr_en = 1'b0; lj_wr_en = 1'b0;
    run_kernel(0);
    run_kernel(1);
    $display("events: starved %0d, cut-off rejected %0d, minimum image %0d, closer than 1 A %0d (reference) %0d (hardware), back-to-back atom %0d, cleared reruns %0d, same-cycle lane collisions %0d",
             ev_starved, ev_cutoff, ev_wrap, ev_close, ev_close_hw, ev_b2b, ev_clear, ev_collide);
    checks += 7;
    if (LANES > 1 && ev_collide == 0) begin failures++; $display("FAIL: no same-cycle collision"); end
    if (ev_starved == 0) begin failures++; $display("FAIL: no starved cycle"); end
    if (ev_cutoff == 0)  begin failures++; $display("FAIL: no cut-off rejection"); end
    if (ev_wrap == 0)    begin failures++; $display("FAIL: no minimum-image correction"); end
    if (ev_close_hw == 0) begin failures++; $display("FAIL: no close pair"); end
    if (ev_b2b == 0)     begin failures++; $display("FAIL: no back-to-back update"); end
    if (ev_clear == 0)   begin failures++; $display("FAIL: no cleared rerun"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
