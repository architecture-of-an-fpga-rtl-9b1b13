// tb_md_accel_top_22795: the accelerator on a system of the evaluated size,
// 22,795 atoms, at default parameters.
//
// The atoms are spread at random at a water-like density (0.1 atoms per
// A^3) over a periodic box of 61.1 A, which is cut into 7 x 7 x 7 cells of
// 8.73 A for an 8 A cut-off. All atoms are loaded, so the whole atom table
// and the clear of all force records are exercised. Streaming the complete
// list (about 20 million pairs) would take too long to simulate, so the
// testbench streams the complete pair list of the first six cells (each with
// itself and its 13 half-shell neighbours, ~350,000 pairs). The reference is
// the double-precision force of every streamed pair inside the cut-off,
// summed per atom; all 22,795 force records are read back and compared,
// including the untouched ones, which must read zero. The kernel time must
// be n_atoms + n_pairs + starved cycles + 79.
module tb_md_accel_top_22795;
  import md_pkg::*;
  localparam int unsigned N_ATOMS = 22795;
  localparam int unsigned AW      = $clog2(N_ATOMS);
  localparam int unsigned TW      = 5;
  localparam int          NA      = 22795;
  localparam int          NC      = 7;
  localparam int          NCELLS  = 6;          // cells whose pair list is streamed
  localparam real         SC      = real'(64'd1 << COORD_FR);
  localparam real         FSC     = 4294967296.0;
  localparam real         BOX     = 61.1;
  localparam real         CELL    = BOX / NC;
  localparam real         RC      = 8.0;
  localparam int          TOP_LAT = 2 + FORCE_LAT + 1;

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
  logic [0:0]         pair_valid;
  logic               pair_ready;
  logic [0:0][AW-1:0] pair_i, pair_j;
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
  int      n_inr_ref = 0;

  function automatic real mi(coord_t a, coord_t b);
    longint dd;
    dd = longint'(a) - longint'(b);
    if (dd > longint'(box_len) / 2) dd -= longint'(box_len);
    else if (dd < -(longint'(box_len) / 2)) dd += longint'(box_len);
    return real'(dd) / SC;
  endfunction

  function automatic int cell_of(atom_t a);
    int cx, cy, cz;
    cx = int'(real'(a.x) / SC / CELL - 0.5);
    cy = int'(real'(a.y) / SC / CELL - 0.5);
    cz = int'(real'(a.z) / SC / CELL - 0.5);
    if (cx >= NC) cx = NC - 1;
    if (cy >= NC) cy = NC - 1;
    if (cz >= NC) cz = NC - 1;
    return (cx * NC + cy) * NC + cz;
  endfunction

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
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++)
        lj[a][b] = '{a: COEF_W'(longint'($sqrt(a_t[a] * a_t[b]) * 256.0)),
                     b: COEF_W'(longint'($sqrt(b_t[a] * b_t[b]) * 256.0))};
    for (int k = 0; k < NA; k++) cells[cell_of(atoms[k])].push_back(k);
    for (int c = 0; c < NCELLS; c++) begin
      int cx, cy, cz;
      cx = c / (NC * NC); cy = (c / NC) % NC; cz = c % NC;
      foreach (cells[c][p])
        for (int q = p + 1; q < cells[c].size(); q++) begin
          pl_i.push_back(cells[c][p]); pl_j.push_back(cells[c][q]);
        end
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
  endtask

  // Reference over the streamed pairs, double precision.
  task automatic reference();
    for (int k = 0; k < NA; k++) begin
      ef[k] = '{0.0, 0.0, 0.0};
      tol[k] = 1.0e-3;
    end
    foreach (pl_i[n]) begin
      int i, j;
      real dx, dy, dz, r2, r, s, a, b, qq, t;
      i = pl_i[n]; j = pl_j[n];
      dx = mi(atoms[i].x, atoms[j].x);
      dy = mi(atoms[i].y, atoms[j].y);
      dz = mi(atoms[i].z, atoms[j].z);
      r2 = dx * dx + dy * dy + dz * dz;
      if (r2 < 1.0 || r2 >= RC * RC) continue;
      n_inr_ref++;
      r = $sqrt(r2);
      a = real'(lj[atoms[i].atype[1:0]][atoms[j].atype[1:0]].a) / 256.0;
      b = real'(lj[atoms[i].atype[1:0]][atoms[j].atype[1:0]].b) / 256.0;
      qq = (real'(atoms[i].q) / real'(1 << Q_FR)) * (real'(atoms[j].q) / real'(1 << Q_FR));
      s = a / (r ** 14) - b / (r ** 8) + qq / (r ** 3);
      ef[i][0] += s * dx; ef[i][1] += s * dy; ef[i][2] += s * dz;
      ef[j][0] -= s * dx; ef[j][1] -= s * dy; ef[j][2] -= s * dz;
      t = 2.0e-4 + 1.0e-4 * ((s < 0) ? -s : s) * r;
      tol[i] += t; tol[j] += t;
    end
  endtask

  initial begin
    int sent;
    atom_wr_en = 1'b0; atom_wr_addr = '0; atom_wr_data = '0;
    lj_wr_en = 1'b0; lj_wr_ti = '0; lj_wr_tj = '0; lj_wr_data = '0;
    box_len = COORD_W'(int'(BOX * SC)); cutoff2 = R2_W'(int'(RC * RC * SC));
    start = 1'b0; n_atoms = '0; n_pairs = '0; pair_valid = '0; pair_i = '0; pair_j = '0;
    force_rd_addr = '0;
    build_system();
    reference();
    $display("system: %0d atoms, %0d pairs streamed", NA, pl_i.size());
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
    n_atoms = (AW+1)'(NA); n_pairs = 32'(pl_i.size()); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    sent = 0;
    while (!done) begin
      if (sent < pl_i.size() && $urandom_range(0, 49) != 0) begin
        pair_valid[0] = 1'b1;
        pair_i[0] = AW'(pl_i[sent]);
        pair_j[0] = AW'(pl_j[sent]);
      end else begin
        pair_valid[0] = 1'b0;
      end
      @(posedge clk);
      if (pair_valid[0] && pair_ready) sent++;
      @(negedge clk);
    end
    pair_valid = '0;
    checks += 3;
    if (int'(accepted) != pl_i.size()) begin failures++; $display("FAIL: accepted %0d", accepted); end
    if (int'(cycles) != NA + pl_i.size() + int'(starved) + TOP_LAT) begin
      failures++; $display("FAIL: kernel cycles %0d", cycles);
    end
    if (int'(in_range_pairs) < n_inr_ref - 5 || int'(in_range_pairs) > n_inr_ref + 5) begin
      failures++; $display("FAIL: %0d pairs in range, reference %0d", in_range_pairs, n_inr_ref);
    end
    $display("%0d pairs, %0d in range, %0d starved cycles, %0d kernel cycles (%0.2f ms at 202 MHz)",
             accepted, in_range_pairs, starved, cycles, real'(cycles) / 202.0e3);
    for (int k = 0; k < NA; k++) begin
      force_rd_addr = AW'(k);
      @(negedge clk);
      for (int c = 0; c < 3; c++) begin
        real g, e;
        g = real'((c == 0) ? force_rd_data.x : (c == 1) ? force_rd_data.y : force_rd_data.z) / FSC;
        e = g - ef[k][c];
        checks++;
        if (e > tol[k] || -e > tol[k]) begin
          failures++;
          if (failures < 10) $display("FAIL: atom %0d axis %0d: %g expected %g", k, c, g, ef[k][c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
