// tb_md_force_accum: four update lanes. Clears the records of 2,000 atoms
// (they start random), then applies 20,000 cycles of random pair forces, each
// lane keeping the same atom i for many consecutive pairs (as a pair list
// does), atoms reused on the next cycle, i == j pairs, and many cycles in
// which several lanes hit the same atom. Every record is then read back and
// compared with a shadow sum (+f on i, -f on j). A clear issued together with
// updates must win.
module tb_md_force_accum;
  import md_pkg::*;
  localparam int unsigned DEPTH  = 22795;
  localparam int unsigned ADDR_W = $clog2(DEPTH);
  localparam int unsigned LANES  = 4;
  localparam int unsigned NA     = 2000;

  logic              clk = 1'b0;
  logic              clr_en;
  logic [ADDR_W-1:0] clr_addr, rd_addr;
  logic              acc_valid [LANES];
  logic [ADDR_W-1:0] acc_i     [LANES];
  logic [ADDR_W-1:0] acc_j     [LANES];
  fvec_t             acc_f     [LANES];
  fvec_t             rd_data;

  int checks = 0, failures = 0, back_to_back = 0, same_cycle = 0;
  fvec_t shadow [NA];

  md_force_accum #(.DEPTH(DEPTH), .LANES(LANES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    int i [LANES];
    int prev [$];
    clr_en = 1'b0; clr_addr = '0; rd_addr = '0;
    for (int l = 0; l < LANES; l++) begin
      acc_valid[l] = 1'b0; acc_i[l] = '0; acc_j[l] = '0; acc_f[l] = '0; i[l] = l;
    end
    for (int k = 0; k < NA; k++) begin
      @(negedge clk);
      clr_en = 1'b1; clr_addr = ADDR_W'(k);
      shadow[k] = '0;
    end
    @(negedge clk);
    clr_en = 1'b0;
    for (int n = 0; n < 20000; n++) begin
      int cur [$];
      bit hit_prev, hit_same;
      hit_prev = 0; hit_same = 0;
      @(negedge clk);
      for (int l = 0; l < LANES; l++) begin
        int j;
        fvec_t f;
        if ($urandom_range(0, 15) == 0) i[l] = $urandom_range(0, NA - 1);
        case ($urandom_range(0, 5))
          0: j = i[(l + 1) % LANES];                 // same atom in two lanes
          1: j = (prev.size() > 0) ? prev[0] : 0;     // atom of the last cycle
          2: j = i[l];                                // i == j
          default: j = $urandom_range(0, NA - 1);
        endcase
        f = '{x: force_t'($signed({$urandom, $urandom}) >>> 8),
              y: force_t'($signed({$urandom, $urandom}) >>> 8),
              z: force_t'($signed({$urandom, $urandom}) >>> 8)};
        acc_valid[l] = ($urandom_range(0, 7) != 0);
        acc_i[l] = ADDR_W'(i[l]); acc_j[l] = ADDR_W'(j); acc_f[l] = f;
        if (acc_valid[l] && i[l] != j) begin
          shadow[i[l]].x += f.x; shadow[i[l]].y += f.y; shadow[i[l]].z += f.z;
          shadow[j].x -= f.x; shadow[j].y -= f.y; shadow[j].z -= f.z;
          foreach (prev[p]) if (prev[p] == i[l] || prev[p] == j) hit_prev = 1;
          foreach (cur[p]) if (cur[p] == i[l] || cur[p] == j) hit_same = 1;
          cur.push_back(i[l]); cur.push_back(j);
        end
      end
      prev = cur;
      if (hit_prev) back_to_back++;
      if (hit_same) same_cycle++;
    end
    // clear wins over simultaneous updates
    @(negedge clk);
    for (int l = 0; l < LANES; l++) begin
      acc_valid[l] = 1'b1; acc_i[l] = ADDR_W'(5); acc_j[l] = ADDR_W'(6 + l); acc_f[l] = '{x: 1, y: 2, z: 3};
    end
    clr_en = 1'b1; clr_addr = ADDR_W'(5);
    shadow[5] = '0;
    @(negedge clk);
    for (int l = 0; l < LANES; l++) acc_valid[l] = 1'b0;
    clr_en = 1'b0;
    for (int k = 0; k < NA; k++) begin
      rd_addr = ADDR_W'(k);
      @(negedge clk);
      checks++;
      if (rd_data != shadow[k]) begin
        failures++;
        if (failures < 10) $display("FAIL atom %0d: %h expected %h", k, rd_data, shadow[k]);
      end
    end
    checks += 2;
    if (back_to_back < 100) begin failures++; $display("FAIL: few back-to-back updates"); end
    if (same_cycle < 100) begin failures++; $display("FAIL: few same-cycle collisions"); end
    $display("cycles reusing an atom of the previous cycle: %0d, with same-atom collisions: %0d",
             back_to_back, same_cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
