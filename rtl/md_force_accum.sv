// md_force_accum: per-atom force accumulation memory.
//
// Each of the LANES update lanes carries one pair force per cycle: when
// acc_valid[l] is high, f is added to atom acc_i[l] and subtracted from atom
// acc_j[l] (Newton's third law), so LANES pair forces are absorbed per cycle
// without stalls. The read-modify-write of all touched atoms completes in the
// same cycle, so back-to-back pairs that share an atom (the usual case, as
// the pair list runs over all partners of one atom in a row) see each other's
// updates with no forwarding logic. Within one cycle, updates that address
// the same atom are first summed and written once (the last slot of that
// address writes the sum). A pair with i == j changes nothing. clr_en writes
// a zero record at clr_addr (the kernel controller sweeps the used atoms
// before a run) and has priority over accumulation. The host reads a record
// through rd_addr with one cycle latency.
//
// The accelerator returns per-atom forces to the host and names a fourfold
// parallel version as its scaling path; accumulating on chip in a memory with
// 2*LANES read-modify-write slots is this design's choice (it maps to
// registers rather than a block RAM). LANES = 1 is the built configuration.
module md_force_accum
  import md_pkg::*;
#(
  parameter int unsigned DEPTH  = 22795,
  parameter int unsigned ADDR_W = $clog2(DEPTH),
  parameter int unsigned LANES  = 1
) (
  input  logic              clk,
  input  logic              clr_en,
  input  logic [ADDR_W-1:0] clr_addr,
  input  logic              acc_valid [LANES],
  input  logic [ADDR_W-1:0] acc_i     [LANES],
  input  logic [ADDR_W-1:0] acc_j     [LANES],
  input  fvec_t             acc_f     [LANES],
  input  logic [ADDR_W-1:0] rd_addr,
  output fvec_t             rd_data
);
  localparam int unsigned NS = 2 * LANES;   // update slots: i and j of every lane

  fvec_t mem [DEPTH];

  logic              s_v    [NS];
  logic [ADDR_W-1:0] s_a    [NS];
  fvec_t             s_f    [NS];
  fvec_t             s_sum  [NS];
  logic              s_last [NS];

  // Slot 2l is +f on atom i of lane l, slot 2l+1 is -f on atom j.
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      s_v[2*l]   = acc_valid[l] && (acc_i[l] != acc_j[l]);
      s_v[2*l+1] = s_v[2*l];
      s_a[2*l]   = acc_i[l];
      s_a[2*l+1] = acc_j[l];
      s_f[2*l]   = acc_f[l];
      s_f[2*l+1] = '{x: -acc_f[l].x, y: -acc_f[l].y, z: -acc_f[l].z};
    end
    for (int k = 0; k < NS; k++) begin
      s_sum[k]  = '0;
      s_last[k] = 1'b1;
      for (int m = 0; m < NS; m++) begin
        if (s_v[m] && s_a[m] == s_a[k]) begin
          s_sum[k].x = s_sum[k].x + s_f[m].x;
          s_sum[k].y = s_sum[k].y + s_f[m].y;
          s_sum[k].z = s_sum[k].z + s_f[m].z;
          if (m > k) s_last[k] = 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (clr_en) begin
      mem[clr_addr] <= '0;
    end else begin
      for (int k = 0; k < NS; k++)
        if (s_v[k] && s_last[k])
          mem[s_a[k]] <= '{x: mem[s_a[k]].x + s_sum[k].x,
                           y: mem[s_a[k]].y + s_sum[k].y,
                           z: mem[s_a[k]].z + s_sum[k].z};
    end
    rd_data <= mem[rd_addr];
  end
endmodule
