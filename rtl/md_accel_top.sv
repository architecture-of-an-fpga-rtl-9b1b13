// md_accel_top: non-bonded force accelerator for molecular dynamics.
//
// The host turns its cell-pair list into a flat list of atom pairs (i, j) and
// streams it in; the accelerator computes the van der Waals + electrostatic
// force of every pair in one deep pipeline that accepts a pair per cycle and
// accumulates the per-atom forces for the host to read back.
//
// LANES copies of the data path run side by side, each taking one pair per
// cycle from its own lane of the pair stream; they share the atom table (two
// read ports per lane), the coefficient table (one read port per lane) and
// the force accumulator (which merges same-atom updates of one cycle). The
// built configuration has one lane; the accelerator names a fourfold
// parallel version as the way to use more of the device.
//
// Data path of a lane (latency from an accepted pair to its force update:
// 79 cycles)
//   S0  pair accepted, atom table read for i and j   (md_atom_store, 1 cycle)
//   S1  LJ coefficients read for (type_i, type_j)    (md_lj_table, 1 cycle)
//   S2  force pipeline                               (md_force_pipe, 76 cycles)
//   S3  +F on atom i, -F on atom j                   (md_force_accum, 1 cycle)
// Control: md_kernel_ctrl clears the force records, runs the pair stream for
// n_pairs pairs and drains the pipeline; done then stays high and cycles
// holds the kernel time.
//
// Host side: load the atom table (atom_wr_*), the coefficient table (lj_wr_*),
// set box_len and cutoff2, pulse start with n_atoms and n_pairs, offer pairs
// on pair_valid[l]/pair_i[l]/pair_j[l] of any lane (all offered pairs are
// taken when pair_ready is high; never offer more than remain), wait for done,
// then read forces via force_rd_addr (data one cycle later). The pair stream
// and the load ports stand for the board memory and PCIe link of the
// accelerator, which are not part of this RTL.
//
// Following the accelerator: the split of pair selection (host) from force
// computation (device), the single pipelined loop over the pair list, the
// periodic box and the cut-off. This design's own: fixed-point arithmetic,
// on-chip atom and force memories, the coefficient table and all interfaces.
module md_accel_top
  import md_pkg::*;
#(
  parameter int unsigned N_ATOMS = 22795,
  parameter int unsigned NTYPES  = 32,
  parameter int unsigned LANES   = 1,
  localparam int unsigned AW = $clog2(N_ATOMS),
  localparam int unsigned TW = $clog2(NTYPES)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // atom table load
  input  logic                       atom_wr_en,
  input  logic [AW-1:0]              atom_wr_addr,
  input  atom_t                      atom_wr_data,
  // coefficient table load
  input  logic                       lj_wr_en,
  input  logic [TW-1:0]              lj_wr_ti,
  input  logic [TW-1:0]              lj_wr_tj,
  input  ljcoef_t                    lj_wr_data,
  // run settings
  input  logic [COORD_W-1:0]         box_len,
  input  logic [R2_W-1:0]            cutoff2,
  input  logic                       start,
  input  logic [AW:0]                n_atoms,
  input  logic [31:0]                n_pairs,
  output logic                       busy,
  output logic                       done,
  output logic [31:0]                cycles,
  output logic [31:0]                accepted,
  output logic [31:0]                starved,
  output logic [31:0]                in_range_pairs,
  // atom-pair list stream, one pair per lane
  input  logic [LANES-1:0]           pair_valid,
  output logic                       pair_ready,
  input  logic [LANES-1:0][AW-1:0]   pair_i,
  input  logic [LANES-1:0][AW-1:0]   pair_j,
  // force read-back
  input  logic [AW-1:0]              force_rd_addr,
  output fvec_t                      force_rd_data
);
  // ---------------------------------------------------------------- control
  logic [LANES-1:0] retire;
  logic             clr_en;
  logic [AW-1:0]    clr_addr;
  kstate_e          state;

  md_kernel_ctrl #(.ADDR_W(AW), .CNT_W(32), .LANES(LANES)) u_ctrl (
    .clk, .rst_n, .start, .n_atoms, .n_pairs, .pair_valid, .pair_ready,
    .retire, .clr_en, .clr_addr, .busy, .done, .state, .cycles, .accepted,
    .starved
  );

  // ------------------------------------------------------- S0: atom fetch
  logic [AW-1:0] rd_addr [2*LANES];
  atom_t         rd_atom [2*LANES];

  md_atom_store #(.DEPTH(N_ATOMS), .ADDR_W(AW), .NRD(2*LANES)) u_atoms (
    .clk, .wr_en(atom_wr_en), .wr_addr(atom_wr_addr), .wr_data(atom_wr_data),
    .rd_addr, .rd_data(rd_atom)
  );

  // ------------------------------------------------ S1: coefficient fetch
  logic [TW-1:0] rd_ti [LANES];
  logic [TW-1:0] rd_tj [LANES];
  ljcoef_t       coef  [LANES];

  md_lj_table #(.NTYPES(NTYPES), .NRD(LANES)) u_lj (
    .clk, .wr_en(lj_wr_en), .wr_ti(lj_wr_ti), .wr_tj(lj_wr_tj), .wr_data(lj_wr_data),
    .rd_ti, .rd_tj, .rd_data(coef)
  );

  // --------------------------------------------------- S2: force pipelines
  logic              f_valid [LANES];
  logic              f_inr   [LANES];
  logic [AW-1:0]     f_i     [LANES];
  logic [AW-1:0]     f_j     [LANES];
  fvec_t             f_vec   [LANES];

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic          v_s0, v_s1;
    logic [AW-1:0] i_s0, j_s0, i_s1, j_s1;
    atom_t         atom_i_s1, atom_j_s1;
    logic [2*AW-1:0] tag;

    assign rd_addr[2*l]   = pair_i[l];
    assign rd_addr[2*l+1] = pair_j[l];
    assign rd_ti[l]       = rd_atom[2*l].atype[TW-1:0];
    assign rd_tj[l]       = rd_atom[2*l+1].atype[TW-1:0];

    always_ff @(posedge clk) begin
      i_s0      <= pair_i[l];
      j_s0      <= pair_j[l];
      i_s1      <= i_s0;
      j_s1      <= j_s0;
      atom_i_s1 <= rd_atom[2*l];
      atom_j_s1 <= rd_atom[2*l+1];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v_s0 <= 1'b0;
        v_s1 <= 1'b0;
      end else begin
        v_s0 <= pair_valid[l] && pair_ready;
        v_s1 <= v_s0;
      end
    end

    md_force_pipe #(.TAG_W(2*AW)) u_force (
      .clk, .rst_n, .in_valid(v_s1), .in_tag({i_s1, j_s1}),
      .ri('{x: atom_i_s1.x, y: atom_i_s1.y, z: atom_i_s1.z}),
      .rj('{x: atom_j_s1.x, y: atom_j_s1.y, z: atom_j_s1.z}),
      .qi(atom_i_s1.q), .qj(atom_j_s1.q), .coef(coef[l]), .box_len, .cutoff2,
      .out_valid(f_valid[l]), .out_tag(tag), .out_in_range(f_inr[l]), .force_i(f_vec[l])
    );

    assign f_i[l]    = tag[2*AW-1:AW];
    assign f_j[l]    = tag[AW-1:0];
    assign retire[l] = f_valid[l];
  end

  // ------------------------------------------------ S3: force accumulation
  md_force_accum #(.DEPTH(N_ATOMS), .ADDR_W(AW), .LANES(LANES)) u_accum (
    .clk, .clr_en, .clr_addr,
    .acc_valid(f_valid), .acc_i(f_i), .acc_j(f_j), .acc_f(f_vec),
    .rd_addr(force_rd_addr), .rd_data(force_rd_data)
  );

  logic [31:0] n_inr;
  always_comb begin
    n_inr = '0;
    for (int l = 0; l < LANES; l++) n_inr = n_inr + 32'(f_valid[l] && f_inr[l]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              in_range_pairs <= '0;
    else if (start && !busy) in_range_pairs <= '0;
    else                     in_range_pairs <= in_range_pairs + n_inr;
  end
endmodule
