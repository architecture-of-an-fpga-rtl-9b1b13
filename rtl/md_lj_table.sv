// md_lj_table: van der Waals (Lennard-Jones) coefficient table.
//
// Holds A = 12*C12 and B = 6*C6 (md_pkg::ljcoef_t) for every ordered pair of
// the NTYPES atom types, addressed by {type_i, type_j}. The host writes the
// table once; each of the NRD read ports (one per pipeline lane) returns one
// entry per cycle with a one-cycle synchronous read. The host is expected to
// write both (a,b) and (b,a).
//
// The accelerator names the van der Waals force but not how its parameters
// are stored; a per-type-pair table of 32 types is this design's choice.
module md_lj_table
  import md_pkg::*;
#(
  parameter int unsigned NTYPES = 32,
  parameter int unsigned NRD    = 1,
  localparam int unsigned TW = $clog2(NTYPES)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [TW-1:0] wr_ti,
  input  logic [TW-1:0] wr_tj,
  input  ljcoef_t       wr_data,
  input  logic [TW-1:0] rd_ti   [NRD],
  input  logic [TW-1:0] rd_tj   [NRD],
  output ljcoef_t       rd_data [NRD]
);
  ljcoef_t mem [NTYPES*NTYPES];

  always_ff @(posedge clk) begin
    if (wr_en) mem[{wr_ti, wr_tj}] <= wr_data;
    for (int p = 0; p < NRD; p++) rd_data[p] <= mem[{rd_ti[p], rd_tj[p]}];
  end
endmodule
