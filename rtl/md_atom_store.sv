// md_atom_store: on-chip table of the atoms of the simulated system.
//
// One record per atom (x, y, z, charge, LJ type; md_pkg::atom_t). The host
// loads it through the write port before a force computation; during the
// computation the NRD read ports return the records of atoms i and j of each
// pipeline lane (2 ports per lane), one cycle after the addresses
// (synchronous read, as in block RAM; on an FPGA each pair of ports would be
// one dual-port copy of the table). A write and a read of the same address in
// one cycle return the old record. DEPTH defaults to the 22,795 atoms of the
// evaluated system.
//
// The accelerator reads the atom data of each pair from board memory; holding
// the atoms on chip with two read ports per lane is this design's choice.
module md_atom_store
  import md_pkg::*;
#(
  parameter int unsigned DEPTH  = 22795,
  parameter int unsigned ADDR_W = $clog2(DEPTH),
  parameter int unsigned NRD    = 2
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  atom_t             wr_data,
  input  logic [ADDR_W-1:0] rd_addr [NRD],
  output atom_t             rd_data [NRD]
);
  atom_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    for (int p = 0; p < NRD; p++) rd_data[p] <= mem[rd_addr[p]];
  end
endmodule
