// tb_md_atom_store: fills the full 22,795-entry atom table with random
// records, then issues random reads on both ports (with writes mixed in) and
// compares each read, one cycle after its address, with a shadow copy,
// including the old-data result of a read and write to the same address.
module tb_md_atom_store;
  import md_pkg::*;
  localparam int unsigned DEPTH  = 22795;
  localparam int unsigned ADDR_W = $clog2(DEPTH);

  logic              clk = 1'b0;
  logic              wr_en;
  logic [ADDR_W-1:0] wr_addr, rd_addr_a, rd_addr_b;
  atom_t             wr_data, rd_data_a, rd_data_b;
  logic [ADDR_W-1:0] rd_addr [2];
  atom_t             rd_data [2];

  int checks = 0, failures = 0;
  atom_t shadow [DEPTH];

  md_atom_store #(.DEPTH(DEPTH), .NRD(2)) dut (.*);
  assign rd_addr[0] = rd_addr_a;
  assign rd_addr[1] = rd_addr_b;
  assign rd_data_a  = rd_data[0];
  assign rd_data_b  = rd_data[1];

  always #5 clk = ~clk;

  function automatic atom_t rnd_atom();
    atom_t a;
    a = '{x: coord_t'($urandom), y: coord_t'($urandom), z: coord_t'($urandom),
          q: charge_t'($urandom), atype: atype_t'($urandom)};
    return a;
  endfunction

  initial begin
    wr_en = 1'b0; wr_addr = '0; wr_data = '0; rd_addr_a = '0; rd_addr_b = '0;
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = ADDR_W'(k); wr_data = rnd_atom();
      shadow[k] = wr_data;
    end
    for (int n = 0; n < 5000; n++) begin
      atom_t ea, eb;
      @(negedge clk);
      rd_addr_a = ADDR_W'($urandom_range(0, DEPTH - 1));
      rd_addr_b = (n % 7 == 0) ? rd_addr_a : ADDR_W'($urandom_range(0, DEPTH - 1));
      ea = shadow[rd_addr_a];
      eb = shadow[rd_addr_b];
      wr_en = ($urandom_range(0, 2) == 0);
      wr_addr = (n % 5 == 0) ? rd_addr_a : ADDR_W'($urandom_range(0, DEPTH - 1));
      wr_data = rnd_atom();
      if (wr_en) shadow[wr_addr] = wr_data;
      @(negedge clk);
      wr_en = 1'b0;
      checks += 2;
      if (rd_data_a != ea) begin failures++; $display("FAIL port a addr %0d", rd_addr_a); end
      if (rd_data_b != eb) begin failures++; $display("FAIL port b addr %0d", rd_addr_b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
