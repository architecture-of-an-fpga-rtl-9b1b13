// tb_md_lj_table: writes a symmetric coefficient table for all 32 x 32 type
// pairs, reads every entry back and random entries afterwards on two read
// ports at once, and checks each read one cycle after its type pair against
// the values written.
module tb_md_lj_table;
  import md_pkg::*;
  localparam int unsigned NTYPES = 32;
  localparam int unsigned TW     = $clog2(NTYPES);

  logic          clk = 1'b0;
  logic          wr_en;
  logic [TW-1:0] wr_ti, wr_tj;
  ljcoef_t       wr_data;
  logic [TW-1:0] rd_ti [2];
  logic [TW-1:0] rd_tj [2];
  ljcoef_t       rd_data [2];

  int checks = 0, failures = 0;
  ljcoef_t shadow [NTYPES][NTYPES];

  md_lj_table #(.NTYPES(NTYPES), .NRD(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    wr_en = 1'b0; wr_ti = '0; wr_tj = '0; wr_data = '0; rd_ti = '{default: '0}; rd_tj = '{default: '0};
    for (int a = 0; a < NTYPES; a++)
      for (int b = a; b < NTYPES; b++) begin
        ljcoef_t c;
        c = '{a: COEF_W'($urandom), b: COEF_W'($urandom)};
        shadow[a][b] = c;
        shadow[b][a] = c;
      end
    for (int a = 0; a < NTYPES; a++)
      for (int b = 0; b < NTYPES; b++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_ti = TW'(a); wr_tj = TW'(b); wr_data = shadow[a][b];
      end
    @(negedge clk);
    wr_en = 1'b0;
    for (int n = 0; n < NTYPES * NTYPES + 2000; n++) begin
      int a, b;
      if (n < NTYPES * NTYPES) begin a = n / NTYPES; b = n % NTYPES; end
      else begin a = $urandom_range(0, NTYPES - 1); b = $urandom_range(0, NTYPES - 1); end
      rd_ti[0] = TW'(a); rd_tj[0] = TW'(b);
      rd_ti[1] = TW'(b); rd_tj[1] = TW'((a + 3) % NTYPES);
      @(negedge clk);
      checks += 2;
      if (rd_data[0] != shadow[a][b]) begin
        failures++;
        $display("FAIL port 0 (%0d,%0d): %h expected %h", a, b, rd_data[0], shadow[a][b]);
      end
      if (rd_data[1] != shadow[b][(a + 3) % NTYPES]) begin
        failures++;
        $display("FAIL port 1 (%0d,%0d)", b, (a + 3) % NTYPES);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
