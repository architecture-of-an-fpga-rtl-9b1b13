// tb_md_kernel_ctrl: runs a two-lane controller through several launches
// (with and without atoms to clear, with zero pairs, with a starving pair
// stream, with odd pair counts that leave one lane idle at the end) while a
// 20-cycle delay line per lane stands in for the force pipelines and returns
// a retire bit per accepted pair. Checks: every atom record cleared once and in
// order, exactly n_pairs pairs accepted, the starved-cycle and kernel-cycle
// counters against cycle counts taken by the testbench, done only after the
// last retire (and at most two cycles later), and start ignored while busy.
module tb_md_kernel_ctrl;
  import md_pkg::*;
  localparam int unsigned ADDR_W = 15;
  localparam int unsigned CNT_W  = 32;
  localparam int unsigned PLAT   = 20;
  localparam int unsigned LANES  = 2;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              start;
  logic [ADDR_W:0]   n_atoms;
  logic [CNT_W-1:0]  n_pairs;
  logic [LANES-1:0]  pair_valid, retire;
  logic              pair_ready, clr_en, busy, done;
  logic [ADDR_W-1:0] clr_addr;
  kstate_e           state;
  logic [CNT_W-1:0]  cycles, accepted, starved;

  int checks = 0, failures = 0;
  logic [PLAT-1:0] pipe [LANES];
  int n_clr, n_acc, n_starve, n_busy, last_retire_cyc, cyc, next_clr;
  bit start_while_busy_seen;

  md_kernel_ctrl #(.ADDR_W(ADDR_W), .CNT_W(CNT_W), .LANES(LANES)) dut (.*);

  always #5 clk = ~clk;

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    assign retire[l] = pipe[l][PLAT-1];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) pipe[l] <= '0;
      else        pipe[l] <= {pipe[l][PLAT-2:0], pair_valid[l] && pair_ready};
    end
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (clr_en) begin
        if (int'(clr_addr) != next_clr) begin
          failures++; $display("FAIL: clear address %0d expected %0d", clr_addr, next_clr);
        end
        next_clr++;
        n_clr++;
      end
      if (pair_ready) n_acc += $countones(pair_valid);
      if (pair_ready && pair_valid == '0) n_starve++;
      if (busy) n_busy++;
      if (retire != '0) last_retire_cyc = cyc;
      if (pair_ready && state != ST_RUN) begin failures++; $display("FAIL: ready outside RUN"); end
    end
  end

  task automatic launch(int atoms, int pairs, int gap_pct);
    int t_done;
    n_clr = 0; n_acc = 0; n_starve = 0; n_busy = 0; next_clr = 0; last_retire_cyc = -1;
    @(negedge clk);
    n_atoms = (ADDR_W+1)'(atoms); n_pairs = CNT_W'(pairs); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) begin
      for (int l = 0; l < LANES; l++)
        pair_valid[l] = ($urandom_range(0, 99) >= gap_pct) && (n_acc + l < pairs);
      if ($urandom_range(0, 50) == 0) begin
        start = 1'b1;               // must be ignored while busy
        start_while_busy_seen = 1;
      end
      @(negedge clk);
      start = 1'b0;
    end
    pair_valid = '0;
    t_done = cyc;
    checks += 7;
    if (n_clr != atoms) begin failures++; $display("FAIL: cleared %0d of %0d", n_clr, atoms); end
    if (n_acc != pairs || int'(accepted) != pairs) begin
      failures++; $display("FAIL: accepted %0d/%0d of %0d", n_acc, accepted, pairs);
    end
    if (int'(starved) != n_starve) begin failures++; $display("FAIL: starved %0d expected %0d", starved, n_starve); end
    if (int'(cycles) != n_busy) begin failures++; $display("FAIL: cycles %0d expected %0d", cycles, n_busy); end
    if (pairs > 0 && (last_retire_cyc < 0 || t_done - last_retire_cyc > 3)) begin
      failures++; $display("FAIL: done %0d cycles after last retire", t_done - last_retire_cyc);
    end
    if (pipe[0] != '0 || pipe[1] != '0) begin failures++; $display("FAIL: done with pairs in flight"); end
    if (pairs > 0 && gap_pct == 0 && n_starve != 0) begin failures++; $display("FAIL: starved without gaps"); end
    $display("launch atoms=%0d pairs=%0d: cycles=%0d starved=%0d", atoms, pairs, cycles, starved);
  endtask

  initial begin
    start = 1'b0; pair_valid = '0; n_atoms = '0; n_pairs = '0; cyc = 0;
    start_while_busy_seen = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    launch(100, 500, 0);
    checks++;
    if (cycles != 32'(100 + 500 / LANES + PLAT + 1)) begin
      failures++; $display("FAIL: full-rate launch took %0d cycles", cycles);
    end
    launch(37, 1000, 30);
    launch(0, 200, 10);
    launch(50, 0, 0);
    launch(1, 1, 0);
    launch(20, 333, 0);
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
