// tb_md_div_pipe: the pipelined divider gets random divisors in the range the
// force pipeline uses (1 A .. 64 A in Q.20) with the reciprocal dividend 2^60
// with random dividends whose upper bits stay below the divisor and with
// exact multiples of the divisor, in a
// stream with random idle cycles. Each quotient is compared with integer
// division and must appear exactly QUO_W cycles after its operands.
module tb_md_div_pipe;
  localparam int unsigned DEND_W = 61;
  localparam int unsigned DSOR_W = 26;
  localparam int unsigned QUO_W  = 41;
  localparam int unsigned N      = 3000;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              in_valid;
  logic [DEND_W-1:0] dividend;
  logic [DSOR_W-1:0] divisor;
  logic              out_valid;
  logic [QUO_W-1:0]  quotient;

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;

  md_div_pipe #(.DEND_W(DEND_W), .DSOR_W(DSOR_W), .QUO_W(QUO_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  longint unsigned exp_q[$];
  longint unsigned t_q[$];

  initial begin
    in_valid = 1'b0;
    dividend = '0;
    divisor  = '1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < N; ) begin
      longint unsigned dd, ds;
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin
        in_valid = 1'b0;
      end else begin
        ds = 64'($urandom_range(1 << 20, (1 << DSOR_W) - 1));
        if (n == 0) ds = 64'd1 << 20;
        if (n == 1) ds = (64'd1 << DSOR_W) - 1;
        if (n % 2 == 0) begin
          dd = 64'd1 << 60;
        end else begin
          // upper 20 bits below the divisor, lower 41 bits random
          dd = ((64'($urandom) % ds) % (64'd1 << 20)) << QUO_W;
          dd = dd | ({$urandom, $urandom} & ((64'd1 << QUO_W) - 1));
          // exact multiples hit the remainder == divisor case
          if (n % 5 == 1) dd = ds * ({$urandom, $urandom} & ((64'd1 << 34) - 1));
        end
        in_valid = 1'b1;
        dividend = DEND_W'(dd);
        divisor  = DSOR_W'(ds);
        exp_q.push_back(dd / ds);
        t_q.push_back(cyc);
        n++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (QUO_W + 5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected result");
      end else begin
        longint unsigned e, t;
        e = exp_q.pop_front();
        t = t_q.pop_front();
        checks += 2;
        if (64'(quotient) != e) begin
          failures++;
          $display("FAIL: quotient %0d expected %0d", quotient, e);
        end
        if (cyc - t != 64'(QUO_W)) begin
          failures++;
          $display("FAIL: latency %0d expected %0d", cyc - t, QUO_W);
        end
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
