// tb_md_isqrt_pipe: random operands (edge values included) are fed to the
// pipelined square root with random idle cycles; every result is compared
// with a root computed in floating point and corrected to the exact integer
// floor, and every result must appear exactly OUT_W cycles after its operand.
module tb_md_isqrt_pipe;
  localparam int unsigned OUT_W = 26;
  localparam int unsigned IN_W  = 2 * OUT_W;
  localparam int unsigned N     = 3000;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             in_valid;
  logic [IN_W-1:0]  x;
  logic             out_valid;
  logic [OUT_W-1:0] root;

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;

  md_isqrt_pipe #(.OUT_W(OUT_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  longint unsigned exp_q[$];
  longint unsigned t_q[$];

  function automatic longint unsigned ref_sqrt(longint unsigned v);
    longint unsigned r;
    r = longint'($floor($sqrt(real'(v))));
    while (r * r > v) r--;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  // driver
  initial begin
    in_valid = 1'b0;
    x = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < N; ) begin
      longint unsigned v;
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin
        in_valid = 1'b0;
      end else begin
        case (n)
          0: v = 0;
          1: v = 1;
          2: v = (64'd1 << IN_W) - 1;
          3: v = 64'd1 << 40;
          4: v = (64'd12345 * 64'd12345);
          5: v = (64'd12345 * 64'd12345) - 1;
          default: v = {$urandom, $urandom} & ((64'd1 << ($urandom_range(1, IN_W))) - 1);
        endcase
        in_valid = 1'b1;
        x = IN_W'(v);
        exp_q.push_back(ref_sqrt(v));
        t_q.push_back(cyc);
        n++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (OUT_W + 5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor
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
        if (64'(root) != e) begin
          failures++;
          $display("FAIL: root %0d expected %0d", root, e);
        end
        if (cyc - t != 64'(OUT_W)) begin
          failures++;
          $display("FAIL: latency %0d expected %0d", cyc - t, OUT_W);
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
