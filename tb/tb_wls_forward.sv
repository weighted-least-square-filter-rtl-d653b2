// tb_wls_forward: drives random lines through the forward-elimination step,
// including restarts in the middle of a line, and compares e and d' with the
// reference recursion at every step. Also checks the phase rule: a restarted
// pixel ignores its left weight and previous pixel.
module tb_wls_forward;
  import wls_pkg::*;
  import wls_ref_pkg::*;

  localparam longint LAMBDA = 8000;

  logic  clk = 0, rst_n = 0;
  logic  step, first;
  dvec_t d, dp;
  wt_t   wl, wr, e;
  int    checks = 0, failures = 0;
  longint e_prev, p0, p1, ee, q0, q1;

  wls_forward #(.LAMBDA(int'(LAMBDA))) dut (
    .clk(clk), .rst_n(rst_n), .step(step), .first(first), .d(d), .wl(wl), .wr(wr),
    .e(e), .dp(dp));

  always #5 clk = ~clk;

  initial begin
    step = 0; first = 0; d = '0; wl = '0; wr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    e_prev = 0; p0 = 0; p1 = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      first = (n % 37 == 0) || (n % 11 == 5);
      d[0]  = dval_t'($urandom_range(0, 255) << 8);
      d[1]  = dval_t'($urandom_range(0, 65025) << 8);
      wl    = wt_t'((n % 5 == 0) ? 65536 : $urandom_range(0, 65536));
      wr    = wt_t'((n % 7 == 0) ? 0 : $urandom_range(0, 65536));
      step  = ($urandom_range(0, 3) != 0);
      #1;
      ref_fwd(LAMBDA, first, longint'(d[0]), longint'(d[1]), longint'(wl), longint'(wr),
              e_prev, p0, p1, ee, q0, q1);
      checks++;
      if (longint'(e) != ee || longint'(dp[0]) != q0 || longint'(dp[1]) != q1) begin
        failures++;
        if (failures < 10) $display("step %0d: got e=%0d dp=%0d,%0d expected %0d %0d,%0d",
                                    n, e, dp[0], dp[1], ee, q0, q1);
      end
      if (first) begin
        // restart: only the right neighbour counts
        checks++;
        // exact quotient lies between floor and floor+1; the step rounds
        if (longint'(e) != (longint'(LAMBDA) * longint'(wr) * 65536) / (65536 + LAMBDA * longint'(wr))
            && longint'(e) - 1 != (longint'(LAMBDA) * longint'(wr) * 65536) / (65536 + LAMBDA * longint'(wr)))
          failures++;
      end
      if (step) begin
        e_prev = ee; p0 = q0; p1 = q1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
