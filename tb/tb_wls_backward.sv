// tb_wls_backward: back substitution of random lines. The forward sweep is
// taken from the reference; the block's results are checked bit for bit and,
// independently, against the tridiagonal equations they must satisfy:
//   u_x + lambda*(w_l*(u_x - u_(x-1)) + w_r*(u_x - u_(x+1))) = d_x
// up to the fixed-point error.
module tb_wls_backward;
  import wls_pkg::*;
  import wls_ref_pkg::*;

  localparam int     N      = 64;
  localparam longint LAMBDA = 200;

  logic  clk = 0, rst_n = 0;
  logic  step, first;
  dvec_t dp, u;
  wt_t   e;
  int    checks = 0, failures = 0;

  longint d [N], w [N], ee [N], p0 [N], p1 [N], uu [N], u1 [N];

  wls_backward dut (.clk(clk), .rst_n(rst_n), .step(step), .first(first), .dp(dp),
                    .e(e), .u(u));

  always #5 clk = ~clk;

  initial begin
    longint ep, q0, q1, un, wl, wr;
    real lhs, err, maxerr;
    step = 0; first = 0; dp = '0; e = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int line = 0; line < 40; line++) begin
      for (int x = 0; x < N; x++) begin
        d[x] = longint'($urandom_range(0, 255)) << 8;
        w[x] = (x == N - 1) ? 0 : longint'($urandom_range(0, 65536));  // w between x and x+1
      end
      ep = 0; q0 = 0; q1 = 0;
      for (int x = 0; x < N; x++) begin
        wl = (x == 0) ? 0 : w[x-1];
        ref_fwd(LAMBDA, x == 0, d[x], d[x], wl, w[x], ep, q0, q1, ee[x], p0[x], p1[x]);
        ep = ee[x]; q0 = p0[x]; q1 = p1[x];
      end
      un = 0;
      for (int x = N - 1; x >= 0; x--) begin
        @(negedge clk);
        first = (x == N - 1);
        dp[0] = dval_t'(p0[x]);
        dp[1] = dval_t'(p1[x] >> 1);
        e     = wt_t'(ee[x]);
        step  = 1;
        #1;
        checks++;
        if (longint'(u[0]) != ref_bwd(p0[x], ee[x], first ? 0 : uu[x+1]) ||
            longint'(u[1]) != ref_bwd(p1[x] >> 1, ee[x], first ? 0 : u1[x+1])) begin
          failures++;
          if (failures < 10) $display("line %0d x %0d: got %0d", line, x, u[0]);
        end
        uu[x] = longint'(u[0]);
        u1[x] = longint'(u[1]);
      end
      @(negedge clk);
      step = 0;
      // residual of the linear system, in pixel units
      maxerr = 0.0;
      for (int x = 0; x < N; x++) begin
        lhs = real'(uu[x]);
        if (x > 0)     lhs += real'(LAMBDA) * real'(w[x-1]) / 65536.0 * real'(uu[x] - uu[x-1]);
        if (x < N - 1) lhs += real'(LAMBDA) * real'(w[x]) / 65536.0 * real'(uu[x] - uu[x+1]);
        err = (lhs - real'(d[x])) / 256.0;
        if (err < 0) err = -err;
        if (err > maxerr) maxerr = err;
      end
      checks++;
      if (maxerr > 2.0) begin
        failures++;
        $display("line %0d: residual %f pixel levels", line, maxerr);
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
