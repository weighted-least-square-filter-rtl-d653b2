// tb_dis3x3: checks the 3x3 discontinuity against the reference formula on
// flat, smooth, noisy and random windows.
module tb_dis3x3;
  import wls_pkg::*;
  import wls_ref_pkg::*;

  pix_t  win [9];
  disc_t disc;
  int    checks = 0, failures = 0;
  int    px [9];

  dis3x3 dut (.win(win), .disc(disc));

  task automatic try_window(int spread, int base);
    longint exp_d;
    for (int i = 0; i < 9; i++) begin
      px[i] = base + ((spread == 0) ? 0 : int'($urandom_range(0, spread)));
      if (px[i] > 255) px[i] = 255;
      win[i] = pix_t'(px[i]);
    end
    #1;
    exp_d = ref_disc(px, 1000);
    checks++;
    if (longint'(disc) != exp_d) begin
      failures++;
      $display("mismatch: got %0d expected %0d", disc, exp_d);
    end
  endtask

  initial begin
    // flat window: variance 0, discontinuity 1.0
    try_window(0, 77);
    checks++;
    if (disc != 17'h10000) failures++;
    // hole next to valid depth: variance large, discontinuity 0
    for (int i = 0; i < 9; i++) win[i] = (i == 4) ? 8'd0 : 8'd200;
    #1;
    checks++;
    if (disc != '0) failures++;
    for (int n = 0; n < 3000; n++) try_window(int'($urandom_range(0, 255)) % ((n % 4 == 0) ? 256 : 12),
                                              int'($urandom_range(0, 240)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
