// tb_exp_weight: checks every guide difference 0..255, both argument orders.
module tb_exp_weight;
  import wls_pkg::*;
  import wls_ref_pkg::*;

  pix_t a, b;
  wt_t  w;
  int   checks = 0, failures = 0;

  exp_weight #(.SIGMA(1.5)) dut (.g_a(a), .g_b(b), .w(w));

  initial begin
    for (int d = 0; d < 256; d++) begin
      a = pix_t'(d); b = 8'd0;
      #1;
      checks++;
      if (longint'(w) != ref_weight(d, 0, 1.5)) begin
        failures++;
        $display("diff %0d: got %0d expected %0d", d, w, ref_weight(d, 0, 1.5));
      end
      a = 8'd255 - pix_t'(d); b = 8'd255;
      #1;
      checks++;
      if (longint'(w) != ref_weight(d, 0, 1.5)) failures++;
    end
    a = 8'd9; b = 8'd9;
    #1;
    checks++;
    if (w != 17'h10000) failures++;   // identical guide pixels: weight 1.0
    a = 8'd10; b = 8'd9;
    #1;
    checks++;
    if (w != 17'd33647) failures++;   // exp(-1/1.5) * 65536 = 33647
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
