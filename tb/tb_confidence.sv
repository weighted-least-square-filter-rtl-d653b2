// tb_confidence: checks conf = min(disc_L, disc_R)*255 and disparity*conf.
module tb_confidence;
  import wls_pkg::*;
  import wls_ref_pkg::*;

  disc_t dl, dr;
  pix_t  disp, conf;
  dvec_t words;
  int    checks = 0, failures = 0;

  confidence dut (.disc_l(dl), .disc_r(dr), .disp_l(disp), .conf(conf), .words(words));

  task automatic try_one(longint a, longint b, int d);
    int c;
    dl = disc_t'(a); dr = disc_t'(b); disp = pix_t'(d);
    #1;
    c = ref_conf(a, b);
    checks++;
    if (int'(conf) != c || longint'(words[0]) != (longint'(c) << 8) ||
        longint'(words[1]) != (longint'(c * d) << 8)) begin
      failures++;
      $display("mismatch: disc %0d/%0d disp %0d -> conf %0d words %h", a, b, d, conf, words);
    end
  endtask

  initial begin
    try_one(65536, 65536, 255);   // full confidence: 255, product 65025
    checks++;
    if (conf != 8'd255 || words[1] != 24'(65025 << 8)) failures++;
    try_one(0, 65536, 100);       // one side untrusted: 0
    for (int n = 0; n < 3000; n++)
      try_one(longint'($urandom_range(0, 65536)), longint'($urandom_range(0, 65536)),
              int'($urandom_range(0, 255)));
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
