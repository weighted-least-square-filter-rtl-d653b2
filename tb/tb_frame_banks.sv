// tb_frame_banks: fills a small frame through both ports at once in the
// access pattern of the two forward engines (same row or column, opposite
// halves), then reads every pixel back through both ports, row-wise and
// column-wise, and checks data, guide and the one-cycle latency.
module tb_frame_banks;
  import wls_pkg::*;

  localparam int W = 12;
  localparam int H = 8;

  logic    clk = 0, rst_n = 0;
  fb_req_t pa, pb;
  gd_req_t ga;
  fb_rsp_t ra, rb;
  int      checks = 0, failures = 0;

  frame_banks #(.W(W), .H(H)) dut (.*);

  always #5 clk = ~clk;

  function automatic dvec_t val(int x, int y);
    dvec_t v;
    v[0] = dval_t'(y * 256 + x);
    v[1] = dval_t'(24'hA00000 + x * 64 + y);
    return v;
  endfunction
  function automatic pix_t gval(int x, int y);
    return pix_t'(x * 16 + y + 3);
  endfunction

  initial begin
    int ax, ay, bx, by;
    logic exp_v;
    int eax, eay, ebx, eby;
    pa = '0; pb = '0; ga = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // write: rows, A in left half, B in right half; guide through ga
    for (int y = 0; y < H; y++)
      for (int i = 0; i < W / 2; i++) begin
        @(negedge clk);
        pa = '0; pb = '0;
        pa.wr_en = 1; pa.wr_x = crd_t'(i);         pa.wr_y = crd_t'(y); pa.wr_data = val(i, y);
        pb.wr_en = 1; pb.wr_x = crd_t'(i + W / 2); pb.wr_y = crd_t'(y);
        pb.wr_data = val(i + W / 2, y);
        ga.wr_en = 1; ga.wr_x = crd_t'(i); ga.wr_y = crd_t'(y); ga.wr_data = gval(i, y);
        @(negedge clk);
        pa.wr_en = 0; pb.wr_en = 0;
        ga.wr_x = crd_t'(i + W / 2); ga.wr_data = gval(i + W / 2, y);
      end
    @(negedge clk);
    ga = '0;
    // read back, columns: A top half, B bottom half; then rows
    exp_v = 0;
    for (int pass = 0; pass < 2; pass++)
      for (int ln = 0; ln < ((pass == 0) ? W : H); ln++)
        for (int i = 0; i < ((pass == 0) ? H / 2 : W / 2); i++) begin
          if (pass == 0) begin ax = ln; ay = i; bx = ln; by = i + H / 2; end
          else           begin ax = i; ay = ln; bx = i + W / 2; by = ln; end
          pa = '0; pb = '0;
          pa.rd_en = 1; pa.rd_x = crd_t'(ax); pa.rd_y = crd_t'(ay);
          pb.rd_en = 1; pb.rd_x = crd_t'(bx); pb.rd_y = crd_t'(by);
          @(negedge clk);
          checks += 2;
          if (ra.data != val(ax, ay) || ra.guide != gval(ax, ay)) begin
            failures++;
            if (failures < 10) $display("A (%0d,%0d): %h %h", ax, ay, ra.data, ra.guide);
          end
          if (rb.data != val(bx, by) || rb.guide != gval(bx, by)) begin
            failures++;
            if (failures < 10) $display("B (%0d,%0d): %h %h", bx, by, rb.data, rb.guide);
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
