// tb_depth_divide: preloads a frame of filtered words (including zero
// confidence and quotients above 255) and checks the streamed output pixel by
// pixel, m_last, throughput under a random m_ready, and one pixel per cycle
// when m_ready stays high.
module tb_depth_divide;
  import wls_pkg::*;
  import wls_ref_pkg::*;

  localparam int W = 10;
  localparam int H = 6;

  logic    clk = 0, rst_n = 0;
  logic    start, busy, done, m_valid, m_ready, m_last;
  pix_t    m_depth;
  fb_req_t rq, t_pa, pa;
  gd_req_t ga;
  fb_rsp_t ra, rb;
  int      checks = 0, failures = 0;
  longint  c0 [W*H], c1 [W*H];
  int      got, cycles;
  bit      random_ready;

  depth_divide #(.W(W), .H(H)) dut (.*, .rs(ra));
  frame_banks #(.W(W), .H(H)) mem (.clk(clk), .rst_n(rst_n), .pa(pa), .pb('0), .ga(ga),
                                   .ra(ra), .rb(rb));

  assign pa = busy ? rq : t_pa;

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n && m_valid && m_ready) begin
      checks++;
      if (int'(m_depth) != ref_div(c0[got], c1[got]) || m_last != (got == W*H - 1)) begin
        failures++;
        if (failures < 10) $display("pixel %0d: got %0d expected %0d", got, m_depth,
                                    ref_div(c0[got], c1[got]));
      end
      got++;
    end
  end

  always @(negedge clk) m_ready <= random_ready ? ($urandom_range(0, 2) != 0) : 1'b1;

  task automatic run_frame();
    for (int i = 0; i < W*H; i++) begin
      case (i % 7)
        0: c0[i] = 0;
        1: c0[i] = 1;
        default: c0[i] = longint'($urandom_range(1, 255 * 256));
      endcase
      c1[i] = (c0[i] * longint'($urandom_range(0, 300))) / ((i % 5 == 0) ? 1 : 2);
      if (c1[i] > 24'hFFFFFF) c1[i] = 24'hFFFFFF;
      @(negedge clk);
      t_pa = '0;
      t_pa.wr_en = 1; t_pa.wr_x = crd_t'(i % W); t_pa.wr_y = crd_t'(i / W);
      t_pa.wr_data[0] = dval_t'(c0[i]); t_pa.wr_data[1] = dval_t'(c1[i]);
    end
    @(negedge clk);
    t_pa = '0;
    got = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (got != W*H) failures++;
  endtask

  initial begin
    start = 0; t_pa = '0; ga = '0; random_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_frame();
    checks++;
    if (cycles != W*H + 3) begin
      failures++;
      $display("unstalled frame took %0d cycles, expected %0d", cycles, W*H + 3);
    end
    random_ready = 1;
    run_frame();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
