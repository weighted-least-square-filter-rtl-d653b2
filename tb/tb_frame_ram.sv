// tb_frame_ram: random writes and reads against a shadow array; checks the
// one-cycle read latency, read-enable hold and read-before-write on a clash.
module tb_frame_ram;
  localparam int DEPTH = 1000;
  localparam int WIDTH = 48;
  localparam int AW    = $clog2(DEPTH);

  logic clk = 0;
  logic wr_en = 0, rd_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic [WIDTH-1:0] shadow [DEPTH];
  logic [WIDTH-1:0] expect_q, hold_q;
  logic expect_v;
  int checks = 0, failures = 0;

  frame_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(i); wr_data = {16'(i), 32'($urandom)};
      shadow[i] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
    expect_v = 0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      if (expect_v) begin
        checks++;
        if (rd_data !== expect_q) begin
          failures++;
          if (failures < 10) $display("read mismatch %h vs %h", rd_data, expect_q);
        end
      end
      hold_q = rd_data;
      rd_en   = ($urandom_range(0, 3) != 0);
      rd_addr = AW'($urandom_range(0, DEPTH - 1));
      wr_en   = ($urandom_range(0, 1) == 1);
      wr_addr = (n % 9 == 0) ? rd_addr : AW'($urandom_range(0, DEPTH - 1));
      wr_data = {WIDTH{1'b0}} | {16'hABCD, 32'($urandom)};
      expect_q = rd_en ? shadow[rd_addr] : hold_q;   // old data on a clash
      expect_v = 1;
      if (wr_en) shadow[wr_addr] = wr_data;
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
