// axi4_mem_model: behavioural AXI4 slave memory standing in for the off-chip
// DDR4 in testbenches. Not synthesizable.
//
// A byte array of MEM_BYTES accepts INCR bursts of 64-bit beats. Requests are
// queued and served in order; every ready and valid it drives is withheld at
// random (STALL_PCT percent of cycles) to exercise the master's handshakes.
// Testbenches read and write the array directly through mem[].
module axi4_mem_model #(
  parameter int ADDR_W    = 32,
  parameter int MEM_BYTES = 65536,
  parameter int STALL_PCT = 30
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] araddr,
  input  logic [7:0]        arlen,
  input  logic [2:0]        arsize,
  input  logic [1:0]        arburst,
  input  logic              arvalid,
  output logic              arready,
  output logic [63:0]       rdata,
  output logic [1:0]        rresp,
  output logic              rlast,
  output logic              rvalid,
  input  logic              rready,
  input  logic [ADDR_W-1:0] awaddr,
  input  logic [7:0]        awlen,
  input  logic [2:0]        awsize,
  input  logic [1:0]        awburst,
  input  logic              awvalid,
  output logic              awready,
  input  logic [63:0]       wdata,
  input  logic [7:0]        wstrb,
  input  logic              wlast,
  input  logic              wvalid,
  output logic              wready,
  output logic [1:0]        bresp,
  output logic              bvalid,
  input  logic              bready
);

  logic [7:0] mem [MEM_BYTES];

  longint ar_q [$];
  longint aw_q [$];
  int     r_beat, w_beat, b_pend;
  int     bad_bursts;

  function automatic logic [63:0] rd_word(longint a);
    logic [63:0] v;
    for (int i = 0; i < 8; i++) v[8*i +: 8] = mem[int'(a) + i];
    return v;
  endfunction

  function automatic bit go();
    return ($urandom_range(0, 99) >= STALL_PCT);
  endfunction

  initial begin
    arready = 0; awready = 0; wready = 0; rvalid = 0; bvalid = 0;
    rdata = '0; rresp = 2'b00; rlast = 0; bresp = 2'b00;
    r_beat = 0; w_beat = 0; b_pend = 0; bad_bursts = 0;
  end

  always @(posedge clk) begin
    longint h, a;
    if (!rst_n) begin
      arready <= 0; awready <= 0; wready <= 0; rvalid <= 0; bvalid <= 0;
      ar_q.delete(); aw_q.delete(); r_beat = 0; w_beat = 0; b_pend = 0;
    end else begin
      // read address
      if (arvalid && arready) begin
        if (arsize != 3'd3 || arburst != 2'b01) bad_bursts++;
        ar_q.push_back({longint'(arlen), 32'(araddr)});
      end
      arready <= go();
      // read data
      if (rvalid && rready) begin
        if (rlast) begin
          void'(ar_q.pop_front());
          r_beat = 0;
        end else r_beat++;
      end
      if (ar_q.size() > 0 && (!rvalid || rready) && go()) begin
        h = ar_q[0];
        a = longint'(h[31:0]) + longint'(r_beat) * 8;
        rvalid <= 1;
        rdata  <= rd_word(a);
        rlast  <= (r_beat == int'(h[39:32]));
        rresp  <= 2'b00;
      end else if (rready) begin
        rvalid <= 0;
      end
      // write address and data
      if (awvalid && awready) begin
        if (awsize != 3'd3 || awburst != 2'b01) bad_bursts++;
        aw_q.push_back({longint'(awlen), 32'(awaddr)});
      end
      awready <= go();
      if (wvalid && wready) begin
        h = aw_q[0];
        a = longint'(h[31:0]) + longint'(w_beat) * 8;
        for (int i = 0; i < 8; i++) if (wstrb[i]) mem[int'(a) + i] = wdata[8*i +: 8];
        if (wlast != (w_beat == int'(h[39:32]))) bad_bursts++;
        if (wlast) begin
          void'(aw_q.pop_front());
          w_beat = 0;
          b_pend++;
        end else w_beat++;
      end
      wready <= (aw_q.size() > 0 || (awvalid && awready)) && go();
      // write response
      if (bvalid && bready) b_pend--;
      bvalid <= (b_pend > 0);
      bresp  <= 2'b00;
    end
  end

endmodule
