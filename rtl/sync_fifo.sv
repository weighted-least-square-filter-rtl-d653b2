// sync_fifo: small synchronous first-in first-out buffer.
//
// DEPTH words of WIDTH bits in a circular array. push writes when not full,
// pop removes the head when not empty; the head is visible on rd_data while
// not empty (first-word fall-through). count tells how many words are held.
// Pushing into a full or popping from an empty FIFO is a usage error checked
// by assertions.
module sync_fifo #(
  parameter int WIDTH = 64,
  parameter int DEPTH = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     pop,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int PW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wp, rp;

  assign empty   = (count == '0);
  assign full    = (32'(count) == DEPTH);
  assign rd_data = mem[rp];

  always_ff @(posedge clk) begin
    if (push && !full) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push && !full) wp <= (32'(wp) == DEPTH - 1) ? '0 : PW'(wp + 1'b1);
      if (pop && !empty) rp <= (32'(rp) == DEPTH - 1) ? '0 : PW'(rp + 1'b1);
      count <= count + (($clog2(DEPTH+1))'(push && !full)) - (($clog2(DEPTH+1))'(pop && !empty));
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
