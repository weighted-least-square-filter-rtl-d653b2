// depth_divide: final step of the post-filter, reading the smoothed frame and
// streaming out the filtered disparity map.
//
//   depth = filtered(disparity*confidence) / filtered(confidence)
// rounded to the nearest integer and clamped to 8 bits; where the filtered
// confidence is 0 (no trusted pixel anywhere near) the output is 0, the
// value used for "unmeasured". The division follows the source; rounding,
// clamping and the zero rule are this design's choices.
//
// After start it reads the frame in raster order through a frame_banks port
// (read data one cycle later), divides, and queues results in a two-entry
// buffer in front of a valid/ready output, so it sustains one pixel per cycle
// while m_ready stays high and stops reading when the buffer would overflow.
// m_last marks the last pixel of the frame; done pulses after it is accepted.
// The port request uses the frame store's common request type; this block only
// reads, so its write fields are held at 0.
module depth_divide
  import wls_pkg::*;
#(
  parameter int W = 672,
  parameter int H = 376
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  output logic    busy,
  output logic    done,
  output fb_req_t rq,
  input  fb_rsp_t rs,
  output logic    m_valid,
  input  logic    m_ready,
  output pix_t    m_depth,
  output logic    m_last
);

  crd_t  x, y;
  logic  running;
  logic  inflight, inflight_last;
  logic  issue;
  pix_t  q_pix [2];
  logic  q_last [2];
  logic [1:0] count;
  logic  pop, push;
  pix_t  result;
  logic [D_W:0] num;

  always_comb begin
    if (rs.data[0] == '0) begin
      num    = '0;
      result = '0;
    end else begin
      num    = ((D_W+1)'(rs.data[1]) + (D_W+1)'(rs.data[0] >> 1)) / (D_W+1)'(rs.data[0]);
      result = (num > (D_W+1)'(255)) ? 8'hFF : pix_t'(num);
    end
  end

  assign issue = running && (32'(count) + 32'(inflight) - 32'(pop) < 2);
  assign push  = inflight;
  assign pop   = m_valid && m_ready;

  always_comb begin
    rq       = '0;
    rq.rd_en = issue;
    rq.rd_x  = x;
    rq.rd_y  = y;
  end

  assign m_valid = (count != 2'd0);
  assign m_depth = q_pix[0];
  assign m_last  = q_last[0];
  assign busy    = running || inflight || (count != 2'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0;
      running <= 1'b0;
      inflight <= 1'b0;
      inflight_last <= 1'b0;
      count <= '0;
      q_pix[0] <= '0; q_pix[1] <= '0;
      q_last[0] <= 1'b0; q_last[1] <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= pop && q_last[0];
      if (start && !running) begin
        running <= 1'b1;
        x <= '0; y <= '0;
      end
      inflight      <= issue;
      inflight_last <= issue && (32'(x) == W - 1) && (32'(y) == H - 1);
      if (issue) begin
        if (32'(x) == W - 1) begin
          x <= '0;
          if (32'(y) == H - 1) begin
            y <= '0;
            running <= 1'b0;
          end else begin
            y <= crd_t'(y + 1'b1);
          end
        end else begin
          x <= crd_t'(x + 1'b1);
        end
      end
      // two-entry queue
      unique case ({push, pop})
        2'b10: begin
          q_pix[count[0]]  <= result;
          q_last[count[0]] <= inflight_last;
          count <= count + 2'd1;
        end
        2'b01: begin
          q_pix[0]  <= q_pix[1];
          q_last[0] <= q_last[1];
          count <= count - 2'd1;
        end
        2'b11: begin
          if (count == 2'd1) begin
            q_pix[0]  <= result;
            q_last[0] <= inflight_last;
          end else begin
            q_pix[0]  <= q_pix[1];
            q_last[0] <= q_last[1];
            q_pix[1]  <= result;
            q_last[1] <= inflight_last;
          end
        end
        default: ;
      endcase
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  !(push && !pop && count == 2'd2));

endmodule
