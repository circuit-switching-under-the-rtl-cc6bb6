// tb_stream_src: testbench frame source for one valid/ready beat stream.
//
// Frames are queued with push(); the source offers their beats in order,
// leaving a random idle cycle before a beat with probability gap_pct/100
// (a slow link, such as the EPS, is modelled with a high value). It drives
// on the falling clock edge and counts a beat as taken when valid and ready
// were both high at the rising edge. cur_frame is the number of the frame
// being offered (frames are numbered from 0 in push order) and sent counts
// completed frames.
module tb_stream_src
  import reactor_pkg::*;
  import tb_frames_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  output beat_t beat,
  output logic  valid,
  input  logic  ready
);

  beat_q_t q [$];
  int      gap_pct   = 0;
  int      bi        = 0;
  int      cur_frame = 0;
  int      sent      = 0;
  bit      fire      = 0;
  bit      hold      = 0;   // keep offering the current beat

  function automatic void push(input beat_q_t f);
    q.push_back(f);
  endfunction

  function automatic int queued();
    return q.size();
  endfunction

  initial begin
    beat  = '0;
    valid = 1'b0;
  end

  always @(posedge clk) fire <= valid && ready;

  always @(negedge clk) begin
    if (rst_n) begin
      if (fire) begin
        hold = 0;
        bi++;
        if (bi == q[0].size()) begin
          void'(q.pop_front());
          bi = 0;
          cur_frame++;
          sent++;
        end
      end
      if (q.size() > 0 && (hold || valid && !fire || $urandom_range(0, 99) >= gap_pct)) begin
        beat  = q[0][bi];
        valid = 1'b1;
        hold  = 1;
      end else begin
        valid = 1'b0;
      end
    end
  end

endmodule
