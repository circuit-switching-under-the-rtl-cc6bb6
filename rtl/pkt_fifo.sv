// pkt_fifo: store-and-forward frame FIFO that drops whole frames on overflow.
//
// Used on each input of a downward-port multiplexer. The write side never
// applies backpressure (in_ready is always 1), because neither the OCS nor
// the EPS link can be held off. Beats of a frame are written behind a
// provisional pointer; when the frame's last beat is written the frame is
// committed and becomes visible to the read side. If the memory fills in the
// middle of a frame, the provisional pointer is rolled back to the frame's
// start, the rest of the frame is discarded and `drop` pulses once.
//
// The read side offers a frame only when it is complete, so a frame leaves at
// one beat per cycle without gaps even when it arrived slowly (EPS traffic).
// Latency is the frame length plus one cycle. DEPTH must be a power of two.
// The buffer sizes are this design's choice; the REACToR paper only requires
// that the multiplexer mix both sources without loss when rate limits hold.
module pkt_fifo
  import reactor_pkg::*;
#(
  parameter int unsigned DEPTH = 512
) (
  input  logic  clk,
  input  logic  rst_n,
  input  beat_t in_beat,
  input  logic  in_valid,
  output logic  in_ready,
  output beat_t out_beat,
  output logic  out_valid,
  input  logic  out_ready,
  output logic  drop         // one cycle per dropped frame
);

  localparam int unsigned AW = $clog2(DEPTH);

  beat_t          mem [DEPTH];
  logic [AW:0]    wr_ptr;     // provisional write pointer
  logic [AW:0]    wr_commit;  // start of the frame being written
  logic [AW:0]    rd_ptr;
  logic [AW:0]    n_frames;   // complete frames stored
  logic           dropping;   // discarding the rest of an overflowed frame
  logic           full;
  logic           wr_en;
  logic           rd_en;
  logic           commit;

  assign in_ready = 1'b1;
  assign full     = (wr_ptr[AW] != rd_ptr[AW]) && (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]);
  assign wr_en    = in_valid && !dropping && !full;
  assign commit   = wr_en && in_beat.last;

  assign out_valid   = (n_frames != '0);
  assign out_beat    = mem[rd_ptr[AW-1:0]];
  assign rd_en       = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ptr[AW-1:0]] <= in_beat;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr    <= '0;
      wr_commit <= '0;
      rd_ptr    <= '0;
      n_frames  <= '0;
      dropping  <= 1'b0;
      drop      <= 1'b0;
    end else begin
      drop <= 1'b0;
      if (in_valid && dropping) begin
        if (in_beat.last) dropping <= 1'b0;
      end else if (in_valid && full) begin
        // overflow: forget the partial frame
        wr_ptr   <= wr_commit;
        dropping <= !in_beat.last;
        drop     <= 1'b1;
      end else if (wr_en) begin
        wr_ptr <= wr_ptr + 1'b1;
        if (in_beat.last) wr_commit <= wr_ptr + 1'b1;
      end
      if (rd_en) rd_ptr <= rd_ptr + 1'b1;
      case ({commit, rd_en && out_beat.last})
        2'b10:   n_frames <= n_frames + 1'b1;
        2'b01:   n_frames <= n_frames - 1'b1;
        default: ;
      endcase
    end
  end

endmodule
