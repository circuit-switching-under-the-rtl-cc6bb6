// pkt_recorder: timestamps every frame entering the REACToR and sends the
// records out of band to a collection host.
//
// The REACToR paper's prototype extends its classifiers to record, for each
// frame, its source, its destination and a timestamp with 6.4 ns precision,
// and sends these records to a collection host through one of the FPGA's
// 10 Gb/s ports. Here each classifier reports a frame event; the recorder
// stamps it with a free-running counter of the 156.25 MHz clock (one tick is
// 6.4 ns), so the timestamp precision is the REACToR paper's.
//
// Record (64 bits, sent most significant byte first):
//   [63:16] timestamp  [15:12] source port  [11:9] traffic class
//   [8] path (1 = circuit)  [7] frame was 802.1Q tagged  [6:0] zero
// The traffic class identifies the destination, as classes stand for
// destinations.
//
// Each port has a one-record holding register; a round-robin arbiter moves
// one record per cycle into a FIFO. Frames are at least 8 beats long, so
// with four ports the holding registers never overflow at line rate; if one
// does, `lost` pulses. Records leave in Ethernet frames: two header beats
// (destination DST_MAC, source SRC_MAC, EtherType ETHERTYPE, 16-bit record
// count) followed by RECS_PER_FRAME records, or fewer when records have
// waited FLUSH_CYCLES. The record layout and framing are this design's
// choice; short frames are padded by the MAC.
// Every beat of a record frame is full (keep is all ones).
module pkt_recorder
  import reactor_pkg::*;
#(
  parameter int unsigned REC_FIFO_DEPTH = 64,
  parameter int unsigned RECS_PER_FRAME = 16,
  parameter int unsigned FLUSH_CYCLES   = 1024,
  parameter logic [47:0] DST_MAC        = 48'hFF_FF_FF_FF_FF_FF,
  parameter logic [47:0] SRC_MAC        = 48'h02_00_00_00_00_FE,
  parameter logic [15:0] ETHERTYPE      = 16'h88B5
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic         [N_PORTS-1:0] ev_valid,
  input  frame_event_t               ev [N_PORTS],
  output beat_t                      m_beat,
  output logic                       m_valid,
  input  logic                       m_ready,
  output logic         [TS_W-1:0]    timestamp,
  output logic                       lost
);

  localparam int unsigned AW = $clog2(REC_FIFO_DEPTH);
  localparam int unsigned CW = $clog2(RECS_PER_FRAME + 1);

  logic [63:0]        hold     [N_PORTS];
  logic [N_PORTS-1:0] hold_v;
  logic [PORT_W-1:0]  rr;                 // next port to look at first
  logic [63:0]        fifo     [REC_FIFO_DEPTH];
  logic [AW:0]        wp, rp;
  logic [AW:0]        count;
  logic               push;
  logic [PORT_W-1:0]  push_port;
  logic [31:0]        wait_cnt;

  typedef enum logic [1:0] { F_IDLE, F_HDR0, F_HDR1, F_REC } fstate_e;
  fstate_e            fs;
  logic [CW-1:0]      n_frame;            // records in the frame being sent
  logic [CW-1:0]      n_sent;

  assign count = wp - rp;

  // round-robin pick of a waiting record
  always_comb begin
    push      = 1'b0;
    push_port = '0;
    for (int k = 0; k < N_PORTS; k++) begin
      logic [PORT_W-1:0] p;
      p = PORT_W'((int'(rr) + k) % N_PORTS);
      if (!push && hold_v[p]) begin
        push      = 1'b1;
        push_port = p;
      end
    end
    if (count == (AW+1)'(REC_FIFO_DEPTH)) push = 1'b0;
  end

  // output frame
  always_comb begin
    logic [63:0] rec;
    m_beat  = '0;
    m_valid = 1'b0;
    rec     = fifo[rp[AW-1:0]];
    m_beat.keep = '1;
    case (fs)
      F_HDR0: begin
        m_valid = 1'b1;
        for (int b = 0; b < 6; b++) m_beat.data[8*b +: 8] = DST_MAC[8*(5-b) +: 8];
        m_beat.data[55:48] = SRC_MAC[47:40];
        m_beat.data[63:56] = SRC_MAC[39:32];
      end
      F_HDR1: begin
        m_valid = 1'b1;
        for (int b = 0; b < 4; b++) m_beat.data[8*b +: 8] = SRC_MAC[8*(3-b) +: 8];
        m_beat.data[39:32] = ETHERTYPE[15:8];
        m_beat.data[47:40] = ETHERTYPE[7:0];
        m_beat.data[55:48] = 8'(16'(n_frame) >> 8);
        m_beat.data[63:56] = 8'(n_frame);
      end
      F_REC: begin
        m_valid = 1'b1;
        for (int b = 0; b < 8; b++) m_beat.data[8*b +: 8] = rec[8*(7-b) +: 8];
        m_beat.last = (n_sent == n_frame - 1'b1);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (push) begin
      fifo[wp[AW-1:0]] <= hold[push_port];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timestamp <= '0;
      hold_v    <= '0;
      rr        <= '0;
      wp        <= '0;
      rp        <= '0;
      lost      <= 1'b0;
      fs        <= F_IDLE;
      n_frame   <= '0;
      n_sent    <= '0;
      wait_cnt  <= '0;
      for (int p = 0; p < N_PORTS; p++) hold[p] <= '0;
    end else begin
      timestamp <= timestamp + 1'b1;
      lost      <= 1'b0;

      if (push) begin
        wp             <= wp + 1'b1;
        hold_v[push_port] <= 1'b0;
        rr             <= PORT_W'((int'(push_port) + 1) % N_PORTS);
      end
      for (int p = 0; p < N_PORTS; p++) begin
        if (ev_valid[p]) begin
          if (hold_v[p] && !(push && push_port == PORT_W'(p))) lost <= 1'b1;
          else begin
            hold[p]   <= {timestamp, 4'(p), ev[p].cls, ev[p].path == PATH_CIRCUIT,
                          ev[p].vlan, 7'd0};
            hold_v[p] <= 1'b1;
          end
        end
      end

      case (fs)
        F_IDLE: begin
          if (count == '0) wait_cnt <= '0;
          else             wait_cnt <= wait_cnt + 1'b1;
          if (count >= (AW+1)'(RECS_PER_FRAME)) begin
            n_frame <= CW'(RECS_PER_FRAME);
            fs      <= F_HDR0;
          end else if (count != '0 && wait_cnt >= FLUSH_CYCLES) begin
            n_frame <= CW'(count);
            fs      <= F_HDR0;
          end
        end
        F_HDR0: if (m_ready) fs <= F_HDR1;
        F_HDR1: if (m_ready) begin
          fs     <= F_REC;
          n_sent <= '0;
        end
        F_REC: if (m_ready) begin
          rp     <= rp + 1'b1;
          n_sent <= n_sent + 1'b1;
          if (m_beat.last) begin
            fs       <= F_IDLE;
            wait_cnt <= '0;
          end
        end
        default: fs <= F_IDLE;
      endcase
    end
  end

endmodule
