// pfc_gen: builds IEEE 802.1Qbb priority flow control (PFC) frames.
//
// REACToR starts and stops each host traffic class with PFC frames: a pause
// frame stops the class that fed the circuit before the OCS is reconfigured,
// and an unpause frame starts the class of the next circuit. A request names
// classes to pause (pause_vec) and classes to unpause (unpause_vec); requests
// that arrive while a frame waits or is being sent are merged into the next
// frame, a later request for a class overriding an earlier one. A class
// named in both vectors of one request is paused.
//
// Frame layout (60 bytes; the MAC appends the FCS): destination
// 01-80-C2-00-00-01, source SRC_MAC, EtherType 0x8808, opcode 0x0101, a
// 16-bit class-enable vector and eight 16-bit pause times in quanta of 512
// bit times, then zero padding. A paused class gets PAUSE_QUANTA, an
// unpaused class gets 0. The layout is the 802.1Qbb standard's; the default
// quanta and source address are this design's choice.
//
// Timing: a frame is 8 beats. The first beat is offered two cycles after a
// request; the downlink multiplexer may hold it until the frame being sent
// to the host ends. busy is high from request to last beat.
module pfc_gen
  import reactor_pkg::*;
#(
  parameter logic [47:0] SRC_MAC      = 48'h02_00_00_00_00_01,
  parameter logic [15:0] PAUSE_QUANTA = 16'hFFFF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 req,
  input  logic [N_CLASSES-1:0] pause_vec,
  input  logic [N_CLASSES-1:0] unpause_vec,
  output beat_t                m_beat,
  output logic                 m_valid,
  input  logic                 m_ready,
  output logic                 busy
);

  localparam int unsigned FRAME_BYTES = 60;
  localparam int unsigned FRAME_BEATS = (FRAME_BYTES + KEEP_W - 1) / KEEP_W;

  // requests waiting for the next frame
  logic [N_CLASSES-1:0] pend_pause, pend_unpause;
  // contents of the frame being sent
  logic [N_CLASSES-1:0] cur_pause, cur_unpause;
  logic                 sending;
  logic [$clog2(FRAME_BEATS)-1:0] beat_idx;

  function automatic logic [7:0] frame_byte(input int unsigned i,
                                            input logic [N_CLASSES-1:0] p,
                                            input logic [N_CLASSES-1:0] u);
    logic [47:0] da;
    logic [15:0] t;
    da = 48'h01_80_C2_00_00_01;
    if (i < 6)  return da[8*(5-i) +: 8];
    if (i < 12) return SRC_MAC[8*(11-i) +: 8];
    if (i == 12) return 8'h88;
    if (i == 13) return 8'h08;
    if (i == 14) return 8'h01;
    if (i == 15) return 8'h01;
    if (i == 16) return 8'h00;
    if (i == 17) return p | u;
    if (i < 34) begin
      t = p[(i-18)/2] ? PAUSE_QUANTA : 16'h0000;
      return ((i - 18) % 2 == 0) ? t[15:8] : t[7:0];
    end
    return 8'h00;
  endfunction

  always_comb begin
    m_beat = '0;
    for (int unsigned b = 0; b < KEEP_W; b++) begin
      int unsigned idx;
      idx = int'(beat_idx) * KEEP_W + b;
      if (idx < FRAME_BYTES) begin
        m_beat.data[8*b +: 8] = frame_byte(idx, cur_pause, cur_unpause);
        m_beat.keep[b]        = 1'b1;
      end
    end
    m_beat.last = (int'(beat_idx) == FRAME_BEATS - 1);
  end

  assign m_valid = sending;
  assign busy    = sending || (pend_pause != '0) || (pend_unpause != '0);

  // pending requests after this cycle: a frame that starts takes what was
  // pending, and a new request is merged in, pause winning over unpause
  logic                 take;
  logic [N_CLASSES-1:0] np, nu;
  assign take = !sending && (pend_pause != '0 || pend_unpause != '0);

  always_comb begin
    np = take ? '0 : pend_pause;
    nu = take ? '0 : pend_unpause;
    if (req) begin
      np = (np & ~unpause_vec) | pause_vec;
      nu = (nu & ~pause_vec)   | (unpause_vec & ~pause_vec);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_pause   <= '0;
      pend_unpause <= '0;
      cur_pause    <= '0;
      cur_unpause  <= '0;
      sending      <= 1'b0;
      beat_idx     <= '0;
    end else begin
      if (take) begin
        cur_pause   <= pend_pause;
        cur_unpause <= pend_unpause;
        sending     <= 1'b1;
        beat_idx    <= '0;
      end else if (sending && m_ready) begin
        if (m_beat.last) sending <= 1'b0;
        beat_idx <= beat_idx + 1'b1;
      end
      pend_pause   <= np;
      pend_unpause <= nu;
    end
  end

endmodule
