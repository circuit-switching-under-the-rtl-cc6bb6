// classifier: the per-port input classifier of a REACToR.
//
// Every frame a host sends enters one classifier, which forwards it either to
// the circuit path (towards a circuit uplink or a rack-local port, through
// circuit_xbar) or to the port's EPS uplink. Nothing is buffered beyond one
// beat: as in the REACToR design, frames queue in the hosts, not the switch.
//
// The decision is made per frame. A frame goes to the circuit path when the
// controller has the circuit enabled for this port (circ_en) and the frame's
// 802.1Q priority code point equals the class the circuit serves (circ_cls);
// every other frame, including all frames while the circuit is off, goes to
// the EPS. Using the VLAN priority as the traffic class follows from the
// REACToR paper's use of 802.1Qbb classes per destination; reading it from the tag
// is this design's choice. circ_en and circ_cls are sampled once per frame,
// so a frame is never split when the controller changes them.
//
// Timing: the priority sits in the second beat (bytes 12..15 of the frame are
// TPID and TCI), so the first beat is held in a one-beat register and the
// decision is made combinationally when the second beat is offered. Output
// lags input by one beat; throughput is one beat per cycle. ev_valid pulses
// for one cycle when a frame's first beat leaves, with the verdict in ev.
module classifier
  import reactor_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // controller settings
  input  logic               circ_en,
  input  logic [CLASS_W-1:0] circ_cls,
  // frames from the host
  input  beat_t              s_beat,
  input  logic               s_valid,
  output logic               s_ready,
  // circuit path
  output beat_t              c_beat,
  output logic               c_valid,
  input  logic               c_ready,
  // EPS uplink
  output beat_t              e_beat,
  output logic               e_valid,
  input  logic               e_ready,
  // one event per frame
  output logic               ev_valid,
  output frame_event_t       ev
);

  beat_t        r;          // held beat
  logic         r_valid;
  logic         r_first;    // held beat is the first of its frame
  logic         decided;    // verdict for the current frame is latched
  path_e        path_q;
  frame_event_t ev_now;
  path_e        path_now;
  logic         out_valid;
  logic         out_ready;
  logic         out_fire;

  // Verdict from the second beat on the input (or from the held first beat
  // alone for a one-beat frame).
  always_comb begin
    logic               vlan;
    logic [CLASS_W-1:0] pcp;
    vlan = !r.last && (s_beat.data[39:32] == 8'h81) && (s_beat.data[47:40] == 8'h00);
    pcp  = s_beat.data[55:53];
    ev_now.vlan = vlan;
    ev_now.cls  = vlan ? pcp : EPS_CLASS;
    ev_now.path = (circ_en && vlan && pcp == circ_cls && pcp != EPS_CLASS)
                  ? PATH_CIRCUIT : PATH_EPS;
  end

  assign path_now  = decided ? path_q : ev_now.path;
  assign out_valid = r_valid && (decided || r.last || s_valid);
  assign out_ready = (path_now == PATH_CIRCUIT) ? c_ready : e_ready;
  assign out_fire  = out_valid && out_ready;
  assign s_ready   = !r_valid || out_fire;

  assign c_beat  = r;
  assign e_beat  = r;
  assign c_valid = out_valid && (path_now == PATH_CIRCUIT);
  assign e_valid = out_valid && (path_now == PATH_EPS);

  assign ev_valid = out_fire && r_first;
  assign ev       = ev_now;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r       <= '0;
      r_valid <= 1'b0;
      r_first <= 1'b1;
      decided <= 1'b0;
      path_q  <= PATH_EPS;
    end else begin
      if (out_fire) begin
        if (r_first && !r.last) begin
          decided <= 1'b1;
          path_q  <= ev_now.path;
        end
        if (r.last) decided <= 1'b0;
      end
      if (s_valid && s_ready) begin
        r       <= s_beat;
        r_valid <= 1'b1;
        // the next beat starts a frame if the beat it follows was a last
        r_first <= r_valid ? r.last : r_first;
      end else if (out_fire) begin
        r_valid <= 1'b0;
        r_first <= r.last;
      end
    end
  end

endmodule
