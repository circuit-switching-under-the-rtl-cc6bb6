// downlink_mux: the multiplexer in front of one downward (host-facing) port.
//
// A host port receives from four sources: PFC frames addressed to the host,
// circuit traffic arriving from the OCS, rack-local circuit traffic from the
// crossbar, and packet traffic from the EPS. Circuit traffic must not wait,
// because the OCS has no buffers, so the multiplexer serves sources in the
// fixed order PFC, OCS, local, EPS, choosing again only at frame boundaries.
// PFC comes first so that a pause reaches the host no later than the end of
// the frame being sent, the bound the REACToR paper gives for that delay. End-host
// rate limiting (circuit traffic at 90-100 % of line rate) leaves the gaps in
// which EPS frames go out.
//
// The OCS, local and EPS inputs each pass through a store-and-forward
// pkt_fifo. A circuit frame that arrives during an EPS frame waits there for
// at most one frame; an EPS frame waits while circuit frames keep coming. A
// FIFO that overflows drops whole frames and pulses its drop output. Buffer
// sizes are this design's choice.
//
// Timing: a frame stored in a FIFO leaves at one beat per cycle; the grant
// for the next frame is made in the cycle after the previous last beat.
// sof pulses with sof_src when a frame starts on the host link.
module downlink_mux
  import reactor_pkg::*;
#(
  parameter int unsigned CIRC_FIFO_DEPTH = 512,
  parameter int unsigned EPS_FIFO_DEPTH  = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  beat_t       pfc_beat,
  input  logic        pfc_valid,
  output logic        pfc_ready,
  input  beat_t       ocs_beat,
  input  logic        ocs_valid,
  output logic        ocs_ready,
  input  beat_t       loc_beat,
  input  logic        loc_valid,
  output logic        loc_ready,
  input  beat_t       eps_beat,
  input  logic        eps_valid,
  output logic        eps_ready,
  output beat_t       m_beat,
  output logic        m_valid,
  input  logic        m_ready,
  output logic        sof,
  output logic [1:0]  sof_src,      // 0 PFC, 1 OCS, 2 local, 3 EPS
  output logic [2:0]  drop          // {eps, local, ocs} frame dropped
);

  localparam logic [1:0] SRC_PFC = 2'd0;
  localparam logic [1:0] SRC_OCS = 2'd1;
  localparam logic [1:0] SRC_LOC = 2'd2;
  localparam logic [1:0] SRC_EPS = 2'd3;

  beat_t      q_beat  [4];
  logic [3:0] q_valid;
  logic [3:0] q_ready;
  logic       locked;
  logic [1:0] sel_q;
  logic [1:0] sel;
  logic       any;

  assign q_beat[SRC_PFC]  = pfc_beat;
  assign q_valid[SRC_PFC] = pfc_valid;
  assign pfc_ready        = q_ready[SRC_PFC];

  pkt_fifo #(.DEPTH(CIRC_FIFO_DEPTH)) u_ocs_fifo (
    .clk, .rst_n,
    .in_beat(ocs_beat), .in_valid(ocs_valid), .in_ready(ocs_ready),
    .out_beat(q_beat[SRC_OCS]), .out_valid(q_valid[SRC_OCS]), .out_ready(q_ready[SRC_OCS]),
    .drop(drop[0])
  );

  pkt_fifo #(.DEPTH(CIRC_FIFO_DEPTH)) u_loc_fifo (
    .clk, .rst_n,
    .in_beat(loc_beat), .in_valid(loc_valid), .in_ready(loc_ready),
    .out_beat(q_beat[SRC_LOC]), .out_valid(q_valid[SRC_LOC]), .out_ready(q_ready[SRC_LOC]),
    .drop(drop[1])
  );

  pkt_fifo #(.DEPTH(EPS_FIFO_DEPTH)) u_eps_fifo (
    .clk, .rst_n,
    .in_beat(eps_beat), .in_valid(eps_valid), .in_ready(eps_ready),
    .out_beat(q_beat[SRC_EPS]), .out_valid(q_valid[SRC_EPS]), .out_ready(q_ready[SRC_EPS]),
    .drop(drop[2])
  );

  // fixed-priority choice among the sources with a frame ready
  always_comb begin
    any = 1'b1;
    if      (q_valid[SRC_PFC]) sel = SRC_PFC;
    else if (q_valid[SRC_OCS]) sel = SRC_OCS;
    else if (q_valid[SRC_LOC]) sel = SRC_LOC;
    else if (q_valid[SRC_EPS]) sel = SRC_EPS;
    else begin
      sel = SRC_EPS;
      any = 1'b0;
    end
  end

  logic [1:0] cur;
  assign cur     = locked ? sel_q : sel;
  assign m_beat  = q_beat[cur];
  assign m_valid = (locked || any) && q_valid[cur];

  always_comb begin
    q_ready      = '0;
    q_ready[cur] = m_valid && m_ready;
  end

  assign sof     = !locked && m_valid && m_ready;
  assign sof_src = cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0;
      sel_q  <= SRC_PFC;
    end else if (m_valid && m_ready) begin
      locked <= !m_beat.last;
      if (!locked) sel_q <= sel;
    end
  end

endmodule
