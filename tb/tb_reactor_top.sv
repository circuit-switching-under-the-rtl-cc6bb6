// tb_reactor_top: end-to-end test of a four-port REACToR at full size.
//
// The switch runs with every parameter at its default (30 us circuit
// reconfiguration, 1 us pause lead, full FIFO depths). Around it:
//   - four tb_host models that queue per destination, start with their
//     circuit classes paused and obey the PFC frames they receive;
//   - an OCS model that connects circuit uplink k to downward uplink
//     perm(k) from the permutation in ocs_cfg. After a reconfiguration
//     pulse it keeps the old light paths for DELTA/2 cycles (so frames that
//     overlap the end of a slot drain), then is dark until DELTA; any beat
//     sent into it while dark is a failure;
//   - an EPS model that queues frames by destination and delivers them at
//     about a tenth of the line rate.
// The schedule has three configurations (two circuit rotations, and one
// with a rack-local route and a port whose circuit has no route); after
// two periods a second, two-configuration schedule is committed and must
// take over at the next period boundary.
//
// Every data frame a host receives must be one that was sent, to that
// host, unchanged; at the end every sent frame must be delivered, dropped
// on FIFO overflow or discarded as unrouted. The number of records in the
// record frames must equal the number of frames that entered. The
// mechanisms counted, each of which must happen at least once, are listed
// in `mech_names`. Unpause frames must reach a host no sooner than DELTA
// cycles after the OCS was told to reconfigure.
module tb_reactor_top;
  import reactor_pkg::*;
  import tb_frames_pkg::*;

  localparam int DELTA = 4688;
  localparam int IW    = $clog2(8);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                    run;
  beat_t                   host_rx_beat [N_PORTS], host_tx_beat [N_PORTS];
  logic      [N_PORTS-1:0] host_rx_valid, host_rx_ready, host_tx_valid, host_tx_ready;
  beat_t                   cup_tx_beat [N_PORTS], cup_rx_beat [N_PORTS];
  logic      [N_PORTS-1:0] cup_tx_valid, cup_tx_ready, cup_rx_valid, cup_rx_ready;
  beat_t                   eup_tx_beat [N_PORTS], eup_rx_beat [N_PORTS];
  logic      [N_PORTS-1:0] eup_tx_valid, eup_tx_ready, eup_rx_valid, eup_rx_ready;
  logic [OCS_CFG_W-1:0]    ocs_cfg;
  logic                    ocs_reconfig;
  logic                    sched_wr_en, sched_wr_commit, sched_pending, sched_swapped;
  logic [IW-1:0]           sched_wr_idx;
  logic [IW:0]             sched_wr_num;
  sched_entry_t            sched_wr_entry;
  beat_t                   rec_beat;
  logic                    rec_valid, rec_ready;
  phase_e                  phase;
  logic                    period_start, slot_start;
  logic      [N_PORTS-1:0] tx_sof;
  logic      [1:0]         tx_sof_src [N_PORTS];
  logic      [2:0]         tx_drop    [N_PORTS];
  logic      [N_PORTS-1:0] xbar_unrouted;
  logic                    xbar_conflict;
  logic                    rec_lost;
  logic      [N_PORTS-1:0] pfc_busy;
  logic      [N_PORTS-1:0] ev_valid;
  frame_event_t            ev [N_PORTS];
  logic [TS_W-1:0]         timestamp;

  reactor_top dut (.*);

  // hosts: host 2 reacts late, so its circuit frames overrun the slot
  tb_host #(.ID(0), .REACT(156)) h0 (.clk, .rst_n, .tx_beat(host_rx_beat[0]), .tx_valid(host_rx_valid[0]),
    .tx_ready(host_rx_ready[0]), .rx_beat(host_tx_beat[0]), .rx_valid(host_tx_valid[0]), .rx_ready(host_tx_ready[0]));
  tb_host #(.ID(1), .REACT(156)) h1 (.clk, .rst_n, .tx_beat(host_rx_beat[1]), .tx_valid(host_rx_valid[1]),
    .tx_ready(host_rx_ready[1]), .rx_beat(host_tx_beat[1]), .rx_valid(host_tx_valid[1]), .rx_ready(host_tx_ready[1]));
  tb_host #(.ID(2), .REACT(600)) h2 (.clk, .rst_n, .tx_beat(host_rx_beat[2]), .tx_valid(host_rx_valid[2]),
    .tx_ready(host_rx_ready[2]), .rx_beat(host_tx_beat[2]), .rx_valid(host_tx_valid[2]), .rx_ready(host_tx_ready[2]));
  tb_host #(.ID(3), .REACT(156)) h3 (.clk, .rst_n, .tx_beat(host_rx_beat[3]), .tx_valid(host_rx_valid[3]),
    .tx_ready(host_rx_ready[3]), .rx_beat(host_tx_beat[3]), .rx_valid(host_tx_valid[3]), .rx_ready(host_tx_ready[3]));

  // EPS model: one paced source per destination
  beat_q_t eps_q [N_PORTS][$];
  for (genvar d = 0; d < N_PORTS; d++) begin : g_eps
    tb_stream_src u_src (.clk, .rst_n, .beat(eup_rx_beat[d]), .valid(eup_rx_valid[d]), .ready(eup_rx_ready[d]));
    always @(negedge clk) while (eps_q[d].size() > 0) u_src.push(eps_q[d].pop_front());
  end

  // a PFC frame waiting while its multiplexer sends another frame
  logic [N_PORTS-1:0] pfc_wait;
  for (genvar p = 0; p < N_PORTS; p++) begin : g_wait
    assign pfc_wait[p] = dut.pfc_valid[p] && dut.g_port[p].u_mux.locked && dut.g_port[p].u_mux.sel_q != 2'd0;
  end

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s at %0t", msg, $time);
    end
  endtask

  // mechanisms
  typedef enum int {
    M_CIRCUIT, M_EPS, M_LOCAL, M_PAUSE, M_UNPAUSE, M_RECONFIG, M_SWAP, M_RECORD,
    M_DROP, M_PFC_WAIT, M_UNROUTED, M_SHUNT, M_N
  } mech_e;
  int    mech [M_N];
  string mech_names [M_N] = '{"circuit delivery", "EPS delivery", "rack-local delivery",
    "PFC pause", "PFC unpause", "OCS reconfiguration", "schedule swap", "record frame",
    "FIFO overflow drop", "PFC waiting behind a frame", "unrouted circuit frame",
    "circuit-class frame sent to EPS"};

  // scoreboard
  beat_q_t sent [longint];
  beat_q_t in_fr [N_PORTS], out_fr [N_PORTS], eps_fr [N_PORTS];
  int      n_in = 0, n_data_out = 0, n_dropped = 0, n_unrouted = 0, n_records = 0;
  int      src_of_out [N_PORTS];
  longint  cyc = 0, last_reconfig = -100000;
  int      n_lit_unpause_early = 0;

  function automatic logic [7:0] byte_at(input beat_q_t f, input int i);
    return f[i / 8].data[8*(i % 8) +: 8];
  endfunction

  function automatic longint key_of(input beat_q_t f);
    return (longint'(f[1].data[31:24]) << 32) | longint'({f[2].data[31:24], f[2].data[39:32], f[2].data[47:40]});
  endfunction

  // OCS model
  int     perm [N_PORTS], next_perm [N_PORTS];
  longint ocs_t = -100000;
  bit     ocs_dark;
  assign cup_tx_ready = '1;
  always @(posedge clk) begin
    if (ocs_reconfig) begin
      ocs_t = cyc;
      for (int k = 0; k < N_PORTS; k++) next_perm[k] = int'(ocs_cfg[OCS_IDX_W*k +: OCS_IDX_W]);
    end
    if (cyc - ocs_t == DELTA / 2) perm = next_perm;
    ocs_dark = (cyc - ocs_t >= DELTA / 2) && (cyc - ocs_t < DELTA);
  end
  always @(posedge clk) begin
    for (int k = 0; k < N_PORTS; k++) begin
      cup_rx_valid[k] <= 1'b0;
      cup_rx_beat[k]  <= '0;
    end
    for (int k = 0; k < N_PORTS; k++) begin
      if (cup_tx_valid[k]) begin
        chk(!ocs_dark, "no beat into a dark circuit");
        if (perm[k] < N_PORTS) begin
          cup_rx_valid[perm[k]] <= 1'b1;
          cup_rx_beat[perm[k]]  <= cup_tx_beat[k];
        end
      end
    end
  end

  assign eup_tx_ready = '1;
  assign rec_ready    = 1'b1;

  // monitors
  always @(posedge clk) begin
    if (rst_n) begin
      if (ocs_reconfig) begin
        mech[M_RECONFIG]++;
        last_reconfig = cyc;
      end
      if (sched_swapped) mech[M_SWAP]++;
      for (int p = 0; p < N_PORTS; p++) begin
        if (xbar_unrouted[p]) n_unrouted++;
        for (int s = 0; s < 3; s++) if (tx_drop[p][s]) n_dropped++;
        if (pfc_wait[p]) mech[M_PFC_WAIT]++;
        if (ev_valid[p] && ev[p].path == PATH_EPS && ev[p].vlan && ev[p].cls != EPS_CLASS)
          mech[M_SHUNT]++;
        if (ev_valid[p]) n_in++;
        // frames entering
        if (host_rx_valid[p] && host_rx_ready[p]) begin
          in_fr[p].push_back(host_rx_beat[p]);
          if (host_rx_beat[p].last) begin
            sent[key_of(in_fr[p])] = in_fr[p];
            in_fr[p].delete();
          end
        end
        // EPS model: collect whole frames, queue them for their destination
        if (eup_tx_valid[p]) begin
          eps_fr[p].push_back(eup_tx_beat[p]);
          if (eup_tx_beat[p].last) begin
            int d;
            d = int'(eps_fr[p][0].data[47:40]);
            if (d < N_PORTS) eps_q[d].push_back(eps_fr[p]);
            eps_fr[p].delete();
          end
        end
        // frames leaving towards the hosts
        if (tx_sof[p]) src_of_out[p] = int'(tx_sof_src[p]);
        if (host_tx_valid[p] && host_tx_ready[p]) begin
          out_fr[p].push_back(host_tx_beat[p]);
          if (host_tx_beat[p].last) begin
            if (src_of_out[p] == 0) begin
              logic [7:0] en;
              bit any_nz;
              en = byte_at(out_fr[p], 17);
              chk(byte_at(out_fr[p], 12) == 8'h88 && byte_at(out_fr[p], 13) == 8'h08, "PFC frame from PFC source");
              any_nz = 0;
              for (int c = 0; c < 8; c++)
                if (en[c] && {byte_at(out_fr[p], 18 + 2*c), byte_at(out_fr[p], 19 + 2*c)} != 16'h0) any_nz = 1;
              if (any_nz) mech[M_PAUSE]++;
              else begin
                mech[M_UNPAUSE]++;
                chk(cyc - last_reconfig >= DELTA, "unpause only after the reconfiguration delay");
              end
            end else begin
              longint k;
              k = key_of(out_fr[p]);
              chk(int'(out_fr[p][0].data[47:40]) == p, "frame reaches its destination host");
              chk(sent.exists(k) && same_frame(sent[k], out_fr[p]), "frame delivered unchanged");
              if (sent.exists(k)) sent.delete(k);
              n_data_out++;
              case (src_of_out[p])
                1: mech[M_CIRCUIT]++;
                2: mech[M_LOCAL]++;
                default: mech[M_EPS]++;
              endcase
            end
            out_fr[p].delete();
          end
        end
      end
      if (rec_valid && rec_ready && rec_beat.last) mech[M_RECORD]++;
      cyc++;
    end
  end

  // record frames: add up the record counts
  beat_q_t rec_fr;
  always @(posedge clk) begin
    if (rst_n && rec_valid && rec_ready) begin
      rec_fr.push_back(rec_beat);
      if (rec_beat.last) begin
        n_records += int'({rec_fr[1].data[55:48], rec_fr[1].data[63:56]});
        rec_fr.delete();
      end
    end
  end

  // schedule entries: perm[] maps source host to destination host
  function automatic sched_entry_t rotation(input int dur, input int sh);
    sched_entry_t e;
    e = '0;
    e.duration = 32'(dur);
    for (int k = 0; k < OCS_PORTS; k++) e.ocs_cfg[OCS_IDX_W*k +: OCS_IDX_W] = OCS_IDX_W'(k);
    for (int s = 0; s < N_PORTS; s++) begin
      int d;
      d = (s + sh) % N_PORTS;
      e.ocs_cfg[OCS_IDX_W*s +: OCS_IDX_W] = OCS_IDX_W'(d);
      e.port[s] = '{valid: 1'b1, cls: 3'(d), route: ROUTE_UPLINK, idx: PORT_W'(s)};
    end
    return e;
  endfunction

  task automatic write_sched(input sched_entry_t es [], input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      sched_wr_en = 1; sched_wr_idx = IW'(i); sched_wr_entry = es[i];
      @(negedge clk);
      sched_wr_en = 0;
    end
    @(negedge clk);
    sched_wr_commit = 1; sched_wr_num = (IW+1)'(n);
    @(negedge clk);
    sched_wr_commit = 0;
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sched_entry_t a [], b [];
    int swaps0;
    run = 0; sched_wr_en = 0; sched_wr_commit = 0; sched_wr_idx = 0; sched_wr_num = 0;
    sched_wr_entry = '0;
    for (int k = 0; k < N_PORTS; k++) begin
      perm[k] = k; next_perm[k] = k;
    end
    g_eps[0].u_src.gap_pct = 90; g_eps[1].u_src.gap_pct = 90;
    g_eps[2].u_src.gap_pct = 90; g_eps[3].u_src.gap_pct = 90;
    for (int m = 0; m < M_N; m++) mech[m] = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;

    // schedule A: two rotations, then one slot with a local route and an
    // unrouted circuit
    a = new[3];
    a[0] = rotation(9000, 1);
    a[1] = rotation(8000, 2);
    a[2] = rotation(7000, 3);
    a[2].port[1] = '{valid: 1'b1, cls: 3'd0, route: ROUTE_LOCAL, idx: PORT_W'(0)};
    a[2].port[3] = '{valid: 1'b1, cls: 3'd2, route: ROUTE_NONE, idx: PORT_W'(0)};
    write_sched(a, 3);
    repeat (5) @(posedge clk);
    @(negedge clk);
    run = 1;

    // stall host 1 in the first slot, where host 0 sends to it: FIFO drops
    repeat (DELTA + 500) @(posedge clk);
    h1.stall = 1;
    repeat (2000) @(posedge clk);
    h1.stall = 0;

    // during the second period, commit schedule B
    while (mech[M_RECONFIG] < 5) @(posedge clk);
    b = new[2];
    b[0] = rotation(10000, 3);
    b[1] = rotation(10000, 1);
    swaps0 = mech[M_SWAP];
    write_sched(b, 2);
    while (mech[M_RECONFIG] < 7) @(posedge clk);
    repeat (3) @(posedge clk);
    chk(mech[M_SWAP] == swaps0 + 1, "new schedule applied at the period boundary");
    chk(dut.u_ctrl.cur[0].cls == 3'd3, "first slot of the new schedule");
    while (mech[M_RECONFIG] < 9) @(posedge clk);

    // stop at the end of this period and let everything drain
    @(negedge clk);
    run = 0;
    while (phase != PH_IDLE) @(posedge clk);
    for (int p = 0; p < N_PORTS; p++) begin
      h0.enable = 0; h1.enable = 0; h2.enable = 0; h3.enable = 0;
    end
    repeat (30000) @(posedge clk);

    chk(sent.size() == n_dropped + n_unrouted, "every frame delivered, dropped or unrouted");
    chk(n_records == n_in, "one record per frame");
    mech[M_UNROUTED] = n_unrouted;
    mech[M_DROP]     = n_dropped;
    $display("frames in %0d, delivered %0d, dropped %0d, unrouted %0d, records %0d",
             n_in, n_data_out, n_dropped, n_unrouted, n_records);
    for (int m = 0; m < M_N; m++) begin
      $display("  %-34s %0d", mech_names[m], mech[m]);
      chk(mech[m] > 0, "mechanism exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
