// tb_downlink_mux: self-checking test of the downward-port multiplexer.
//
// Four sources feed the multiplexer: PFC frames, OCS frames, rack-local
// frames and slow EPS frames (idle 85 % of cycles, a 1 Gb/s-like link).
// Phase 1, with random host-side backpressure, checks that every frame
// comes out whole, unchanged and in order per source, and that every frame
// start goes to the highest-priority source holding a complete frame
// (PFC > OCS > local > EPS). Phase 2, with the host always ready, checks
// that a PFC frame waits at most one maximum-size frame. Phase 3 stops the
// host link so that the small FIFOs overflow, and checks that dropped
// frames vanish whole while the rest still arrive intact.
module tb_downlink_mux;
  import reactor_pkg::*;
  import tb_frames_pkg::*;

  localparam int MAXB = 1518;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  beat_t       pfc_beat, ocs_beat, loc_beat, eps_beat, m_beat;
  logic        pfc_valid, ocs_valid, loc_valid, eps_valid, m_valid;
  logic        pfc_ready, ocs_ready, loc_ready, eps_ready, m_ready;
  logic        sof;
  logic [1:0]  sof_src;
  logic [2:0]  drop;

  downlink_mux #(.CIRC_FIFO_DEPTH(512), .EPS_FIFO_DEPTH(512)) dut (.*);

  tb_stream_src s_pfc (.clk, .rst_n, .beat(pfc_beat), .valid(pfc_valid), .ready(pfc_ready));
  tb_stream_src s_ocs (.clk, .rst_n, .beat(ocs_beat), .valid(ocs_valid), .ready(ocs_ready));
  tb_stream_src s_loc (.clk, .rst_n, .beat(loc_beat), .valid(loc_valid), .ready(loc_ready));
  tb_stream_src s_eps (.clk, .rst_n, .beat(eps_beat), .valid(eps_valid), .ready(eps_ready));

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s at %0t", msg, $time);
    end
  endtask

  beat_q_t exp [4][$];     // frames expected per source, in order
  beat_q_t got;
  int      got_src;
  int      n_out = 0;
  int      n_src [4] = '{0, 0, 0, 0};
  int      avail [4] = '{0, 0, 0, 0};  // complete frames held per source (model)
  int      n_drop = 0;
  bit      prio_check = 1;
  bit      rand_ready = 1;
  bit      host_stop  = 0;
  int      pfc_wait = 0, pfc_wait_max = 0;
  int      dropped_in [4];

  always @(negedge clk) m_ready = host_stop ? 1'b0 : rand_ready ? ($urandom_range(0, 9) != 0) : 1'b1;

  // model of complete frames stored in each FIFO
  always @(posedge clk) begin
    if (rst_n) begin
      if (ocs_valid && ocs_ready && ocs_beat.last) avail[1] <= avail[1] + 1;
      if (loc_valid && loc_ready && loc_beat.last) avail[2] <= avail[2] + 1;
      if (eps_valid && eps_ready && eps_beat.last) avail[3] <= avail[3] + 1;
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (pfc_valid && !(sof && sof_src == 2'd0)) pfc_wait <= pfc_wait + 1;
      else pfc_wait <= 0;
      if (pfc_wait > pfc_wait_max) pfc_wait_max = pfc_wait;
      for (int s = 0; s < 3; s++) if (drop[s]) n_drop++;
      if (sof) begin
        got_src = sof_src;
        if (prio_check) begin
          if (sof_src >= 1) chk(!pfc_valid, "PFC first");
          for (int h = 1; h < 4; h++) if (h < int'(sof_src)) chk(avail[h] == 0, "priority order");
        end
      end
      if (m_valid && m_ready) begin
        got.push_back(m_beat);
        if (m_beat.last) begin
          chk(exp[got_src].size() > 0 && same_frame(got, exp[got_src][0]), "frame content and order");
          if (exp[got_src].size() > 0) void'(exp[got_src].pop_front());
          if (got_src >= 1) avail[got_src] <= avail[got_src] - 1;
          got.delete();
          n_out++;
          n_src[got_src]++;
        end
      end
    end
  end

  task automatic add(input int src, input int n, input int minb, input int maxb);
    for (int i = 0; i < n; i++) begin
      beat_q_t f;
      f = build_frame(src, src, 1'b1, $urandom_range(minb, maxb), i);
      exp[src].push_back(f);
      case (src)
        0: s_pfc.push(f);
        1: s_ocs.push(f);
        2: s_loc.push(f);
        default: s_eps.push(f);
      endcase
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired: out %0d drops %0d queued %0d nf %0d wp %0d rp %0d lk %0d m %0d%0d", n_out, n_drop, s_eps.queued(), dut.u_eps_fifo.n_frames, dut.u_eps_fifo.wr_ptr, dut.u_eps_fifo.rd_ptr, dut.locked, m_valid, m_ready);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    s_eps.gap_pct = 85;
    s_ocs.gap_pct = 60;
    s_loc.gap_pct = 80;
    s_pfc.gap_pct = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // phase 1: all sources, random backpressure, priority checked
    add(1, 60, 64, MAXB);
    add(2, 30, 64, 800);
    add(3, 60, 64, 600);
    for (int i = 0; i < 20; i++) begin
      add(0, 1, 60, 60);
      repeat ($urandom_range(200, 2000)) @(posedge clk);
    end
    wait (n_out == 170);
    repeat (10) @(posedge clk);
    for (int s = 0; s < 4; s++) chk(exp[s].size() == 0, "all frames delivered");
    chk(n_src[0] == 20 && n_src[1] == 60 && n_src[2] == 30 && n_src[3] == 60, "per-source counts");
    chk(n_drop == 0, "no drops without overload");

    // phase 2: host always ready, PFC wait bounded by one frame
    rand_ready = 0;
    pfc_wait_max = 0;
    add(1, 40, 1000, MAXB);
    for (int i = 0; i < 15; i++) begin
      repeat ($urandom_range(50, 400)) @(posedge clk);
      add(0, 1, 60, 60);
    end
    wait (n_out == 225);
    repeat (10) @(posedge clk);
    chk(pfc_wait_max <= (MAXB + 7) / 8 + 2, "PFC waits at most one frame");
    $display("phase 2: longest PFC wait %0d cycles", pfc_wait_max);

    // phase 3: host stopped, FIFOs overflow and drop whole frames
    prio_check = 0;
    host_stop  = 1;
    s_eps.gap_pct = 0;
    total = n_out;
    for (int i = 0; i < 8; i++) begin
      beat_q_t f;
      f = build_frame(3, 3, 1'b1, 1000, 500 + i);   // 125 beats each, FIFO holds 4
      s_eps.push(f);
      if (i < 4) exp[3].push_back(f);
    end
    while (s_eps.queued() != 0) @(posedge clk);
    repeat (20) @(posedge clk);
    chk(n_drop == 4, "four frames dropped on overflow");
    host_stop = 0;
    wait (n_out == total + 4);
    repeat (300) @(posedge clk);
    chk(n_out == total + 4, "only the stored frames leave");
    chk(exp[3].size() == 0, "stored frames intact");
    $display("phase 3: %0d frames dropped", n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
