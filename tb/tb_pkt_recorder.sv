// tb_pkt_recorder: self-checking test of the frame-event recorder.
//
// Random frame events arrive on all ports (never more often than one per
// 8 cycles per port, the shortest frame) while the collection link applies
// random backpressure. Every record frame is decoded and checked: header
// addresses, EtherType, record count, one beat per record, last flag. Every
// record must match the next event the test sent on that port (class,
// path, tag flag), and the difference of any two timestamps must equal the
// number of cycles between the two events. A burst followed by silence
// checks that a partial frame is flushed FLUSH_CYCLES after the records
// begin waiting, and all ports firing every cycle must raise `lost`.
module tb_pkt_recorder;
  import reactor_pkg::*;

  localparam int RPF   = 4;
  localparam int FLUSH = 50;
  localparam logic [47:0] DST = 48'h02_11_22_33_44_55;
  localparam logic [47:0] SRC = 48'h02_66_77_88_99_AA;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N_PORTS-1:0] ev_valid;
  frame_event_t       ev [N_PORTS];
  beat_t              m_beat;
  logic               m_valid, m_ready, lost;
  logic [TS_W-1:0]    timestamp;

  pkt_recorder #(.REC_FIFO_DEPTH(64), .RECS_PER_FRAME(RPF), .FLUSH_CYCLES(FLUSH),
                 .DST_MAC(DST), .SRC_MAC(SRC), .ETHERTYPE(16'h88B5)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s at %0t", msg, $time);
    end
  endtask

  typedef struct { longint cyc; frame_event_t e; } sent_t;
  sent_t   sent_q [N_PORTS][$];
  longint  cyc = 0;
  longint  ts_off;
  bit      have_off = 0;
  int      n_recs = 0, n_frames = 0, n_short = 0, n_lost = 0, n_sent = 0;
  int      gap [N_PORTS];
  bit      gen = 1, flood = 0, rand_ready = 1;
  int      force_p = -1;
  bit      flooded = 0;   // record matching ends with the overrun phase
  beat_t   fr [$];
  longint  last_ev_cyc = 0, last_sof_cyc = 0;

  always @(negedge clk) begin
    m_ready = rand_ready ? ($urandom_range(0, 3) != 0) : 1'b1;
    for (int p = 0; p < N_PORTS; p++) begin
      ev_valid[p] = 1'b0;
      if (flood || force_p == p) ev_valid[p] = 1'b1;
      else if (gen && gap[p] >= 8 && $urandom_range(0, 9) == 0) ev_valid[p] = 1'b1;
      ev[p].vlan = 1'($urandom);
      ev[p].cls  = 3'($urandom);
      ev[p].path = path_e'($urandom_range(0, 1));
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (lost) n_lost++;
      for (int p = 0; p < N_PORTS; p++) begin
        gap[p]++;
        if (ev_valid[p]) begin
          if (!flood) sent_q[p].push_back('{cyc: cyc, e: ev[p]});
          gap[p] = 0;
          n_sent++;
          last_ev_cyc = cyc;
        end
      end
      if (m_valid && m_ready) begin
        if (fr.size() == 0) last_sof_cyc = cyc;
        fr.push_back(m_beat);
        if (m_beat.last) check_frame();
      end
      cyc++;
    end
  end

  task automatic check_frame();
    logic [47:0] da, sa;
    logic [15:0] et, cnt;
    for (int b = 0; b < 6; b++) da[8*(5-b) +: 8] = fr[0].data[8*b +: 8];
    sa[47:40] = fr[0].data[55:48];
    sa[39:32] = fr[0].data[63:56];
    for (int b = 0; b < 4; b++) sa[8*(3-b) +: 8] = fr[1].data[8*b +: 8];
    et  = {fr[1].data[39:32], fr[1].data[47:40]};
    cnt = {fr[1].data[55:48], fr[1].data[63:56]};
    chk(da == DST && sa == SRC && et == 16'h88B5, "record frame header");
    chk(int'(cnt) >= 1 && int'(cnt) <= RPF && fr.size() == 2 + int'(cnt), "record count");
    if (int'(cnt) < RPF) n_short++;
    for (int i = 2; i < fr.size(); i++) begin
      logic [63:0] r;
      int p;
      for (int b = 0; b < 8; b++) r[8*(7-b) +: 8] = fr[i].data[8*b +: 8];
      p = int'(r[15:12]);
      chk(fr[i].keep == 8'hFF, "record beat full");
      if (!flooded && p < N_PORTS && sent_q[p].size() > 0) begin
        sent_t s;
        s = sent_q[p].pop_front();
        chk(r[11:9] == s.e.cls && r[8] == (s.e.path == PATH_CIRCUIT) && r[7] == s.e.vlan && r[6:0] == 0,
            "record fields");
        if (!have_off) begin
          ts_off   = longint'(r[63:16]) - s.cyc;
          have_off = 1;
        end
        chk(longint'(r[63:16]) - s.cyc == ts_off, "timestamp matches event cycle");
      end else if (!flooded) chk(0, "record without event");
      n_recs++;
    end
    fr.delete();
    n_frames++;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < N_PORTS; p++) gap[p] = 8;
    ev_valid = '0; m_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: random events, random backpressure
    repeat (20000) @(posedge clk);
    gen = 0;
    repeat (2000) @(posedge clk);
    for (int p = 0; p < N_PORTS; p++) chk(sent_q[p].size() == 0, "every event recorded");
    chk(n_recs == n_sent && n_lost == 0, "no record lost at frame rate");
    $display("phase 1: %0d records in %0d frames", n_recs, n_frames);
    // phase 2: three events then silence: flushed as a short frame
    rand_ready = 0;
    @(posedge clk);
    #1;
    for (int i = 0; i < 3; i++) begin
      force_event(i);
      repeat (10) @(posedge clk);
    end
    begin
      int sh;
      sh = n_short;
      repeat (FLUSH + 100) @(posedge clk);
      chk(n_short == sh + 1, "partial frame flushed");
      chk(last_sof_cyc - last_ev_cyc <= 10 + FLUSH + 4 && last_sof_cyc > last_ev_cyc, "flush delay");
    end
    for (int p = 0; p < N_PORTS; p++) chk(sent_q[p].size() == 0, "flushed records");
    // phase 3: every port fires every cycle: records are lost and reported
    flood = 1;
    flooded = 1;
    repeat (20) @(posedge clk);
    flood = 0;
    repeat (FLUSH + 200) @(posedge clk);
    chk(n_lost > 0, "lost reported on overrun");
    $display("phase 3: %0d lost", n_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic force_event(input int i);
    // one event on port i % N_PORTS at the next falling edge
    force_p = i % N_PORTS;
    @(posedge clk);
    #1 force_p = -1;
  endtask

endmodule
