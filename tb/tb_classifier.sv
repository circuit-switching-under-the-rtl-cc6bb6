// tb_classifier: self-checking test of the input classifier.
//
// Sends random frames (tagged and untagged, every class, 64..400 bytes)
// while the circuit setting changes at random, also in mid-frame, and both
// outputs apply random backpressure. A monitor takes each frame's verdict
// from the circuit setting at the cycle the frame's event is reported and
// checks that the verdict follows the class rule, that every beat of the
// frame comes out intact and in order on that one output, and that nothing
// appears on the other. A second phase checks one beat per cycle throughput
// and the one-beat latency with no backpressure.
module tb_classifier;
  import reactor_pkg::*;
  import tb_frames_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               circ_en;
  logic [CLASS_W-1:0] circ_cls;
  beat_t              s_beat, c_beat, e_beat;
  logic               s_valid, s_ready, c_valid, c_ready, e_valid, e_ready;
  logic               ev_valid;
  frame_event_t       ev;

  classifier dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s at %0t", msg, $time);
    end
  endtask

  // frames sent, with what the test knows about them
  beat_q_t frames [$];
  int      f_cls  [$];
  bit      f_vlan [$];
  // expected frames per output, filled at verdict time
  beat_q_t exp_c [$], exp_e [$];
  beat_q_t got_c, got_e;
  int      n_frames_out = 0, n_circuit = 0, n_eps = 0;
  int      ev_idx = 0;

  // driver state
  beat_q_t cur;
  int      fi = 0, bi = 0;
  bit      fire;
  bit      gaps = 1;
  bit      bp   = 1;
  bit      wiggle = 1;

  always @(posedge clk) fire <= s_valid && s_ready;

  always @(negedge clk) begin
    if (rst_n) begin
      if (fire) begin
        bi++;
        if (bi == frames[fi].size()) begin
          fi++;
          bi = 0;
        end
      end
      if (fi < frames.size() && (!gaps || $urandom_range(0, 3) != 0)) begin
        s_beat  = frames[fi][bi];
        s_valid = 1'b1;
      end else begin
        s_valid = 1'b0;
      end
      c_ready = bp ? ($urandom_range(0, 3) != 0) : 1'b1;
      e_ready = bp ? ($urandom_range(0, 3) != 0) : 1'b1;
      if (wiggle && $urandom_range(0, 15) == 0) begin
        circ_en  = $urandom_range(0, 3) != 0;
        circ_cls = CLASS_W'($urandom_range(0, 7));
      end
    end
  end

  // monitor
  always @(posedge clk) begin
    if (rst_n) begin
      if (ev_valid) begin
        bit exp_circ;
        exp_circ = circ_en && f_vlan[ev_idx] && (f_cls[ev_idx] == int'(circ_cls))
                   && (f_cls[ev_idx] != int'(EPS_CLASS));
        chk(ev.path == (exp_circ ? PATH_CIRCUIT : PATH_EPS), "verdict");
        chk(ev.vlan == f_vlan[ev_idx], "tag detection");
        chk(int'(ev.cls) == (f_vlan[ev_idx] ? f_cls[ev_idx] : int'(EPS_CLASS)), "class");
        if (exp_circ) exp_c.push_back(frames[ev_idx]);
        else          exp_e.push_back(frames[ev_idx]);
        ev_idx++;
      end
      if (c_valid && c_ready) begin
        got_c.push_back(c_beat);
        if (c_beat.last) begin
          chk(exp_c.size() > 0 && same_frame(got_c, exp_c[0]), "circuit frame content");
          if (exp_c.size() > 0) void'(exp_c.pop_front());
          got_c.delete();
          n_frames_out++;
          n_circuit++;
        end
      end
      if (e_valid && e_ready) begin
        got_e.push_back(e_beat);
        if (e_beat.last) begin
          chk(exp_e.size() > 0 && same_frame(got_e, exp_e[0]), "EPS frame content");
          if (exp_e.size() > 0) void'(exp_e.pop_front());
          got_e.delete();
          n_frames_out++;
          n_eps++;
        end
      end
      if (c_valid && e_valid) chk(0, "both outputs valid");
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total_beats;
    longint t0, t_first_out, t_last_out;
    s_valid = 0; s_beat = '0; c_ready = 1; e_ready = 1; circ_en = 1; circ_cls = 3'd2;
    for (int i = 0; i < 600; i++) begin
      int cls;
      bit vlan;
      cls  = $urandom_range(0, 7);
      vlan = $urandom_range(0, 4) != 0;
      frames.push_back(build_frame(0, cls, vlan, $urandom_range(64, 400), i));
      f_cls.push_back(cls);
      f_vlan.push_back(vlan);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (n_frames_out == 600);
    repeat (5) @(posedge clk);
    chk(exp_c.size() == 0 && exp_e.size() == 0, "all frames delivered");
    chk(n_circuit > 20 && n_eps > 20, "both paths used");
    $display("phase 1: %0d circuit, %0d EPS frames", n_circuit, n_eps);

    // phase 2: throughput and latency, no gaps or backpressure, fixed setting
    @(negedge clk);
    gaps = 0; bp = 0; wiggle = 0; circ_en = 1; circ_cls = 3'd4;
    total_beats = 0;
    for (int i = 0; i < 20; i++) begin
      beat_q_t f;
      f = build_frame(0, ((i % 2) != 0) ? 4 : 1, 1'b1, 64 + 40 * i, 1000 + i);
      frames.push_back(f);
      f_cls.push_back(((i % 2) != 0) ? 4 : 1);
      f_vlan.push_back(1'b1);
      total_beats += f.size();
    end
    t0 = $time;
    @(posedge clk iff (c_valid || e_valid));
    t_first_out = $time;
    wait (n_frames_out == 620);
    t_last_out = $time;
    chk((t_first_out - t0) <= 20, "one-beat latency");
    chk((t_last_out - t_first_out) / 10 <= longint'(total_beats) + 1, "one beat per cycle");
    $display("phase 2: %0d beats in %0d cycles", total_beats, (t_last_out - t_first_out) / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
