// tb_host: behavioural model of an end host with a PFC-capable NIC.
//
// The host keeps one queue per destination and traffic class and sends at
// line rate. Classes 0..N_PORTS-1 are the circuit classes: class c carries
// traffic for host c. Class 7 is the packet-switched class; its frames go
// to a random other host, a few at a time (rate set by eps_gap). The host
// starts with every circuit class paused, and obeys 802.1Qbb PFC frames it
// receives: REACT cycles after a PFC frame has fully arrived, each class
// whose enable bit is set is paused (time non-zero) or unpaused (time
// zero). Pause timers do not expire in this model. A frame in progress is
// always finished. Received data frames are left to the testbench; the
// host only counts the PFC frames. `stall` holds the receive side not
// ready, to create backpressure.
//
// Frames are tagged, carry the destination host in destination address
// byte 5, the source in source address byte 5, and a per-host sequence
// number in bytes 19..21 (see tb_frames_pkg).
module tb_host
  import reactor_pkg::*;
  import tb_frames_pkg::*;
#(
  parameter int ID    = 0,
  parameter int REACT = 156
) (
  input  logic  clk,
  input  logic  rst_n,
  output beat_t tx_beat,
  output logic  tx_valid,
  input  logic  tx_ready,
  input  beat_t rx_beat,
  input  logic  rx_valid,
  output logic  rx_ready
);

  bit      paused [N_CLASSES];
  bit      stall      = 0;
  bit      enable     = 1;
  int      eps_gap    = 400;   // mean idle cycles between packet-switched frames
  int      max_bytes  = 1518;
  int      seq        = 0;
  int      n_sent     = 0;
  int      n_pause_rx = 0, n_unpause_rx = 0;
  int      n_circ_sent = 0, n_eps_sent = 0;
  beat_q_t cur;
  int      bi   = 0;
  bit      busy = 0;
  bit      fire = 0;

  // PFC updates waiting for the reaction time
  typedef struct { longint at; logic [7:0] en; logic [7:0] nz; } upd_t;
  upd_t    upd_q [$];
  longint  cyc = 0;
  beat_t   rx_fr [$];

  initial begin
    for (int c = 0; c < N_CLASSES; c++) paused[c] = (c != int'(EPS_CLASS));
    tx_valid = 0;
    tx_beat  = '0;
    rx_ready = 1;
  end

  always @(posedge clk) begin
    cyc++;
    fire <= tx_valid && tx_ready;
    while (upd_q.size() > 0 && upd_q[0].at <= cyc) begin
      for (int c = 0; c < N_CLASSES; c++)
        if (upd_q[0].en[c]) paused[c] = upd_q[0].nz[c];
      void'(upd_q.pop_front());
    end
    if (rx_valid && rx_ready) begin
      rx_fr.push_back(rx_beat);
      if (rx_beat.last) begin
        // PFC: EtherType 0x8808 in bytes 12..13, opcode 0x0101
        if (rx_fr[1].data[39:32] == 8'h88 && rx_fr[1].data[47:40] == 8'h08) begin
          byte unsigned b [64];
          upd_t u;
          int n;
          n = 0;
          foreach (rx_fr[i]) for (int k = 0; k < 8; k++) if (n < 64) begin
            b[n] = rx_fr[i].data[8*k +: 8];
            n++;
          end
          u.at = cyc + REACT;
          u.en = b[17];
          for (int c = 0; c < 8; c++) u.nz[c] = {b[18+2*c], b[19+2*c]} != 16'h0;
          if ((u.en & u.nz) != 0) n_pause_rx++;
          if ((u.en & ~u.nz) != 0) n_unpause_rx++;
          upd_q.push_back(u);
        end
        rx_fr.delete();
      end
    end
  end

  function automatic beat_q_t next_frame();
    beat_q_t f;
    int      c;
    c = -1;
    // a circuit class that is not paused, starting at a random one
    begin
      int c0;
      c0 = $urandom_range(0, N_PORTS - 1);
      for (int k = 0; k < N_PORTS; k++) begin
        int cc;
        cc = (c0 + k) % N_PORTS;
        if (c < 0 && cc != ID && !paused[cc]) c = cc;
      end
    end
    if (c >= 0) begin
      f = build_frame(ID, c, 1'b1, $urandom_range(64, max_bytes), seq);
      n_circ_sent++;
    end else if ($urandom_range(0, eps_gap) == 0) begin
      int d;
      d = (ID + $urandom_range(1, N_PORTS - 1)) % N_PORTS;
      f = build_frame(ID, int'(EPS_CLASS), 1'b1, $urandom_range(64, 600), seq);
      f[0].data[47:40] = 8'(d);
      n_eps_sent++;
    end
    if (f.size() > 0) seq++;
    return f;
  endfunction

  always @(negedge clk) begin
    rx_ready = !stall;
    if (rst_n) begin
      if (fire) begin
        bi++;
        if (bi == cur.size()) begin
          busy = 0;
          n_sent++;
        end
      end
      if (!busy && enable) begin
        cur = next_frame();
        if (cur.size() > 0) begin
          busy = 1;
          bi   = 0;
        end
      end
      tx_valid = busy;
      tx_beat  = busy ? cur[bi] : '0;
    end
  end

endmodule
