// tb_pfc_gen: self-checking test of the PFC frame generator.
//
// Each request is checked against a frame decoded field by field from the
// output: destination 01-80-C2-00-00-01, source address, EtherType 0x8808,
// opcode 0x0101, class-enable vector and the eight pause times, 60 bytes in
// 8 beats. Requests made while a frame is in flight must be merged into the
// following frame, a later request overriding an earlier one for the same
// class. The first beat must appear two cycles after a request, and a held
// ready must stall the frame without losing beats.
module tb_pfc_gen;
  import reactor_pkg::*;
  import tb_frames_pkg::*;

  localparam logic [47:0] SRC = 48'h02_AA_BB_CC_DD_EE;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 req;
  logic [N_CLASSES-1:0] pause_vec, unpause_vec;
  beat_t                m_beat;
  logic                 m_valid, m_ready, busy;

  pfc_gen #(.SRC_MAC(SRC), .PAUSE_QUANTA(16'h1234)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s at %0t", msg, $time);
    end
  endtask

  // expected (pause, unpause) per frame
  logic [N_CLASSES-1:0] exp_p [$], exp_u [$];
  beat_q_t              got;
  int                   n_frames = 0;
  bit                   rand_ready = 0;

  always @(negedge clk) m_ready = rand_ready ? ($urandom_range(0, 2) != 0) : 1'b1;

  always @(posedge clk) begin
    if (rst_n && m_valid && m_ready) begin
      got.push_back(m_beat);
      if (m_beat.last) begin
        byte unsigned b [64];
        int n;
        n = 0;
        foreach (got[i]) for (int k = 0; k < 8; k++) if (got[i].keep[k]) begin
          b[n] = got[i].data[8*k +: 8];
          n++;
        end
        chk(got.size() == 8 && n == 60, "frame length 60 bytes in 8 beats");
        chk({b[0], b[1], b[2], b[3], b[4], b[5]} == 48'h0180C2000001, "PFC destination");
        chk({b[6], b[7], b[8], b[9], b[10], b[11]} == SRC, "source address");
        chk({b[12], b[13]} == 16'h8808 && {b[14], b[15]} == 16'h0101, "EtherType/opcode");
        if (exp_p.size() == 0) chk(0, "unexpected frame");
        else begin
          chk({b[16], b[17]} == {8'h00, exp_p[0] | exp_u[0]}, "class-enable vector");
          for (int c = 0; c < 8; c++)
            chk({b[18+2*c], b[19+2*c]} == (exp_p[0][c] ? 16'h1234 : 16'h0000), "pause time");
          void'(exp_p.pop_front());
          void'(exp_u.pop_front());
        end
        for (int i = 34; i < 60; i++) chk(b[i] == 0, "padding");
        got.delete();
        n_frames++;
      end
    end
  end

  task automatic request(input logic [7:0] p, input logic [7:0] u);
    @(negedge clk);
    req = 1; pause_vec = p; unpause_vec = u;
    @(negedge clk);
    req = 0; pause_vec = 0; unpause_vec = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t_req;
    req = 0; pause_vec = 0; unpause_vec = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // single pause, check the latency
    @(negedge clk);
    exp_p.push_back(8'h04); exp_u.push_back(8'h00);
    req = 1; pause_vec = 8'h04; unpause_vec = 0;
    t_req = $time;
    @(negedge clk);
    req = 0; pause_vec = 0;
    @(posedge clk iff m_valid);
    chk(($time - t_req) / 10 == 2, "first beat two cycles after request");
    wait (n_frames == 1);
    // unpause
    exp_p.push_back(8'h00); exp_u.push_back(8'h20);
    request(8'h00, 8'h20);
    wait (n_frames == 2);
    // merge: three requests during one frame, the last overrides class 1
    exp_p.push_back(8'h80); exp_u.push_back(8'h00);   // first frame
    exp_p.push_back(8'h01); exp_u.push_back(8'h0A);   // merged frame
    request(8'h80, 8'h00);
    request(8'h02, 8'h01);
    request(8'h01, 8'h08);
    request(8'h00, 8'h02);
    wait (n_frames == 4);
    chk(!busy, "idle after frames");
    // random requests with random backpressure, one at a time
    rand_ready = 1;
    for (int i = 0; i < 40; i++) begin
      logic [7:0] p, u;
      p = 8'($urandom);
      u = 8'($urandom) & ~p;
      if (p == 0 && u == 0) u = 8'h01;
      exp_p.push_back(p); exp_u.push_back(u);
      request(p, u);
      wait (n_frames == 5 + i);
      repeat (2) @(posedge clk);
    end
    chk(exp_p.size() == 0, "all frames seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
