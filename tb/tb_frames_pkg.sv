// tb_frames_pkg: frame construction helpers shared by the testbenches.
//
// build_frame() makes an Ethernet frame as 64-bit beats in the layout the
// design uses (byte 0 in data[7:0]). A tagged frame carries an 802.1Q tag
// whose priority code point is the traffic class; the payload holds the
// source port and a sequence number so a receiver can tell frames apart.
package tb_frames_pkg;
  import reactor_pkg::*;

  typedef beat_t beat_q_t[$];

  function automatic beat_q_t build_frame(input int src, input int cls, input bit vlan,
                                          input int nbytes, input int seq);
    byte unsigned b[];
    beat_q_t      q;
    int           o;
    b = new[nbytes];
    foreach (b[i]) b[i] = 8'((i * 7 + seq * 13 + src) & 8'hFF);
    b[0] = 8'h02; b[1] = 0; b[2] = 0; b[3] = 0; b[4] = 0; b[5] = 8'(cls);
    b[6] = 8'h02; b[7] = 0; b[8] = 0; b[9] = 0; b[10] = 0; b[11] = 8'(src);
    o = 12;
    if (vlan) begin
      b[12] = 8'h81; b[13] = 8'h00;
      b[14] = 8'((cls << 5) | 0); b[15] = 8'h01;
      o = 16;
    end
    b[o] = 8'h08; b[o+1] = 8'h00;
    b[o+2] = 8'(src);
    b[o+3] = 8'(seq >> 16); b[o+4] = 8'(seq >> 8); b[o+5] = 8'(seq);
    for (int i = 0; i < nbytes; i += 8) begin
      beat_t bt;
      bt = '0;
      for (int k = 0; k < 8; k++) begin
        if (i + k < nbytes) begin
          bt.data[8*k +: 8] = b[i+k];
          bt.keep[k]        = 1'b1;
        end
      end
      bt.last = (i + 8 >= nbytes);
      q.push_back(bt);
    end
    return q;
  endfunction

  // Source port of a frame built above (byte 11).
  function automatic int frame_src(input beat_q_t q);
    return int'(q[1].data[31:24]);
  endfunction

  function automatic bit same_frame(input beat_q_t a, input beat_q_t b);
    if (a.size() != b.size()) return 1'b0;
    foreach (a[i]) if (a[i] != b[i]) return 1'b0;
    return 1'b1;
  endfunction

endpackage
