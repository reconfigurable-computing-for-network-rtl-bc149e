// tb_frames_pkg: builds test frames for the testbenches, independently of
// the design's parsers.
//
// make_frame returns the bytes of an Ethernet II frame (no preamble, no
// frame check sequence): destination and source addresses, then either an
// IPv4/UDP (kind 2), IPv4/TCP-numbered (kind 1) or unknown-ethertype
// (kind 0) payload. The IPv4 header checksum is computed here from RFC 791.
// A 32-bit frame id is stored at byte 42 so a scoreboard can match frames.
// bad_csum flips the checksum so the frame fails IPv4 checks.
package tb_frames_pkg;

  typedef byte unsigned bytes_t[$];

  function automatic bytes_t make_frame(longint unsigned dst, longint unsigned src,
                                        int kind, int unsigned id, int unsigned len,
                                        bit bad_csum = 1'b0);
    bytes_t f;
    int unsigned sum;
    if (len < 64) len = 64;
    for (int b = 5; b >= 0; b--) f.push_back(byte'(dst >> (8*b)));
    for (int b = 5; b >= 0; b--) f.push_back(byte'(src >> (8*b)));
    if (kind == 0) begin
      f.push_back(8'h88); f.push_back(8'hB5);           // local experimental ethertype
      while (f.size() < 42) f.push_back(byte'(f.size()));
    end else begin
      f.push_back(8'h08); f.push_back(8'h00);
      f.push_back(8'h45); f.push_back(8'h00);
      f.push_back(byte'((len-14) >> 8)); f.push_back(byte'(len-14));
      f.push_back(byte'(id >> 8)); f.push_back(byte'(id));
      f.push_back(8'h00); f.push_back(8'h00);
      f.push_back(8'h40); f.push_back(kind == 2 ? 8'd17 : 8'd6);
      f.push_back(8'h00); f.push_back(8'h00);            // checksum, filled below
      f.push_back(8'd10); f.push_back(8'd0); f.push_back(8'd0); f.push_back(byte'(src));
      f.push_back(8'd10); f.push_back(8'd0); f.push_back(8'd1); f.push_back(byte'(dst));
      sum = 0;
      for (int w = 0; w < 10; w++) sum += {f[14+2*w], f[15+2*w]};
      while (sum >> 16) sum = (sum & 16'hFFFF) + (sum >> 16);
      sum = ~sum & 16'hFFFF;
      if (bad_csum) sum = sum ^ 16'h0100;
      f[24] = byte'(sum >> 8);
      f[25] = byte'(sum);
      // transport header: ports 4000 -> 5000, length, zero checksum
      f.push_back(8'h0F); f.push_back(8'hA0); f.push_back(8'h13); f.push_back(8'h88);
      f.push_back(byte'((len-34) >> 8)); f.push_back(byte'(len-34));
      f.push_back(8'h00); f.push_back(8'h00);
    end
    f.push_back(byte'(id >> 24)); f.push_back(byte'(id >> 16));
    f.push_back(byte'(id >> 8));  f.push_back(byte'(id));
    while (f.size() < len) f.push_back(byte'(id + f.size()));
    return f;
  endfunction

  function automatic int unsigned frame_id(bytes_t f);
    return {f[42], f[43], f[44], f[45]};
  endfunction

endpackage
