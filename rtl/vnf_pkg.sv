// vnf_pkg: header layouts and checks shared by the parser functions that
// the PRRs hold.
//
// A parser sees the first HDR_BYTES bytes of a frame (enough for an
// Ethernet header, an IPv4 header with the largest option field and a UDP
// header) and the frame length. The frame starts with the Ethernet
// destination address; no preamble and no frame check sequence are present
// on the NoC. Byte 0 of the header array is the first byte on the wire.
// The checks are the usual ones of Ethernet II, IPv4 and UDP; which checks a
// parser makes is this design's choice.
package vnf_pkg;

  localparam int unsigned HDR_BYTES = 80;
  localparam int unsigned ETH_HDR   = 14;

  typedef logic [HDR_BYTES-1:0][7:0] hdr_t;

  typedef struct packed {
    logic        ok;
    logic [47:0] dst;
    logic [47:0] src;
    logic [15:0] ethertype;
  } eth_info_t;

  typedef struct packed {
    logic        ok;
    logic [3:0]  ihl;
    logic [7:0]  proto;
    logic [31:0] src;
    logic [31:0] dst;
  } ip_info_t;

  typedef struct packed {
    logic        ok;
    logic [15:0] src_port;
    logic [15:0] dst_port;
    logic [15:0] length;
  } udp_info_t;

  function automatic logic [15:0] be16(hdr_t h, int unsigned at);
    return {h[at], h[at+1]};
  endfunction

  function automatic eth_info_t eth_check(hdr_t h, logic [15:0] len);
    eth_info_t r;
    r.dst       = {h[0], h[1], h[2], h[3], h[4], h[5]};
    r.src       = {h[6], h[7], h[8], h[9], h[10], h[11]};
    r.ethertype = be16(h, 12);
    r.ok        = (len >= 16'(ETH_HDR));
    return r;
  endfunction

  // IPv4 over Ethernet II: ethertype 0x0800, version 4, IHL >= 5, the
  // frame holds the whole header, and the header checksum verifies (the
  // one's-complement sum of all header words is 0xFFFF).
  function automatic ip_info_t ip_check(hdr_t h, logic [15:0] len);
    ip_info_t    r;
    logic [19:0] sum;
    logic [15:0] folded;
    r.ihl   = h[ETH_HDR][3:0];
    r.proto = h[ETH_HDR+9];
    r.src   = {h[ETH_HDR+12], h[ETH_HDR+13], h[ETH_HDR+14], h[ETH_HDR+15]};
    r.dst   = {h[ETH_HDR+16], h[ETH_HDR+17], h[ETH_HDR+18], h[ETH_HDR+19]};
    sum = '0;
    for (int w = 0; w < 30; w++)
      if (w < 2*int'(r.ihl)) sum += {4'h0, be16(h, ETH_HDR + 2*w)};
    folded = sum[15:0] + {12'h0, sum[19:16]};
    if (folded < {12'h0, sum[19:16]}) folded = folded + 1'b1;  // end-around carry
    r.ok = (be16(h, 12) == 16'h0800) && (h[ETH_HDR][7:4] == 4'd4) &&
           (r.ihl >= 4'd5) && (len >= 16'(ETH_HDR) + 16'(4*int'(r.ihl))) &&
           (folded == 16'hFFFF);
    return r;
  endfunction

  // UDP over IPv4: a valid IPv4 header with protocol 17 and room in the
  // frame for the 8-byte UDP header behind it.
  function automatic udp_info_t udp_check(hdr_t h, logic [15:0] len);
    udp_info_t   r;
    ip_info_t    ip;
    int unsigned at;
    ip = ip_check(h, len);
    at = ETH_HDR + 4*int'(ip.ihl);
    r.src_port = be16(h, at);
    r.dst_port = be16(h, at+2);
    r.length   = be16(h, at+4);
    r.ok = ip.ok && (ip.proto == 8'd17) && (len >= 16'(at + 8));
    return r;
  endfunction

endpackage
