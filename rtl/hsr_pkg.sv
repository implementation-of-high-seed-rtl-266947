// hsr_pkg - constants, types and helper functions shared by the router's
// protocol layers: Ethernet types, IP protocol numbers, the frame-type
// encoding between the Ethernet layer and ARP/IP (0 = ARP, 1 = IP), a
// byte-wise CRC-32 step (IEEE 802.3, reflected polynomial EDB88320h) and a
// ones'-complement 16-bit add for the IP/ICMP checksums.
package hsr_pkg;

  localparam logic [15:0] ETYPE_IP  = 16'h0800;
  localparam logic [15:0] ETYPE_ARP = 16'h0806;
  localparam logic [7:0]  PROTO_ICMP = 8'd1;
  localparam logic [7:0]  PROTO_UDP  = 8'd17;
  localparam logic [47:0] MAC_BCAST  = 48'hFFFF_FFFF_FFFF;
  // CRC-32 register value after a frame and its own FCS have been shifted in
  localparam logic [31:0] CRC_RESIDUE = 32'hDEBB_20E3;

  typedef enum logic {FT_ARP = 1'b0, FT_IP = 1'b1} frame_type_t;

  // event counters brought out of the top level (all wrap around)
  typedef struct packed {
    logic [7:0] rx_bad_frames;   // frames of ours with FCS error or rx_er
    logic [7:0] arp_requests;    // ARP requests sent
    logic [7:0] arp_replies;     // ARP replies sent
    logic [7:0] arp_drops;       // datagrams dropped for lack of an ARP answer
    logic [7:0] ip_frag_drops;   // ICMP fragments dropped, reassemblies abandoned
    logic [7:0] ip_csum_errors;  // received IP headers with a bad checksum
    logic [7:0] ip_frags_sent;   // IP datagrams/fragments sent
    logic [7:0] icmp_echos;      // echo replies sent
    logic [7:0] udp_drops;       // UDP datagrams dropped while a message waited
    logic [7:0] tx_underruns;    // payload bytes missing while sending
    logic [7:0] pc_bad_cmds;     // unknown PC command bytes
    logic [7:0] arp_entries;     // ARP table entries in use
  } stack_stats_t;

  // one step of the reflected CRC-32 over a byte (LSB first)
  function automatic logic [31:0] crc32_byte(input logic [31:0] crc, input logic [7:0] d);
    logic [31:0] c;
    c = crc;
    for (int i = 0; i < 8; i++) begin
      if (c[0] ^ d[i]) c = (c >> 1) ^ 32'hEDB8_8320;
      else             c = c >> 1;
    end
    return c;
  endfunction

  // ones'-complement addition of two 16-bit words (end-around carry)
  function automatic logic [15:0] oc_add(input logic [15:0] a, input logic [15:0] b);
    logic [16:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[15:0] + {15'd0, s[16]};
  endfunction

endpackage
