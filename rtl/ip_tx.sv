// ip_tx - IPv4 sender (Internet layer, send side).
//
// A datagram request (req held high with req_dst, req_proto and the payload
// length req_len) is accepted when the block is idle; req_ack pulses then.
// The payload is cut into fragments of at most FRAG_MAX = (MTU-20) rounded
// down to a multiple of 8 bytes. For each fragment the block builds a
// 20-byte header (version 4, IHL 5, TOS 0, total length, a per-datagram
// identification, the more-fragments flag and offset, TTL 64, protocol,
// header checksum, MY_IP, destination), asks the ARP sender to carry it
// (ip_req/ip_dst) and, on ip_grant, streams header and payload bytes down
// (dn_valid/dn_data/dn_last, pulled by dn_ready) while pulling the payload
// from the layer above (up_valid/up_data, up_ready). If the ARP sender gives
// up (ip_fail) the rest of the payload is pulled and discarded. done pulses
// when the whole datagram has been handled; n_frags counts fragments sent.
//
// Header creation, fragmentation of large datagrams and the hand-over to the
// ARP sender follow the design description. Field values such as TTL and the
// next-hop rule (the destination itself; no gateway) are this design's.
module ip_tx
  import hsr_pkg::*;
#(
  parameter logic [31:0] MY_IP = 32'hC0A8_0102,
  parameter int unsigned MTU   = 1500
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  logic [31:0] req_dst,
  input  logic [7:0]  req_proto,
  input  logic [15:0] req_len,
  output logic        req_ack,
  output logic        busy,
  output logic        done,
  input  logic        up_valid,
  input  logic [7:0]  up_data,
  output logic        up_ready,
  // to the ARP sender
  output logic        ip_req,
  output logic [31:0] ip_dst,
  input  logic        ip_grant,
  input  logic        ip_fail,
  output logic        dn_valid,
  output logic [7:0]  dn_data,
  output logic        dn_last,
  input  logic        dn_ready,
  output logic [7:0]  n_frags
);
  localparam logic [15:0] FRAG_MAX = 16'(((MTU - 20) / 8) * 8);

  typedef enum logic [2:0] {S_IDLE, S_REQ, S_HDR, S_PAY, S_DRAIN} state_t;
  state_t       state;
  logic [7:0]   proto;
  logic [15:0]  rem;      // payload bytes not yet sent
  logic [15:0]  off;      // payload offset of the current fragment
  logic [15:0]  flen;     // payload bytes in the current fragment
  logic [15:0]  fcnt;
  logic [15:0]  ident;
  logic [4:0]   hidx;
  logic         mf;
  logic [159:0] hdr;
  logic [15:0]  csum;
  logic [15:0]  totlen, fragw;

  logic [31:0]  req_dst_q;

  assign ip_dst = req_dst_q;

  assign totlen = flen + 16'd20;
  assign fragw  = {2'b00, mf, off[15:3]};

  always_comb begin
    logic [15:0] s;
    s = 16'h4500;
    s = oc_add(s, totlen);
    s = oc_add(s, ident);
    s = oc_add(s, fragw);
    s = oc_add(s, {8'd64, proto});
    s = oc_add(s, MY_IP[31:16]);
    s = oc_add(s, MY_IP[15:0]);
    s = oc_add(s, req_dst_q[31:16]);
    s = oc_add(s, req_dst_q[15:0]);
    csum = ~s;
    hdr  = {16'h4500, totlen, ident, fragw, 8'd64, proto, csum, MY_IP, req_dst_q};
  end

  assign busy   = (state != S_IDLE);
  assign ip_req = (state == S_REQ);

  always_comb begin
    dn_valid = 1'b0;
    dn_data  = '0;
    dn_last  = 1'b0;
    up_ready = 1'b0;
    unique case (state)
      S_HDR: begin
        dn_valid = 1'b1;
        dn_data  = hdr[8*(19-hidx) +: 8];
        dn_last  = (hidx == 5'd19) && (flen == 16'd0);
      end
      S_PAY: begin
        dn_valid = up_valid;
        dn_data  = up_data;
        dn_last  = (fcnt == flen - 16'd1);
        up_ready = dn_ready;
      end
      S_DRAIN: up_ready = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      proto     <= '0;
      rem       <= '0;
      off       <= '0;
      flen      <= '0;
      fcnt      <= '0;
      ident     <= '0;
      hidx      <= '0;
      mf        <= 1'b0;
      req_dst_q <= '0;
      req_ack   <= 1'b0;
      done      <= 1'b0;
      n_frags   <= '0;
    end else begin
      req_ack <= 1'b0;
      done    <= 1'b0;
      unique case (state)
        S_IDLE: if (req && !req_ack) begin
          state     <= S_REQ;
          req_ack   <= 1'b1;
          req_dst_q <= req_dst;
          proto     <= req_proto;
          ident     <= ident + 16'd1;
          off       <= '0;
          flen      <= (req_len > FRAG_MAX) ? FRAG_MAX : req_len;
          mf        <= (req_len > FRAG_MAX);
          rem       <= req_len;
        end
        S_REQ: begin
          if (ip_grant) begin
            state <= S_HDR;
            hidx  <= '0;
          end else if (ip_fail) begin
            state <= (rem == 16'd0) ? S_IDLE : S_DRAIN;
            done  <= (rem == 16'd0);
          end
        end
        S_HDR: if (dn_ready) begin
          hidx <= hidx + 5'd1;
          if (hidx == 5'd19) begin
            fcnt  <= '0;
            state <= (flen == 16'd0) ? S_IDLE : S_PAY;
            if (flen == 16'd0) done <= 1'b1;
            n_frags <= n_frags + 8'd1;
          end
        end
        S_PAY: if (dn_ready && up_valid) begin
          fcnt <= fcnt + 16'd1;
          if (fcnt == flen - 16'd1) begin
            rem <= rem - flen;
            off <= off + flen;
            if (rem == flen) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_REQ;
              flen  <= (rem - flen > FRAG_MAX) ? FRAG_MAX : rem - flen;
              mf    <= (rem - flen > FRAG_MAX);
            end
          end
        end
        S_DRAIN: if (up_valid) begin
          rem <= rem - 16'd1;
          if (rem == 16'd1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a fragment offset is counted in 8-byte units, so every fragment but the
  // last must carry a multiple of 8 bytes
  a_frag_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_HDR && mf) |-> (flen[2:0] == 3'd0));

endmodule
