// hdlc - hand-over point between the receive side and the send side.
//
// The layers that produce outgoing datagrams (here the ICMP echo responder
// and the UDP sender) each raise a request (src_req with destination,
// protocol and payload length) and then offer their payload as a byte
// stream. This block picks one requester at a time, round-robin, forwards
// its request to the IP sender, returns the IP sender's req_ack to that
// requester only, and connects that requester's byte stream to the IP
// sender until the IP sender reports the datagram done. Other requesters
// keep their request raised meanwhile. grants counts hand-overs per source.
//
// In the design's block diagram this unit gathers the receive-side results
// and passes them to the send side; no HDLC framing (flags, bit stuffing,
// CRC-16) is described there and none is built. The round-robin policy is
// this design's.
module hdlc #(
  parameter int unsigned N = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        src_req,
  input  logic [N-1:0][31:0]  src_dst,
  input  logic [N-1:0][7:0]   src_proto,
  input  logic [N-1:0][15:0]  src_len,
  output logic [N-1:0]        src_ack,
  input  logic [N-1:0]        src_valid,
  input  logic [N-1:0][7:0]   src_data,
  output logic [N-1:0]        src_ready,
  // to the IP sender
  output logic                ip_req,
  output logic [31:0]         ip_dst,
  output logic [7:0]          ip_proto,
  output logic [15:0]         ip_len,
  input  logic                ip_ack,
  input  logic                ip_done,
  output logic                up_valid,
  output logic [7:0]          up_data,
  input  logic                up_ready,
  output logic [N-1:0][7:0]   grants
);
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1;

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_XFER} state_t;
  state_t        state;
  logic [SW-1:0] sel, last_sel, pick;
  logic          any;

  // round-robin: first requester after the one served last
  always_comb begin
    any  = 1'b0;
    pick = '0;
    for (int k = 1; k <= N; k++) begin
      int unsigned j;
      j = (int'(last_sel) + k) % N;
      if (!any && src_req[j]) begin
        any  = 1'b1;
        pick = SW'(j);
      end
    end
  end

  assign ip_req   = (state == S_REQ);
  assign ip_dst   = src_dst[sel];
  assign ip_proto = src_proto[sel];
  assign ip_len   = src_len[sel];
  assign up_valid = (state == S_XFER) && src_valid[sel];
  assign up_data  = src_data[sel];

  always_comb begin
    src_ack   = '0;
    src_ready = '0;
    if (state == S_REQ)  src_ack[sel]   = ip_ack;
    if (state == S_XFER) src_ready[sel] = up_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      sel      <= '0;
      last_sel <= SW'(N - 1);
      grants   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (any) begin
          sel   <= pick;
          state <= S_REQ;
        end
        S_REQ: if (ip_ack) begin
          state       <= S_XFER;
          last_sel    <= sel;
          grants[sel] <= grants[sel] + 8'd1;
        end
        S_XFER: if (ip_done) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
