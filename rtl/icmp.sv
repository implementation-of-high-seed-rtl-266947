// icmp - ICMP layer: answers echo requests (ping) with echo replies.
//
// The ICMP message of an accepted datagram arrives from the IP receiver as a
// byte stream (in_valid with in_sel, in_sof on the first byte) together with
// the sender's address (in_src) and the message length (in_len). Bytes are
// written to a BUF_BYTES buffer while two ones'-complement sums run: one
// over the whole message, which must come to FFFFh, and one over everything
// after the 4-byte ICMP header, from which the reply's checksum is formed.
// When the datagram ends good (in_end with in_ok) and holds an echo request
// (type 8, code 0) that fits the buffer and has a correct checksum, a reply
// is requested from the send side: req stays high, with req_dst = the
// requester and req_len = the message length, until req_ack. The reply is
// then read out of the buffer (out_valid/out_data/out_last, pulled by
// out_ready; a byte is available in every clock) with type 0, code 0 and the
// new checksum; identifier, sequence number and data are echoed. Requests
// arriving while a reply is pending are dropped. n_echo counts replies.
//
// Only the echo pair of the query messages the design description lists is
// built; the error-reporting messages are not generated.
module icmp
  import hsr_pkg::*;
#(
  parameter int unsigned BUF_BYTES = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        in_sel,
  input  logic [7:0]  in_data,
  input  logic        in_sof,
  input  logic        in_end,
  input  logic        in_ok,
  input  logic [31:0] in_src,
  input  logic [15:0] in_len,
  output logic        req,
  output logic [31:0] req_dst,
  output logic [15:0] req_len,
  input  logic        req_ack,
  output logic        out_valid,
  output logic [7:0]  out_data,
  output logic        out_last,
  input  logic        out_ready,
  output logic [7:0]  n_echo
);
  localparam int unsigned BW = $clog2(BUF_BYTES);

  typedef enum logic [1:0] {S_RX, S_REQ, S_SEND} state_t;
  state_t      state;
  logic [7:0]  mem [BUF_BYTES];
  logic [15:0] wcnt;
  logic [15:0] rcnt;
  logic [7:0]  prev;
  logic [7:0]  mtype, mcode;
  logic [15:0] sum_all, sum_rest;
  logic [15:0] rep_csum;
  logic        active;
  logic [15:0] fin_all, fin_rest;

  // close the sums, padding an odd final byte with zero
  assign fin_all  = wcnt[0] ? oc_add(sum_all, {prev, 8'h00}) : sum_all;
  assign fin_rest = (wcnt[0] && wcnt > 16'd4) ? oc_add(sum_rest, {prev, 8'h00}) : sum_rest;

  always_comb begin
    out_valid = (state == S_SEND);
    out_last  = (rcnt == req_len - 16'd1);
    unique case (rcnt)
      16'd0, 16'd1: out_data = 8'h00;
      16'd2:        out_data = rep_csum[15:8];
      16'd3:        out_data = rep_csum[7:0];
      default:      out_data = mem[rcnt[BW-1:0]];
    endcase
  end

  always_ff @(posedge clk) begin
    if (state == S_RX && active && in_valid && in_sel && wcnt < 16'(BUF_BYTES))
      mem[wcnt[BW-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_RX;
      wcnt     <= '0;
      rcnt     <= '0;
      prev     <= '0;
      mtype    <= '0;
      mcode    <= '0;
      sum_all  <= '0;
      sum_rest <= '0;
      rep_csum <= '0;
      active   <= 1'b0;
      req      <= 1'b0;
      req_dst  <= '0;
      req_len  <= '0;
      n_echo   <= '0;
    end else begin
      unique case (state)
        S_RX: begin
          if (in_valid && in_sel) begin
            if (in_sof) begin
              active   <= 1'b1;
              wcnt     <= 16'd1;
              mtype    <= in_data;
              prev     <= in_data;
              sum_all  <= '0;
              sum_rest <= '0;
            end else if (active) begin
              wcnt <= wcnt + 16'd1;
              prev <= in_data;
              if (wcnt == 16'd1) mcode <= in_data;
              if (wcnt[0]) begin
                sum_all <= oc_add(sum_all, {prev, in_data});
                if (wcnt > 16'd4) sum_rest <= oc_add(sum_rest, {prev, in_data});
              end
            end
          end
          if (in_end && in_sel) begin
            active <= 1'b0;
            if (active && in_ok && mtype == 8'd8 && mcode == 8'd0 && wcnt == in_len &&
                wcnt >= 16'd4 && wcnt <= 16'(BUF_BYTES) && fin_all == 16'hFFFF) begin
              state    <= S_REQ;
              req      <= 1'b1;
              req_dst  <= in_src;
              req_len  <= wcnt;
              rep_csum <= ~fin_rest;
            end
          end
        end
        S_REQ: if (req_ack) begin
          req   <= 1'b0;
          state <= S_SEND;
          rcnt  <= '0;
        end
        S_SEND: if (out_ready) begin
          rcnt <= rcnt + 16'd1;
          if (out_last) begin
            state  <= S_RX;
            n_echo <= n_echo + 8'd1;
          end
        end
        default: state <= S_RX;
      endcase
    end
  end

endmodule
