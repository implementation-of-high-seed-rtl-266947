// udp_tx - UDP sender: sends a datagram whose data lies in the shared RAM.
//
// A one-clock send with the destination address and port, the source port,
// the data length len and its RAM address base starts a datagram (ignored
// while busy). The block asks the send side for an IP datagram of protocol
// 17 and length len+8 (req held until req_ack), then supplies its bytes on
// out_valid/out_data/out_last as they are pulled with out_ready: the 8-byte
// UDP header (checksum 0, i.e. not computed, as IPv4 allows) followed by the
// data. Data bytes are read ahead from the RAM read port (rd_en/rd_addr,
// rd_data one clock later) into a two-byte buffer, so a byte is available
// in every clock once the header has gone out, as the Ethernet sender
// requires. done pulses after the last byte.
//
// The block is named in the design's block diagram only; its behaviour is
// this design's.
module udp_tx #(
  parameter int unsigned AW = 14
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          send,
  input  logic [31:0]   dst_ip,
  input  logic [15:0]   dst_port,
  input  logic [15:0]   src_port,
  input  logic [15:0]   len,
  input  logic [AW-1:0] base,
  output logic          busy,
  output logic          done,
  output logic          req,
  output logic [31:0]   req_dst,
  output logic [15:0]   req_len,
  input  logic          req_ack,
  output logic          out_valid,
  output logic [7:0]    out_data,
  output logic          out_last,
  input  logic          out_ready,
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  input  logic [7:0]    rd_data
);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_SEND} state_t;
  state_t      state;
  logic [63:0] hdr;
  logic [15:0] dlen;
  logic [15:0] oidx;      // byte index of the datagram being offered
  logic [15:0] fetched;   // data bytes requested from RAM
  logic [AW-1:0] raddr;
  logic [7:0]  f0, f1;    // read-ahead buffer, f0 is the head
  logic [1:0]  fc;
  logic        inflight;
  logic        pop, push;

  assign busy    = (state != S_IDLE);
  assign req_len = dlen + 16'd8;
  assign rd_addr = raddr;
  assign rd_en   = (state != S_IDLE) && (fetched < dlen) &&
                   ({1'b0, fc} + {2'b0, inflight} < 3'd2);

  always_comb begin
    out_valid = 1'b0;
    out_data  = '0;
    if (state == S_SEND) begin
      if (oidx < 16'd8) begin
        out_valid = 1'b1;
        out_data  = hdr[8*(7-oidx[2:0]) +: 8];
      end else begin
        out_valid = (fc != 2'd0);
        out_data  = f0;
      end
    end
  end
  assign out_last = (oidx == req_len - 16'd1);
  assign pop      = out_ready && out_valid && (oidx >= 16'd8);
  assign push     = inflight;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      hdr      <= '0;
      dlen     <= '0;
      oidx     <= '0;
      fetched  <= '0;
      raddr    <= '0;
      f0       <= '0;
      f1       <= '0;
      fc       <= '0;
      inflight <= 1'b0;
      req      <= 1'b0;
      req_dst  <= '0;
      done     <= 1'b0;
    end else begin
      done     <= 1'b0;
      inflight <= rd_en;
      if (rd_en) begin
        raddr   <= raddr + 1'b1;
        fetched <= fetched + 16'd1;
      end
      // read-ahead buffer: push the byte read last clock, pop the head
      unique case ({push, pop})
        2'b10: begin
          if (fc == 2'd0) f0 <= rd_data; else f1 <= rd_data;
          fc <= fc + 2'd1;
        end
        2'b01: begin
          f0 <= f1;
          fc <= fc - 2'd1;
        end
        2'b11: begin
          if (fc == 2'd1) f0 <= rd_data;
          else begin
            f0 <= f1;
            f1 <= rd_data;
          end
        end
        default: ;
      endcase
      unique case (state)
        S_IDLE: if (send) begin
          state   <= S_REQ;
          req     <= 1'b1;
          req_dst <= dst_ip;
          dlen    <= len;
          hdr     <= {src_port, dst_port, len + 16'd8, 16'h0000};
          oidx    <= '0;
          fetched <= '0;
          raddr   <= base;
          fc      <= '0;
        end
        S_REQ: if (req_ack) begin
          req   <= 1'b0;
          state <= S_SEND;
        end
        S_SEND: if (out_ready && out_valid) begin
          oidx <= oidx + 16'd1;
          if (out_last) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
