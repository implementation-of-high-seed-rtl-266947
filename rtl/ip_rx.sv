// ip_rx - IPv4 receiver (Internet layer, receive side).
//
// Takes the payload of frames of type IP from the Ethernet receiver as a
// byte stream. While the header streams in it keeps version/IHL, total
// length, identification, flags and fragment offset, protocol and the two
// addresses, and it sums the header's 16-bit words in ones' complement. At
// the last header byte (IHL*4 bytes; options are skipped) the datagram is
// accepted when the version is 4, the checksum sums to FFFFh, the
// destination is MY_IP or 255.255.255.255 and the protocol is ICMP (1) or
// UDP (17). The payload bytes of an accepted datagram are then passed on
// (pl_valid/pl_data, pl_sof on the first, pl_last on byte total_length-1)
// with sel_icmp or sel_udp naming the receiver, and pl_src/pl_len giving the
// source address and the payload length of this frame. When the Ethernet
// frame ends, pl_end pulses and pl_ok says whether the frame was good and
// long enough.
//
// UDP datagrams are reassembled from their fragments, in any order, with
// one reassembly context: source address and identification, the payload
// bytes received so far and, once the fragment without more-fragments has
// arrived, the total payload length. Each UDP payload byte carries pl_pos,
// its position in the whole datagram's payload (fragment offset * 8 plus
// its index), so the UDP receiver can put it in place; pl_new marks (with
// pl_sof) the first byte of a datagram that opens a new context. When the
// bytes received reach the total, pl_done pulses with pl_tot, the total
// payload length, and the context is closed. A datagram that is not
// fragmented opens and closes a context of its own. A fragment of another
// datagram abandons an unfinished context; abandoned contexts and all ICMP
// fragments (which are not reassembled) are counted in n_frag. Fragments
// from a bad frame do not count, so their datagram never completes.
// Overlapping or repeated fragments are not detected. Datagrams with a bad
// header checksum are counted in n_csum_err.
//
// Demultiplexing by protocol and passing a datagram up once no more
// fragments are coming follow the design description; the single context,
// abandon-on-new policy and ICMP fragment drop are this design's choices.
module ip_rx
  import hsr_pkg::*;
#(
  parameter logic [31:0] MY_IP = 32'hC0A8_0102
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [7:0]  in_data,
  input  logic        in_sof,
  input  logic        in_eof,
  input  logic        in_ok,
  output logic        pl_valid,
  output logic [7:0]  pl_data,
  output logic        pl_sof,
  output logic        pl_last,
  output logic        pl_end,
  output logic        pl_ok,
  output logic        sel_icmp,
  output logic        sel_udp,
  output logic [31:0] pl_src,
  output logic [15:0] pl_len,
  output logic [15:0] pl_pos,
  output logic        pl_new,
  output logic        pl_done,
  output logic [15:0] pl_tot,
  output logic [7:0]  n_frag,
  output logic [7:0]  n_csum_err
);

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_PAY, S_SKIP} state_t;
  state_t      state;
  logic [15:0] cnt;
  logic [5:0]  hlen;
  logic [3:0]  ver;
  logic [15:0] totlen;
  logic [13:0] fragw;  // MF flag and fragment offset
  logic [31:0] dst_now;
  logic [7:0]  proto;
  logic [31:0] src, dst;
  logic [7:0]  prev;
  logic [15:0] sum;
  logic [15:0] sum_nxt;
  logic        first;
  logic        hdr_good, is_frag, csum_ok;
  logic [15:0] ident;
  logic [15:0] frag_base;  // fragment offset in bytes
  // reassembly context
  logic        ctx_valid, ctx_have_tot, cur_new;
  logic [31:0] ctx_src;
  logic [15:0] ctx_id, ctx_got, ctx_tot;
  logic [15:0] got_nxt, tot_nxt;
  logic        have_nxt, ctx_match;

  // byte 0 arrives with in_sof; cnt is the index of the byte on in_data
  assign sum_nxt  = cnt[0] ? oc_add(sum, {prev, in_data}) : sum;
  assign csum_ok  = (sum_nxt == 16'hFFFF);
  assign dst_now  = (cnt == 16'd19) ? {dst[23:0], in_data} : dst;
  assign is_frag  = fragw[13] || (fragw[12:0] != 13'd0);
  assign hdr_good = (ver == 4'd4) && (hlen >= 6'd20) && csum_ok &&
                    (!is_frag || proto == PROTO_UDP) &&
                    (dst_now == MY_IP || dst_now == 32'hFFFF_FFFF) &&
                    (proto == PROTO_ICMP || proto == PROTO_UDP) &&
                    (totlen >= {10'd0, hlen});
  assign ctx_match = ctx_valid && is_frag && src == ctx_src && ident == ctx_id;
  // context state after the current UDP frame, if it ends good
  assign got_nxt   = ctx_got + pl_len;
  assign have_nxt  = ctx_have_tot || !fragw[13];
  assign tot_nxt   = fragw[13] ? ctx_tot : frag_base + pl_len;
  assign frag_base = {fragw[12:0], 3'b000};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cnt        <= '0;
      hlen       <= '0;
      ver        <= '0;
      totlen     <= '0;
      fragw      <= '0;
      proto      <= '0;
      src        <= '0;
      dst        <= '0;
      prev       <= '0;
      sum        <= '0;
      first      <= 1'b0;
      pl_valid   <= 1'b0;
      pl_data    <= '0;
      pl_sof     <= 1'b0;
      pl_last    <= 1'b0;
      pl_end     <= 1'b0;
      pl_ok      <= 1'b0;
      sel_icmp   <= 1'b0;
      sel_udp    <= 1'b0;
      pl_src     <= '0;
      pl_len     <= '0;
      pl_pos     <= '0;
      pl_new     <= 1'b0;
      pl_done    <= 1'b0;
      pl_tot     <= '0;
      ident      <= '0;
      cur_new    <= 1'b0;
      ctx_valid  <= 1'b0;
      ctx_have_tot <= 1'b0;
      ctx_src    <= '0;
      ctx_id     <= '0;
      ctx_got    <= '0;
      ctx_tot    <= '0;
      n_frag     <= '0;
      n_csum_err <= '0;
    end else begin
      pl_done  <= 1'b0;
      pl_valid <= 1'b0;
      pl_sof   <= 1'b0;
      pl_new   <= 1'b0;
      pl_last  <= 1'b0;
      pl_end   <= 1'b0;
      if (in_valid && in_sof) begin
        state <= S_HDR;
        cnt   <= 16'd1;
        ver   <= in_data[7:4];
        hlen  <= {in_data[3:0], 2'b00};
        prev  <= in_data;
        sum   <= '0;
      end else if (in_valid) begin
        cnt  <= cnt + 16'd1;
        prev <= in_data;
        unique case (state)
          S_HDR: begin
            sum <= sum_nxt;
            unique case (cnt)
              16'd2:  totlen[15:8] <= in_data;
              16'd3:  totlen[7:0]  <= in_data;
              16'd4:  ident[15:8]  <= in_data;
              16'd5:  ident[7:0]   <= in_data;
              16'd6:  fragw[13:8]  <= in_data[5:0];
              16'd7:  fragw[7:0]   <= in_data;
              16'd9:  proto        <= in_data;
              16'd12, 16'd13, 16'd14, 16'd15: src <= {src[23:0], in_data};
              16'd16, 16'd17, 16'd18, 16'd19: dst <= {dst[23:0], in_data};
              default: ;
            endcase
            if (cnt == {10'd0, hlen} - 16'd1 && cnt >= 16'd19) begin
              if (hdr_good) begin
                state    <= (totlen == {10'd0, hlen}) ? S_SKIP : S_PAY;
                first    <= 1'b1;
                sel_icmp <= (proto == PROTO_ICMP);
                sel_udp  <= (proto == PROTO_UDP);
                pl_src   <= src;
                pl_len   <= totlen - {10'd0, hlen};
                pl_pos   <= frag_base;
                if (proto == PROTO_UDP) begin
                  cur_new <= !ctx_match;
                  if (!ctx_match) begin
                    // open a new context, abandoning an unfinished one
                    if (ctx_valid) n_frag <= n_frag + 8'd1;
                    ctx_valid    <= 1'b1;
                    ctx_have_tot <= 1'b0;
                    ctx_src      <= src;
                    ctx_id       <= ident;
                    ctx_got      <= '0;
                    ctx_tot      <= '0;
                  end
                end
              end else begin
                state <= S_IDLE;
                if (!csum_ok) n_csum_err <= n_csum_err + 8'd1;
                else if (is_frag && proto == PROTO_ICMP &&
                         (dst_now == MY_IP || dst_now == 32'hFFFF_FFFF))
                  n_frag <= n_frag + 8'd1;
              end
            end
          end
          S_PAY: begin
            pl_valid <= 1'b1;
            pl_data  <= in_data;
            pl_sof   <= first;
            pl_new   <= first && cur_new;
            if (!first) pl_pos <= pl_pos + 16'd1;
            first    <= 1'b0;
            pl_last  <= (cnt == totlen - 16'd1);
            if (cnt == totlen - 16'd1) state <= S_SKIP;
          end
          default: ;
        endcase
      end
      if (in_eof) begin
        if (state == S_PAY || state == S_SKIP) begin
          pl_end <= 1'b1;
          pl_ok  <= in_ok && (state == S_SKIP);
          if (sel_udp && in_ok && state == S_SKIP && ctx_valid) begin
            if (have_nxt && got_nxt == tot_nxt) begin
              pl_done   <= 1'b1;
              pl_tot    <= tot_nxt;
              ctx_valid <= 1'b0;
            end else begin
              ctx_got      <= got_nxt;
              ctx_tot      <= tot_nxt;
              ctx_have_tot <= have_nxt;
            end
          end else if (sel_udp && !is_frag) begin
            ctx_valid <= 1'b0;  // lost whole datagram: nothing to abandon later
          end
        end
        state <= S_IDLE;
      end
    end
  end

endmodule
