// udp_rx - UDP receiver: catches datagrams for one port and stores their
// data in the shared RAM.
//
// The UDP part of an accepted IP datagram arrives from the IP receiver as a
// byte stream (in_valid with in_sel). Because the IP receiver reassembles
// fragments that may come in any order, every byte carries in_pos, its
// position in the UDP datagram, and the receiver puts it in place instead of
// counting: bytes 0-7 are the header (source port, destination port,
// length; the checksum is not checked) and data byte in_pos-8 is written to
// RAM address RX_BASE+in_pos-8 (wr_en/wr_addr/wr_data, at most one write
// every two clocks; the write port must take it at once). Up to RX_MAX data
// bytes are stored. The receive area is written only while no message is
// waiting; a byte that had to be skipped marks the datagram, from its first
// byte (in_sof with in_new), as spoiled.
//
// When the IP receiver reports the datagram complete (in_done, with in_tot
// the IP payload length), a datagram for UDP_PORT whose length field is
// between 8 and in_tot raises msg_valid with the stored length (UDP length
// - 8, at most RX_MAX), the sender's address and port; msg_valid stays until
// msg_ack. A datagram for UDP_PORT that completes while a message waits, or
// that was spoiled, is dropped and counted in n_drop. Datagrams for other
// ports may overwrite the receive area while no message waits, but are
// never reported.
//
// Catching one port, storing in RAM and ignoring the checksum follow the
// design description; the RAM layout and the hold-until-acknowledged rule
// are this design's.
module udp_rx #(
  parameter logic [15:0] UDP_PORT = 16'd5000,
  parameter int unsigned AW       = 14,
  parameter logic [AW-1:0] RX_BASE = '0,
  parameter int unsigned RX_MAX   = 8192
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_sel,
  input  logic [7:0]    in_data,
  input  logic          in_sof,
  input  logic          in_new,
  input  logic [15:0]   in_pos,
  input  logic          in_done,
  input  logic [15:0]   in_tot,
  input  logic [31:0]   in_src,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output logic [7:0]    wr_data,
  output logic          msg_valid,
  output logic [15:0]   msg_len,
  output logic [31:0]   msg_src_ip,
  output logic [15:0]   msg_src_port,
  input  logic          msg_ack,
  output logic [7:0]    n_drop
);

  logic [15:0] sport, dport, ulen;
  logic        spoiled, blocked;
  logic [15:0] didx;

  assign didx    = in_pos - 16'd8;
  // a data byte that belongs in the receive area but cannot be written now
  assign blocked = in_pos >= 16'd8 && didx < 16'(RX_MAX) && msg_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sport        <= '0;
      dport        <= '0;
      ulen         <= '0;
      spoiled      <= 1'b0;
      wr_en        <= 1'b0;
      wr_addr      <= '0;
      wr_data      <= '0;
      msg_valid    <= 1'b0;
      msg_len      <= '0;
      msg_src_ip   <= '0;
      msg_src_port <= '0;
      n_drop       <= '0;
    end else begin
      wr_en <= 1'b0;
      if (msg_valid && msg_ack) msg_valid <= 1'b0;
      if (in_valid && in_sel) begin
        if (in_sof && in_new) spoiled <= blocked;
        else if (blocked) spoiled <= 1'b1;
        unique case (in_pos)
          16'd0: sport[15:8] <= in_data;
          16'd1: sport[7:0]  <= in_data;
          16'd2: dport[15:8] <= in_data;
          16'd3: dport[7:0]  <= in_data;
          16'd4: ulen[15:8]  <= in_data;
          16'd5: ulen[7:0]   <= in_data;
          default: begin
            if (in_pos >= 16'd8 && didx < 16'(RX_MAX) && !msg_valid) begin
              wr_en   <= 1'b1;
              wr_addr <= RX_BASE + AW'(didx);
              wr_data <= in_data;
            end
          end
        endcase
      end
      if (in_done && dport == UDP_PORT && ulen >= 16'd8 && ulen <= in_tot) begin
        if (msg_valid || spoiled) n_drop <= n_drop + 8'd1;
        else begin
          msg_valid    <= 1'b1;
          msg_len      <= (ulen - 16'd8 > 16'(RX_MAX)) ? 16'(RX_MAX) : ulen - 16'd8;
          msg_src_ip   <= in_src;
          msg_src_port <= sport;
        end
      end
    end
  end

endmodule
