// arp_table - the ARP cache: ENTRIES pairs of IP address and MAC address.
//
// Lookup is fully associative and combinational: lk_hit and lk_mac answer
// lk_ip in the same clock. A one-clock upd writes upd_ip/upd_mac: an entry
// already holding upd_ip gets the new MAC (update), otherwise the pair goes
// into the first free entry or, when the table is full, into the entry
// pointed to by a round-robin victim pointer (insert). n_valid counts the
// entries in use.
//
// The two fields and the insert-or-update behaviour follow the design
// description; the size and the replacement policy are this design's own.
module arp_table #(
  parameter int unsigned ENTRIES = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        upd,
  input  logic [31:0] upd_ip,
  input  logic [47:0] upd_mac,
  input  logic [31:0] lk_ip,
  output logic        lk_hit,
  output logic [47:0] lk_mac,
  output logic [$clog2(ENTRIES+1)-1:0] n_valid
);
  localparam int unsigned IW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  typedef struct packed {
    logic        valid;
    logic [31:0] ip;
    logic [47:0] mac;
  } entry_t;

  entry_t          tbl [ENTRIES];
  logic [IW-1:0]   victim;
  logic            m_hit, f_hit;
  logic [IW-1:0]   m_idx, f_idx;

  always_comb begin
    lk_hit = 1'b0;
    lk_mac = '0;
    m_hit  = 1'b0;
    m_idx  = '0;
    f_hit  = 1'b0;
    f_idx  = '0;
    n_valid = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (tbl[i].valid) n_valid = n_valid + 1'b1;
      if (tbl[i].valid && tbl[i].ip == lk_ip && !lk_hit) begin
        lk_hit = 1'b1;
        lk_mac = tbl[i].mac;
      end
      if (tbl[i].valid && tbl[i].ip == upd_ip && !m_hit) begin
        m_hit = 1'b1;
        m_idx = IW'(i);
      end
      if (!tbl[i].valid && !f_hit) begin
        f_hit = 1'b1;
        f_idx = IW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) tbl[i] <= '0;
      victim <= '0;
    end else if (upd) begin
      if (m_hit) begin
        tbl[m_idx].mac <= upd_mac;
      end else if (f_hit) begin
        tbl[f_idx] <= '{valid: 1'b1, ip: upd_ip, mac: upd_mac};
      end else begin
        tbl[victim] <= '{valid: 1'b1, ip: upd_ip, mac: upd_mac};
        victim <= (victim == IW'(ENTRIES - 1)) ? '0 : victim + 1'b1;
      end
    end
  end

endmodule
