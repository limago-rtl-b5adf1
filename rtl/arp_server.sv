// arp_server: ARP module. It keeps a 256-entry table that maps the last
// octet of an IPv4 address on the local /24 subnet to a MAC address, and
// answers lookups from the Outbound Packet Handler one cycle after the
// request (hit and MAC). A lookup miss queues an ARP request for that
// address. A received ARP request for my_ip is answered with an ARP reply;
// the sender of every received request or reply is learned into the
// table. One ARP request for my_ip is sent after reset to announce the
// node (gratuitous ARP). Frames are 42 bytes (one beat, no padding: the
// Outbound Packet Handler pads to 60 bytes).
module arp_server
  import limago_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [47:0] my_mac,
  input  logic [31:0] my_ip,
  input  axis_t       s,           // ARP frames from the inbound handler
  input  logic        s_valid,
  output logic        s_ready,
  output axis_t       m,           // ARP frames to the outbound handler
  output logic        m_valid,
  input  logic        m_ready,
  input  logic        lup_valid,   // MAC lookup of an IPv4 address
  input  logic [31:0] lup_ip,
  output logic        lup_rsp_valid,
  output logic        lup_hit,
  output logic [47:0] lup_mac
);
  typedef struct packed {
    logic        reply;   // 1: ARP reply, 0: ARP request
    logic [47:0] tmac;
    logic [31:0] tip;
  } tx_req_t;

  logic [48:0] table_q [256];     // {valid, mac}
  logic        boot;
  tx_req_t     q_in, q_out;
  logic        q_in_valid, q_in_ready, q_out_valid;

  // received frame
  logic [15:0] oper;
  logic [47:0] sha;
  logic [31:0] spa, tpa;
  assign oper = rd16(s.data, 20);
  assign sha  = rd48(s.data, 22);
  assign spa  = rd32(s.data, 28);
  assign tpa  = rd32(s.data, 38);
  wire rx_req   = s_valid && s.keep[0] && oper == 16'd1 && tpa == my_ip;
  wire rx_learn = s_valid && s.keep[0] && (oper == 16'd1 || oper == 16'd2);

  // the transmit queue is fed by: boot announce, reply to a request, miss
  logic lup_miss_q;
  logic [31:0] lup_ip_q;
  always_comb begin
    q_in_valid = 1'b0;
    q_in       = '0;
    s_ready    = 1'b1;
    if (boot) begin
      q_in_valid = 1'b1;
      q_in       = '{1'b0, 48'd0, my_ip};
      s_ready    = 1'b0;
    end else if (lup_miss_q) begin
      q_in_valid = 1'b1;
      q_in       = '{1'b0, 48'd0, lup_ip_q};
      s_ready    = 1'b0;
    end else if (rx_req) begin
      q_in_valid = 1'b1;
      q_in       = '{1'b1, sha, spa};
      s_ready    = q_in_ready;
    end
  end

  sync_fifo #(.W($bits(tx_req_t)), .DEPTH(8)) u_txq (
    .clk, .rst,
    .wr_valid(q_in_valid), .wr_ready(q_in_ready), .wr_data(q_in),
    .rd_valid(q_out_valid), .rd_ready(m_ready), .rd_data(q_out), .count()
  );

  always_comb begin
    logic [DW-1:0] d;
    d = '0;
    d = wr48(d, 0, q_out.reply ? q_out.tmac : 48'hFFFF_FFFF_FFFF);
    d = wr48(d, 6, my_mac);
    d = wr16(d, 12, ETH_ARP);
    d = wr16(d, 14, 16'd1);
    d = wr16(d, 16, ETH_IPV4);
    d = wr8 (d, 18, 8'd6);
    d = wr8 (d, 19, 8'd4);
    d = wr16(d, 20, q_out.reply ? 16'd2 : 16'd1);
    d = wr48(d, 22, my_mac);
    d = wr32(d, 28, my_ip);
    d = wr48(d, 32, q_out.reply ? q_out.tmac : 48'd0);
    d = wr32(d, 38, q_out.tip);
    m.data  = d;
    m.keep  = keep_n(42);
    m.last  = 1'b1;
    m_valid = q_out_valid;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      boot          <= 1'b1;
      lup_rsp_valid <= 1'b0;
      lup_miss_q    <= 1'b0;
      for (int i = 0; i < 256; i++) table_q[i] <= '0;
    end else begin
      if (boot && q_in_ready) boot <= 1'b0;
      if (lup_miss_q && !boot && q_in_ready) lup_miss_q <= 1'b0;
      lup_rsp_valid <= lup_valid;
      if (lup_valid) begin
        lup_hit  <= table_q[lup_ip[7:0]][48];
        lup_mac  <= table_q[lup_ip[7:0]][47:0];
        if (!table_q[lup_ip[7:0]][48]) begin
          lup_miss_q <= 1'b1;
          lup_ip_q   <= lup_ip;
        end
      end
      if (rx_learn && s_ready && spa != my_ip) table_q[spa[7:0]] <= {1'b1, sha};
    end
  end
endmodule
