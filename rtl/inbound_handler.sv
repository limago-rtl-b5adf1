// inbound_handler: Inbound Packet Handler. It parses the Ethernet and IPv4
// headers in the first beat of every received frame and gives the frame a
// destination (TDEST): ARP frames (ethertype 0x0806) go whole to the ARP
// module; IPv4 packets addressed to my_ip with a 20-byte header go, with
// the 14-byte Ethernet header stripped, to the ICMP module (protocol 1)
// or to the TOE (protocol 6). Everything else, and every frame whose
// destination MAC is neither my_mac nor broadcast, is dropped and counted.
// The destinations of the packets in flight are queued so that the
// output switch routes each packet after the re-alignment stage.
// Streams are 512-bit AXI4-Stream; one beat per cycle.
module inbound_handler
  import limago_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [47:0] my_mac,
  input  logic [31:0] my_ip,
  input  axis_t       s,
  input  logic        s_valid,
  output logic        s_ready,
  output axis_t       m_arp,
  output logic        m_arp_valid,
  input  logic        m_arp_ready,
  output axis_t       m_icmp,
  output logic        m_icmp_valid,
  input  logic        m_icmp_ready,
  output axis_t       m_tcp,
  output logic        m_tcp_valid,
  input  logic        m_tcp_ready,
  output logic [31:0] drop_cnt
);
  logic       sop, drop_q, keep_pkt;
  logic [1:0] dest, dest_q, dest_o;
  logic       dq_ready, dq_valid;
  logic       st_ready, st_in_valid;
  axis_t      so;
  logic       so_valid, so_ready;

  // classification of the first beat
  always_comb begin
    logic [47:0] dmac;
    logic [15:0] etype;
    dmac  = rd48(s.data, 0);
    etype = rd16(s.data, 12);
    keep_pkt = 1'b0;
    dest     = DEST_TCP;
    if (dmac == my_mac || dmac == '1) begin
      if (etype == ETH_ARP) begin
        keep_pkt = 1'b1;
        dest     = DEST_ARP;
      end else if (etype == ETH_IPV4 && rd8(s.data, 14) == 8'h45 && rd32(s.data, 30) == my_ip) begin
        if (rd8(s.data, 23) == IP_ICMP) begin keep_pkt = 1'b1; dest = DEST_ICMP; end
        if (rd8(s.data, 23) == IP_TCP)  begin keep_pkt = 1'b1; dest = DEST_TCP;  end
      end
    end
  end

  wire fwd = sop ? keep_pkt : !drop_q;
  assign st_in_valid = s_valid && fwd && (!sop || dq_ready);
  assign s_ready     = fwd ? (st_ready && (!sop || dq_ready)) : 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      sop      <= 1'b1;
      drop_q   <= 1'b0;
      drop_cnt <= '0;
    end else if (s_valid && s_ready) begin
      sop <= s.last;
      if (sop) begin
        drop_q <= !keep_pkt;
        dest_q <= dest;
        if (!keep_pkt) drop_cnt <= drop_cnt + 1;
      end
    end
  end

  sync_fifo #(.W(2), .DEPTH(16)) u_destq (
    .clk, .rst,
    .wr_valid(s_valid && sop && keep_pkt && st_ready), .wr_ready(dq_ready), .wr_data(dest),
    .rd_valid(dq_valid), .rd_ready(so_valid && so_ready && so.last), .rd_data(dest_o),
    .count()
  );

  axis_strip u_strip (
    .clk, .rst,
    .n_bytes((dest == DEST_ARP) ? 6'd0 : 6'd14),
    .s(s), .s_valid(st_in_valid), .s_ready(st_ready),
    .m(so), .m_valid(so_valid), .m_ready(so_ready)
  );

  // AXI4-Stream switch on TDEST
  assign m_arp  = so;
  assign m_icmp = so;
  assign m_tcp  = so;
  assign m_arp_valid  = so_valid && dq_valid && dest_o == DEST_ARP;
  assign m_icmp_valid = so_valid && dq_valid && dest_o == DEST_ICMP;
  assign m_tcp_valid  = so_valid && dq_valid && dest_o == DEST_TCP;
  always_comb begin
    unique case (dest_o)
      DEST_ARP:  so_ready = dq_valid && m_arp_ready;
      DEST_ICMP: so_ready = dq_valid && m_icmp_ready;
      default:   so_ready = dq_valid && m_tcp_ready;
    endcase
  end
endmodule
