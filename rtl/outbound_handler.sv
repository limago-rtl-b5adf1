// outbound_handler: Outbound Packet Handler. It gathers whole packets from
// the ARP module (complete Ethernet frames), the ICMP module and the TOE
// (IPv4 packets without Ethernet header), one packet at a time, with the
// fixed priority ARP > ICMP > TOE. For an IPv4 packet it asks the ARP
// module for the MAC address of the destination IP address (byte 16 of
// the IP header) and waits for the answer: on a hit it prepends the
// 14-byte Ethernet header {MAC, my_mac, 0x0800} and sends the frame, on a
// miss it drops the packet (the ARP module sends an ARP request instead).
// Frames shorter than 60 bytes are padded with zero bytes to 60.
module outbound_handler
  import limago_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [47:0] my_mac,
  input  axis_t       s_arp,
  input  logic        s_arp_valid,
  output logic        s_arp_ready,
  input  axis_t       s_icmp,
  input  logic        s_icmp_valid,
  output logic        s_icmp_ready,
  input  axis_t       s_tcp,
  input  logic        s_tcp_valid,
  output logic        s_tcp_ready,
  output logic        lup_valid,
  output logic [31:0] lup_ip,
  input  logic        lup_rsp_valid,
  input  logic        lup_hit,
  input  logic [47:0] lup_mac,
  output axis_t       m,
  output logic        m_valid,
  input  logic        m_ready,
  output logic [31:0] drop_cnt
);
  typedef enum logic [2:0] { IDLE, PASS, LOOKUP, WAIT, HDR, INSERT, DROP } st_e;
  st_e        st;
  logic [1:0] sel;
  axis_t      cs;          // selected input
  logic       cs_valid, cs_ready;
  logic [47:0] mac_q;

  always_comb begin
    unique case (sel)
      2'd0:    begin cs = s_arp;  cs_valid = s_arp_valid;  end
      2'd1:    begin cs = s_icmp; cs_valid = s_icmp_valid; end
      default: begin cs = s_tcp;  cs_valid = s_tcp_valid;  end
    endcase
    s_arp_ready  = (sel == 2'd0) && cs_ready;
    s_icmp_ready = (sel == 2'd1) && cs_ready;
    s_tcp_ready  = (sel == 2'd2) && cs_ready;
  end

  // Ethernet header insertion
  axis_t  io;
  logic   io_valid, io_ready, ins_s_ready, hdr_ready;
  logic [DW-1:0] eth;
  always_comb begin
    eth = '0;
    eth = wr48(eth, 0, mac_q);
    eth = wr48(eth, 6, my_mac);
    eth = wr16(eth, 12, ETH_IPV4);
  end

  axis_insert u_ins (
    .clk, .rst,
    .hdr(eth), .hlen(7'd14), .has_pl(1'b1),
    .hdr_valid(st == HDR), .hdr_ready(hdr_ready),
    .s(cs), .s_valid(st == INSERT && cs_valid), .s_ready(ins_s_ready),
    .m(io), .m_valid(io_valid), .m_ready(io_ready)
  );

  // output mux and padding
  axis_t  o;
  logic   o_valid, o_ready, osop;
  always_comb begin
    if (st == PASS) begin
      o = cs; o_valid = cs_valid;
    end else begin
      o = io; o_valid = io_valid;
    end
    m = o;
    if (osop && o.last && !o.keep[59]) begin
      m.keep = keep_n(60);
      for (int i = 0; i < KW; i++) if (!o.keep[i]) m.data[8*i +: 8] = 8'd0;
    end
    m_valid  = o_valid;
    o_ready  = m_ready;
    io_ready = (st != PASS) && m_ready;
    unique case (st)
      PASS:    cs_ready = m_ready;
      INSERT:  cs_ready = ins_s_ready;
      DROP:    cs_ready = 1'b1;
      default: cs_ready = 1'b0;
    endcase
  end

  assign lup_valid = (st == LOOKUP);
  assign lup_ip    = rd32(cs.data, 16);

  always_ff @(posedge clk) begin
    if (rst) begin
      st       <= IDLE;
      sel      <= 2'd0;
      osop     <= 1'b1;
      drop_cnt <= '0;
      mac_q    <= '0;
    end else begin
      if (m_valid && m_ready) osop <= m.last;
      unique case (st)
        IDLE: if (hdr_ready) begin   // header inserter idle: previous frame out
          if (s_arp_valid)       begin sel <= 2'd0; st <= PASS;   end
          else if (s_icmp_valid) begin sel <= 2'd1; st <= LOOKUP; end
          else if (s_tcp_valid)  begin sel <= 2'd2; st <= LOOKUP; end
        end
        PASS:   if (cs_valid && cs_ready && cs.last) st <= IDLE;
        LOOKUP: st <= WAIT;
        WAIT: if (lup_rsp_valid) begin
          mac_q <= lup_mac;
          if (lup_hit) begin
            st <= HDR;
          end else begin
            st <= DROP;
            drop_cnt <= drop_cnt + 1;
          end
        end
        HDR:    if (hdr_ready) st <= INSERT;
        INSERT: if (cs_valid && cs_ready && cs.last) st <= IDLE;
        DROP:   if (cs_valid && cs.last) st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end
endmodule
