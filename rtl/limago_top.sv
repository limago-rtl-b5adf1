// limago_top: the Limago 100 GbE TCP/IP stack. Received Ethernet frames
// (512-bit AXI4-Stream, one beat per cycle at the MAC clock of 322 MHz)
// enter the Inbound Packet Handler, which sends ARP frames to the ARP
// module, ICMP packets to the ICMP module and TCP segments to the TOE.
// The Outbound Packet Handler merges the ARP, ICMP and TOE outputs,
// resolves the destination MAC address through the ARP module, adds the
// Ethernet header and pads short frames. The application connects to the
// TOE's listen/open/close/send/receive interfaces; the TOE's two payload
// buffer ports go to external memory (DDR4 through a memory controller,
// or on-chip memory). The 100G MAC, its LBUS adapter, the memory
// controller and the PCIe DMA are outside this module: the network side
// is the plain AXI4-Stream frame interface, and the statistics are read
// through the AXI4-Lite port.
module limago_top
  import limago_pkg::*;
#(
  parameter int MAX_SESS  = 10000,
  parameter int TAB_AW    = 13,
  parameter bit WS_EN     = 1'b1,
  parameter int WS_LOCAL  = 0,
  parameter int MSS       = 1460,
  parameter int TICK      = 322,
  parameter int RT_DELAY  = 1000,
  parameter int PR_DELAY  = 1000,
  parameter int TW_DELAY  = 10000,
  localparam int REG_W    = 16 + WS_LOCAL,
  localparam int WA_W     = SID_W + REG_W - 6
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [47:0]      my_mac,
  input  logic [31:0]      my_ip,
  // Ethernet frames
  input  axis_t            s_eth,
  input  logic             s_eth_valid,
  output logic             s_eth_ready,
  output axis_t            m_eth,
  output logic             m_eth_valid,
  input  logic             m_eth_ready,
  // application
  input  logic             lis_valid,
  output logic             lis_ready,
  input  logic [15:0]      lis_port,
  output logic             lis_rsp_valid,
  output logic             lis_rsp_ok,
  input  logic             op_valid,
  output logic             op_ready,
  input  logic [31:0]      op_ip,
  input  logic [15:0]      op_port,
  output logic             op_rsp_valid,
  output logic             op_rsp_ok,
  output logic [SID_W-1:0] op_rsp_sid,
  input  logic             cl_valid,
  output logic             cl_ready,
  input  logic [SID_W-1:0] cl_sid,
  input  logic             tx_valid,
  output logic             tx_ready,
  input  logic [SID_W-1:0] tx_sid,
  input  logic [15:0]      tx_len,
  output logic             tx_rsp_valid,
  output logic             tx_rsp_ok,
  input  axis_t            s_app,
  input  logic             s_app_valid,
  output logic             s_app_ready,
  output logic             nt_valid,
  input  logic             nt_ready,
  output notif_t           nt,
  input  logic             rq_valid,
  output logic             rq_ready,
  input  logic [SID_W-1:0] rq_sid,
  input  logic [15:0]      rq_len,
  output logic             rd_rsp_valid,
  output logic [15:0]      rd_rsp_len,
  output axis_t            m_app,
  output logic             m_app_valid,
  input  logic             m_app_ready,
  // payload buffer memory ports
  output logic             rxm_wr_valid,
  input  logic             rxm_wr_ready,
  output logic [WA_W-1:0]  rxm_wr_addr,
  output logic [DW-1:0]    rxm_wr_data,
  output logic [KW-1:0]    rxm_wr_strb,
  output logic             rxm_rd_valid,
  input  logic             rxm_rd_ready,
  output logic [WA_W-1:0]  rxm_rd_addr,
  input  logic             rxm_rsp_valid,
  input  logic [DW-1:0]    rxm_rsp_data,
  output logic             txm_wr_valid,
  input  logic             txm_wr_ready,
  output logic [WA_W-1:0]  txm_wr_addr,
  output logic [DW-1:0]    txm_wr_data,
  output logic [KW-1:0]    txm_wr_strb,
  output logic             txm_rd_valid,
  input  logic             txm_rd_ready,
  output logic [WA_W-1:0]  txm_rd_addr,
  input  logic             txm_rsp_valid,
  input  logic [DW-1:0]    txm_rsp_data,
  // statistics (AXI4-Lite)
  input  logic             s_awvalid,
  output logic             s_awready,
  input  logic [7:0]       s_awaddr,
  input  logic             s_wvalid,
  output logic             s_wready,
  input  logic [31:0]      s_wdata,
  output logic             s_bvalid,
  input  logic             s_bready,
  output logic [1:0]       s_bresp,
  input  logic             s_arvalid,
  output logic             s_arready,
  input  logic [7:0]       s_araddr,
  output logic             s_rvalid,
  input  logic             s_rready,
  output logic [31:0]      s_rdata,
  output logic [1:0]       s_rresp,
  // handler counters
  output logic [31:0]      in_drop_cnt,
  output logic [31:0]      out_drop_cnt,
  output logic [31:0]      icmp_echo_cnt
);
  axis_t arp_in, icmp_in, tcp_in, arp_out, icmp_out, tcp_out;
  logic  arp_in_valid, arp_in_ready, icmp_in_valid, icmp_in_ready, tcp_in_valid, tcp_in_ready;
  logic  arp_out_valid, arp_out_ready, icmp_out_valid, icmp_out_ready, tcp_out_valid, tcp_out_ready;
  logic        lup_valid, lup_rsp_valid, lup_hit;
  logic [31:0] lup_ip;
  logic [47:0] lup_mac;

  inbound_handler u_in (
    .clk, .rst, .my_mac, .my_ip,
    .s(s_eth), .s_valid(s_eth_valid), .s_ready(s_eth_ready),
    .m_arp(arp_in), .m_arp_valid(arp_in_valid), .m_arp_ready(arp_in_ready),
    .m_icmp(icmp_in), .m_icmp_valid(icmp_in_valid), .m_icmp_ready(icmp_in_ready),
    .m_tcp(tcp_in), .m_tcp_valid(tcp_in_valid), .m_tcp_ready(tcp_in_ready),
    .drop_cnt(in_drop_cnt)
  );

  arp_server u_arp (
    .clk, .rst, .my_mac, .my_ip,
    .s(arp_in), .s_valid(arp_in_valid), .s_ready(arp_in_ready),
    .m(arp_out), .m_valid(arp_out_valid), .m_ready(arp_out_ready),
    .lup_valid, .lup_ip, .lup_rsp_valid, .lup_hit, .lup_mac
  );

  icmp_server u_icmp (
    .clk, .rst,
    .s(icmp_in), .s_valid(icmp_in_valid), .s_ready(icmp_in_ready),
    .m(icmp_out), .m_valid(icmp_out_valid), .m_ready(icmp_out_ready),
    .echo_cnt(icmp_echo_cnt)
  );

  toe #(
    .MAX_SESS(MAX_SESS), .TAB_AW(TAB_AW), .WS_EN(WS_EN), .WS_LOCAL(WS_LOCAL), .MSS(MSS),
    .TICK(TICK), .RT_DELAY(RT_DELAY), .PR_DELAY(PR_DELAY), .TW_DELAY(TW_DELAY)
  ) u_toe (
    .clk, .rst, .my_ip,
    .s_net(tcp_in), .s_net_valid(tcp_in_valid), .s_net_ready(tcp_in_ready),
    .m_net(tcp_out), .m_net_valid(tcp_out_valid), .m_net_ready(tcp_out_ready),
    .lis_valid, .lis_ready, .lis_port, .lis_rsp_valid, .lis_rsp_ok,
    .op_valid, .op_ready, .op_ip, .op_port, .op_rsp_valid, .op_rsp_ok, .op_rsp_sid,
    .cl_valid, .cl_ready, .cl_sid,
    .tx_valid, .tx_ready, .tx_sid, .tx_len, .tx_rsp_valid, .tx_rsp_ok,
    .s_app, .s_app_valid, .s_app_ready,
    .nt_valid, .nt_ready, .nt,
    .rq_valid, .rq_ready, .rq_sid, .rq_len, .rd_rsp_valid, .rd_rsp_len,
    .m_app, .m_app_valid, .m_app_ready,
    .rxm_wr_valid, .rxm_wr_ready, .rxm_wr_addr, .rxm_wr_data, .rxm_wr_strb,
    .rxm_rd_valid, .rxm_rd_ready, .rxm_rd_addr, .rxm_rsp_valid, .rxm_rsp_data,
    .txm_wr_valid, .txm_wr_ready, .txm_wr_addr, .txm_wr_data, .txm_wr_strb,
    .txm_rd_valid, .txm_rd_ready, .txm_rd_addr, .txm_rsp_valid, .txm_rsp_data,
    .s_awvalid, .s_awready, .s_awaddr, .s_wvalid, .s_wready, .s_wdata,
    .s_bvalid, .s_bready, .s_bresp, .s_arvalid, .s_arready, .s_araddr,
    .s_rvalid, .s_rready, .s_rdata, .s_rresp
  );

  outbound_handler u_out (
    .clk, .rst, .my_mac,
    .s_arp(arp_out), .s_arp_valid(arp_out_valid), .s_arp_ready(arp_out_ready),
    .s_icmp(icmp_out), .s_icmp_valid(icmp_out_valid), .s_icmp_ready(icmp_out_ready),
    .s_tcp(tcp_out), .s_tcp_valid(tcp_out_valid), .s_tcp_ready(tcp_out_ready),
    .lup_valid, .lup_ip, .lup_rsp_valid, .lup_hit, .lup_mac,
    .m(m_eth), .m_valid(m_eth_valid), .m_ready(m_eth_ready),
    .drop_cnt(out_drop_cnt)
  );
endmodule
