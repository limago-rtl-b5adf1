// tb_node: one Limago node for the system testbenches: the stack with
// its two payload memories (Rx and Tx Buffer) modelled behaviourally.
// FULL=1 instantiates the stack with all of its parameters at their
// defaults; FULL=0 uses the reduced parameters given to this wrapper.
module tb_node
  import limago_pkg::*;
#(
  parameter bit FULL     = 1'b0,
  parameter int MAX_SESS = 16,
  parameter int TAB_AW   = 4,
  parameter int WS_LOCAL = 0,
  parameter int TICK     = 4,
  parameter int RT_DELAY = 300,
  parameter int PR_DELAY = 200,
  parameter int TW_DELAY = 200
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [47:0]      my_mac,
  input  logic [31:0]      my_ip,
  input  axis_t            s_eth,
  input  logic             s_eth_valid,
  output logic             s_eth_ready,
  output axis_t            m_eth,
  output logic             m_eth_valid,
  input  logic             m_eth_ready,
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
  input  logic             s_arvalid,
  output logic             s_arready,
  input  logic [7:0]       s_araddr,
  output logic             s_rvalid,
  output logic [31:0]      s_rdata,
  output logic [31:0]      in_drop_cnt,
  output logic [31:0]      out_drop_cnt,
  output logic [31:0]      icmp_echo_cnt,
  output logic             rxm_wr_valid_o,
  output logic [31:0]      rxm_wr_idx_o
);
  localparam int WA_W = SID_W + 16 + (FULL ? 0 : WS_LOCAL) - 6;
  logic            rxm_wr_valid, rxm_wr_ready, rxm_rd_valid, rxm_rd_ready, rxm_rsp_valid;
  logic [WA_W-1:0] rxm_wr_addr, rxm_rd_addr, txm_wr_addr, txm_rd_addr;
  logic [511:0]    rxm_wr_data, rxm_rsp_data, txm_wr_data, txm_rsp_data;
  logic [63:0]     rxm_wr_strb, txm_wr_strb;
  logic            txm_wr_valid, txm_wr_ready, txm_rd_valid, txm_rd_ready, txm_rsp_valid;
  logic            awready, wready, bvalid;
  logic [1:0]      bresp, rresp;

  assign rxm_wr_valid_o = rxm_wr_valid && rxm_wr_ready;
  assign rxm_wr_idx_o   = 32'(rxm_wr_addr[WA_W-SID_W-1:0]);

  mem_model #(.WA_W(WA_W)) u_rxmem (
    .clk, .wr_valid(rxm_wr_valid), .wr_ready(rxm_wr_ready), .wr_addr(rxm_wr_addr),
    .wr_data(rxm_wr_data), .wr_strb(rxm_wr_strb), .rd_valid(rxm_rd_valid),
    .rd_ready(rxm_rd_ready), .rd_addr(rxm_rd_addr), .rsp_valid(rxm_rsp_valid), .rsp_data(rxm_rsp_data)
  );
  mem_model #(.WA_W(WA_W)) u_txmem (
    .clk, .wr_valid(txm_wr_valid), .wr_ready(txm_wr_ready), .wr_addr(txm_wr_addr),
    .wr_data(txm_wr_data), .wr_strb(txm_wr_strb), .rd_valid(txm_rd_valid),
    .rd_ready(txm_rd_ready), .rd_addr(txm_rd_addr), .rsp_valid(txm_rsp_valid), .rsp_data(txm_rsp_data)
  );

`define LIMAGO_PORTS \
    .clk, .rst, .my_mac, .my_ip, .s_eth, .s_eth_valid, .s_eth_ready, .m_eth, .m_eth_valid, .m_eth_ready, \
    .lis_valid, .lis_ready, .lis_port, .lis_rsp_valid, .lis_rsp_ok, \
    .op_valid, .op_ready, .op_ip, .op_port, .op_rsp_valid, .op_rsp_ok, .op_rsp_sid, \
    .cl_valid, .cl_ready, .cl_sid, .tx_valid, .tx_ready, .tx_sid, .tx_len, .tx_rsp_valid, .tx_rsp_ok, \
    .s_app, .s_app_valid, .s_app_ready, .nt_valid, .nt_ready, .nt, \
    .rq_valid, .rq_ready, .rq_sid, .rq_len, .rd_rsp_valid, .rd_rsp_len, .m_app, .m_app_valid, .m_app_ready, \
    .rxm_wr_valid, .rxm_wr_ready, .rxm_wr_addr, .rxm_wr_data, .rxm_wr_strb, \
    .rxm_rd_valid, .rxm_rd_ready, .rxm_rd_addr, .rxm_rsp_valid, .rxm_rsp_data, \
    .txm_wr_valid, .txm_wr_ready, .txm_wr_addr, .txm_wr_data, .txm_wr_strb, \
    .txm_rd_valid, .txm_rd_ready, .txm_rd_addr, .txm_rsp_valid, .txm_rsp_data, \
    .s_awvalid(1'b0), .s_awready(awready), .s_awaddr(8'd0), .s_wvalid(1'b0), .s_wready(wready), \
    .s_wdata(32'd0), .s_bvalid(bvalid), .s_bready(1'b1), .s_bresp(bresp), \
    .s_arvalid, .s_arready, .s_araddr, .s_rvalid, .s_rready(1'b1), .s_rdata, .s_rresp(rresp), \
    .in_drop_cnt, .out_drop_cnt, .icmp_echo_cnt

  if (FULL) begin : g_full
    limago_top u_dut (`LIMAGO_PORTS);
  end else begin : g_small
    limago_top #(
      .MAX_SESS(MAX_SESS), .TAB_AW(TAB_AW), .WS_LOCAL(WS_LOCAL), .TICK(TICK),
      .RT_DELAY(RT_DELAY), .PR_DELAY(PR_DELAY), .TW_DELAY(TW_DELAY)
    ) u_dut (`LIMAGO_PORTS);
  end
`undef LIMAGO_PORTS
endmodule
