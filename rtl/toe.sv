// toe: the TCP Offload Engine. It joins the incoming path (Rx Engine), the
// outgoing path (Tx Engine) and the state-keeping structures between
// them: Session Lookup with CuckooCAM and Session Table, Port Table, State
// Table, Rx and Tx SAR tables, the three timers (re-transmission, probe,
// time-wait), the Event Engine, Statistics and the two application
// interfaces. Payload buffers live in external memory: each of the Rx and
// Tx Buffers has its own word-wide memory port driven by a mem_access
// unit that handles unaligned, wrapping circular-buffer transfers.
// Network side: IPv4 packets carrying TCP (no Ethernet header), 512-bit
// AXI4-Stream, in from the Inbound and out to the Outbound Packet Handler.
// Table clients: State Table 0 Rx Engine, 1 Tx App If, 2 Tx Engine,
// 3 time-wait expiry; Rx SAR 0 Rx Engine, 1 Rx App If, 2 Tx Engine;
// Tx SAR 0 Rx Engine, 1 Tx Engine, 2 Tx App If. A time-wait expiry writes
// CLOSED and then releases the session.
// Statistics counters: 0 rx segments, 1 rx checksum errors, 2 rx drops,
// 3 rx payload bytes, 4 tx segments, 5 tx payload bytes,
// 6 re-transmission timeouts, 7 events.
module toe
  import limago_pkg::*;
#(
  parameter int MAX_SESS  = 10000,
  parameter int TAB_AW    = 13,
  parameter bit WS_EN     = 1'b1,
  parameter int WS_LOCAL  = 0,
  parameter int MSS       = 1460,
  parameter int TICK      = 322,      // cycles per timer tick (1 us at 322 MHz)
  parameter int RT_DELAY  = 1000,     // ticks
  parameter int PR_DELAY  = 1000,     // ticks
  parameter int TW_DELAY  = 10000,    // ticks
  localparam int REG_W    = 16 + WS_LOCAL,
  localparam int WA_W     = SID_W + REG_W - 6
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [31:0]      my_ip,
  // network
  input  axis_t            s_net,
  input  logic             s_net_valid,
  output logic             s_net_ready,
  output axis_t            m_net,
  output logic             m_net_valid,
  input  logic             m_net_ready,
  // application: listen
  input  logic             lis_valid,
  output logic             lis_ready,
  input  logic [15:0]      lis_port,
  output logic             lis_rsp_valid,
  output logic             lis_rsp_ok,
  // application: open / close
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
  // application: send
  input  logic             tx_valid,
  output logic             tx_ready,
  input  logic [SID_W-1:0] tx_sid,
  input  logic [15:0]      tx_len,
  output logic             tx_rsp_valid,
  output logic             tx_rsp_ok,
  input  axis_t            s_app,
  input  logic             s_app_valid,
  output logic             s_app_ready,
  // application: notifications and receive
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
  // Rx Buffer memory port
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
  // Tx Buffer memory port
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
  output logic [1:0]       s_rresp
);
  // ---------------- Port Table ----------------
  logic        pt_q_valid, pt_rsp_valid, pa_valid, pa_ready, prel_valid;
  logic [15:0] pt_q_port, pa_port, prel_port;
  port_state_e pt_rsp_state;
  port_table u_pt (
    .clk, .rst,
    .q_valid(pt_q_valid), .q_port(pt_q_port), .q_rsp_valid(pt_rsp_valid), .q_rsp_state(pt_rsp_state),
    .lis_valid, .lis_ready, .lis_port, .lis_rsp_valid, .lis_rsp_ok,
    .alloc_valid(pa_valid), .alloc_ready(pa_ready), .alloc_port(pa_port),
    .rel_valid(prel_valid), .rel_port(prel_port)
  );

  // ---------------- Session Lookup ----------------
  logic             sa_valid, sa_ready, sa_create, sa_rsp_valid;
  tuple_t           sa_tuple, sb_tuple, rev_tuple;
  logic             sb_valid, sb_ready, sb_rsp_valid, sl_hit, sl_created;
  logic [SID_W-1:0] sl_sid, rel_sid, rx_rel_sid, rev_sid, tw_sid;
  logic             rel_valid, rel_ready, rx_rel_valid, rev_valid, tw_pend;
  logic [SID_W-1:0] sess_used;
  session_lookup #(.MAX_SESS(MAX_SESS), .TAB_AW(TAB_AW)) u_sl (
    .clk, .rst,
    .a_valid(sa_valid), .a_ready(sa_ready), .a_tuple(sa_tuple), .a_create(sa_create),
    .a_rsp_valid(sa_rsp_valid),
    .b_valid(sb_valid), .b_ready(sb_ready), .b_tuple(sb_tuple), .b_create(1'b1),
    .b_rsp_valid(sb_rsp_valid),
    .rsp_hit(sl_hit), .rsp_created(sl_created), .rsp_sid(sl_sid),
    .rel_valid, .rel_ready, .rel_sid,
    .port_rel_valid(prel_valid), .port_rel(prel_port),
    .rev_valid, .rev_sid, .rev_tuple, .sess_used
  );

  // ---------------- State Table ----------------
  logic [3:0]            stq_valid, stq_ready, stq_we, stq_lock, strsp_valid;
  logic [3:0][SID_W-1:0] stq_sid;
  tcp_state_e [3:0]      stq_wdata;
  tcp_state_e            st_rdata;
  state_table #(.MAX_SESS(MAX_SESS)) u_st (
    .clk, .rst, .req_valid(stq_valid), .req_ready(stq_ready), .req_sid(stq_sid),
    .req_we(stq_we), .req_lock(stq_lock), .req_wdata(stq_wdata),
    .rsp_valid(strsp_valid), .rsp_data(st_rdata)
  );

  // ---------------- SAR tables ----------------
  logic [2:0]            rsq_valid, rsq_ready, rsq_we, rsrsp_valid;
  logic [2:0][SID_W-1:0] rsq_sid;
  logic [2:0][63:0]      rsq_wmask, rsq_wdata;
  rx_sar_t               rs_rdata;
  sar_table #(.MAX_SESS(MAX_SESS), .W($bits(rx_sar_t)), .NP(3)) u_rxsar (
    .clk, .rst, .req_valid(rsq_valid), .req_ready(rsq_ready), .req_sid(rsq_sid),
    .req_we(rsq_we), .req_wmask(rsq_wmask), .req_wdata(rsq_wdata),
    .rsp_valid(rsrsp_valid), .rsp_data(rs_rdata)
  );
  logic [2:0]            tsq_valid, tsq_ready, tsq_we, tsrsp_valid;
  logic [2:0][SID_W-1:0] tsq_sid;
  logic [2:0][$bits(tx_sar_t)-1:0] tsq_wmask, tsq_wdata;
  tx_sar_t               ts_rdata;
  sar_table #(.MAX_SESS(MAX_SESS), .W($bits(tx_sar_t)), .NP(3)) u_txsar (
    .clk, .rst, .req_valid(tsq_valid), .req_ready(tsq_ready), .req_sid(tsq_sid),
    .req_we(tsq_we), .req_wmask(tsq_wmask), .req_wdata(tsq_wdata),
    .rsp_valid(tsrsp_valid), .rsp_data(ts_rdata)
  );

  // ---------------- Timers ----------------
  logic             rx_rt_set, rx_rt_clr, rx_pr_set, rx_tw_set, tx_rt_set;
  logic [SID_W-1:0] rx_sid, tx_sid_c;
  logic             rt_fire, rt_fire_ready, pr_fire, pr_fire_ready, tw_fire, tw_fire_ready;
  logic [SID_W-1:0] rt_fsid, pr_fsid, tw_fsid;
  timer_array #(.MAX_SESS(MAX_SESS), .TICK(TICK), .DELAY(RT_DELAY)) u_rt (
    .clk, .rst,
    .set_valid(tx_rt_set || rx_rt_set), .set_sid(tx_rt_set ? tx_sid_c : rx_sid),
    .clr_valid(rx_rt_clr), .clr_sid(rx_sid),
    .fire_valid(rt_fire), .fire_ready(rt_fire_ready), .fire_sid(rt_fsid)
  );
  timer_array #(.MAX_SESS(MAX_SESS), .TICK(TICK), .DELAY(PR_DELAY)) u_probe (
    .clk, .rst, .set_valid(rx_pr_set), .set_sid(rx_sid), .clr_valid(1'b0), .clr_sid('0),
    .fire_valid(pr_fire), .fire_ready(pr_fire_ready), .fire_sid(pr_fsid)
  );
  timer_array #(.MAX_SESS(MAX_SESS), .TICK(TICK), .DELAY(TW_DELAY)) u_tw (
    .clk, .rst, .set_valid(rx_tw_set), .set_sid(rx_sid), .clr_valid(1'b0), .clr_sid('0),
    .fire_valid(tw_fire), .fire_ready(tw_fire_ready), .fire_sid(tw_fsid)
  );

  // time-wait expiry: write CLOSED, then release the session
  assign stq_valid[3] = tw_fire && !tw_pend;
  assign stq_sid[3]   = tw_fsid;
  assign stq_we[3]    = 1'b1;
  assign stq_lock[3]  = 1'b0;
  assign stq_wdata[3] = CLOSED;
  assign tw_fire_ready = stq_ready[3] && !tw_pend;
  assign rel_valid = rx_rel_valid || tw_pend;
  assign rel_sid   = rx_rel_valid ? rx_rel_sid : tw_sid;
  always_ff @(posedge clk) begin
    if (rst) begin
      tw_pend <= 1'b0;
      tw_sid  <= '0;
    end else begin
      if (tw_fire && tw_fire_ready) begin tw_pend <= 1'b1; tw_sid <= tw_fsid; end
      else if (tw_pend && !rx_rel_valid && rel_ready) tw_pend <= 1'b0;
    end
  end

  // ---------------- Event Engine ----------------
  event_t rx_ev, app_ev, loop_ev, ev;
  logic   rx_ev_valid, rx_ev_ready, app_ev_valid, app_ev_ready, loop_valid, loop_ready;
  logic   ev_valid, ev_ready;
  logic [31:0] ev_cnt;
  event_engine u_ee (
    .clk, .rst,
    .rx_ev, .rx_valid(rx_ev_valid), .rx_ready(rx_ev_ready),
    .loop_ev, .loop_valid, .loop_ready,
    .app_ev, .app_valid(app_ev_valid), .app_ready(app_ev_ready),
    .rt_sid(rt_fsid), .rt_valid(rt_fire), .rt_ready(rt_fire_ready),
    .probe_sid(pr_fsid), .probe_valid(pr_fire), .probe_ready(pr_fire_ready),
    .m(ev), .m_valid(ev_valid), .m_ready(ev_ready), .ev_cnt
  );

  // ---------------- Buffers ----------------
  logic             rb_wcmd_valid, rb_wcmd_ready, rb_wdat_valid, rb_wdat_ready;
  logic [REG_W-1:0] rb_wcmd_off, rb_rcmd_off;
  axis_t            rb_wdat;
  logic             rb_rcmd_valid, rb_rcmd_ready;
  logic [SID_W-1:0] rb_rcmd_sid;
  logic [15:0]      rb_rcmd_len;
  mem_access #(.SID_BITS(SID_W), .REG_W(REG_W)) u_rxbuf (
    .clk, .rst,
    .wcmd_valid(rb_wcmd_valid), .wcmd_ready(rb_wcmd_ready), .wcmd_sid(rx_sid), .wcmd_off(rb_wcmd_off),
    .wdat(rb_wdat), .wdat_valid(rb_wdat_valid), .wdat_ready(rb_wdat_ready),
    .rcmd_valid(rb_rcmd_valid), .rcmd_ready(rb_rcmd_ready), .rcmd_sid(rb_rcmd_sid),
    .rcmd_off(rb_rcmd_off), .rcmd_len(rb_rcmd_len),
    .rdat(m_app), .rdat_valid(m_app_valid), .rdat_ready(m_app_ready),
    .mwr_valid(rxm_wr_valid), .mwr_ready(rxm_wr_ready), .mwr_addr(rxm_wr_addr),
    .mwr_data(rxm_wr_data), .mwr_strb(rxm_wr_strb),
    .mrd_valid(rxm_rd_valid), .mrd_ready(rxm_rd_ready), .mrd_addr(rxm_rd_addr),
    .mrsp_valid(rxm_rsp_valid), .mrsp_data(rxm_rsp_data)
  );

  logic             tb_wcmd_valid, tb_wcmd_ready, tb_rcmd_valid, tb_rcmd_ready;
  logic [REG_W-1:0] tb_wcmd_off, tb_rcmd_off;
  logic [15:0]      tb_rcmd_len;
  axis_t            tb_rdat;
  logic             tb_rdat_valid, tb_rdat_ready;
  logic [SID_W-1:0] app_sid;
  mem_access #(.SID_BITS(SID_W), .REG_W(REG_W)) u_txbuf (
    .clk, .rst,
    .wcmd_valid(tb_wcmd_valid), .wcmd_ready(tb_wcmd_ready), .wcmd_sid(app_sid), .wcmd_off(tb_wcmd_off),
    .wdat(s_app), .wdat_valid(s_app_valid), .wdat_ready(s_app_ready),
    .rcmd_valid(tb_rcmd_valid), .rcmd_ready(tb_rcmd_ready), .rcmd_sid(tx_sid_c),
    .rcmd_off(tb_rcmd_off), .rcmd_len(tb_rcmd_len),
    .rdat(tb_rdat), .rdat_valid(tb_rdat_valid), .rdat_ready(tb_rdat_ready),
    .mwr_valid(txm_wr_valid), .mwr_ready(txm_wr_ready), .mwr_addr(txm_wr_addr),
    .mwr_data(txm_wr_data), .mwr_strb(txm_wr_strb),
    .mrd_valid(txm_rd_valid), .mrd_ready(txm_rd_ready), .mrd_addr(txm_rd_addr),
    .mrsp_valid(txm_rsp_valid), .mrsp_data(txm_rsp_data)
  );

  // ---------------- Rx Engine ----------------
  notif_t  rx_nt;
  logic    rx_nt_valid, rx_nt_ready;
  rx_sar_t rx_rs_wmask, rx_rs_wdata;
  tx_sar_t rx_ts_wmask, rx_ts_wdata;
  logic    st_pkt, st_cerr, st_drop, tx_spkt, tx_srt;
  logic [15:0] st_bytes, tx_sbytes;
  rx_engine #(.WS_EN(WS_EN), .WS_LOCAL(WS_LOCAL)) u_rx (
    .clk, .rst, .s(s_net), .s_valid(s_net_valid), .s_ready(s_net_ready),
    .pt_valid(pt_q_valid), .pt_port(pt_q_port), .pt_rsp_valid, .pt_rsp_state,
    .sl_valid(sa_valid), .sl_ready(sa_ready), .sl_tuple(sa_tuple), .sl_create(sa_create),
    .sl_rsp_valid(sa_rsp_valid), .sl_rsp_hit(sl_hit), .sl_rsp_sid(sl_sid),
    .rel_valid(rx_rel_valid), .rel_ready(rel_ready && rx_rel_valid), .rel_sid(rx_rel_sid),
    .st_valid(stq_valid[0]), .st_ready(stq_ready[0]), .st_we(stq_we[0]), .st_lock(stq_lock[0]),
    .st_sid(stq_sid[0]), .st_wdata(stq_wdata[0]), .st_rsp_valid(strsp_valid[0]), .st_rsp_data(st_rdata),
    .rs_valid(rsq_valid[0]), .rs_ready(rsq_ready[0]), .rs_we(rsq_we[0]),
    .rs_wmask(rx_rs_wmask), .rs_wdata(rx_rs_wdata), .rs_rsp_valid(rsrsp_valid[0]), .rs_rsp_data(rs_rdata),
    .ts_valid(tsq_valid[0]), .ts_ready(tsq_ready[0]), .ts_we(tsq_we[0]),
    .ts_wmask(rx_ts_wmask), .ts_wdata(rx_ts_wdata), .ts_rsp_valid(tsrsp_valid[0]), .ts_rsp_data(ts_rdata),
    .sid(rx_sid),
    .rt_set(rx_rt_set), .rt_clr(rx_rt_clr), .pr_set(rx_pr_set), .tw_set(rx_tw_set),
    .ev_valid(rx_ev_valid), .ev_ready(rx_ev_ready), .ev(rx_ev),
    .wcmd_valid(rb_wcmd_valid), .wcmd_ready(rb_wcmd_ready), .wcmd_off(rb_wcmd_off),
    .wdat(rb_wdat), .wdat_valid(rb_wdat_valid), .wdat_ready(rb_wdat_ready),
    .nt_valid(rx_nt_valid), .nt_ready(rx_nt_ready), .nt(rx_nt),
    .stat_pkt(st_pkt), .stat_csum_err(st_cerr), .stat_drop(st_drop), .stat_bytes(st_bytes)
  );
  assign rsq_sid[0]   = rx_sid;
  assign rsq_wmask[0] = rx_rs_wmask;
  assign rsq_wdata[0] = rx_rs_wdata;
  assign tsq_sid[0]   = rx_sid;
  assign tsq_wmask[0] = rx_ts_wmask;
  assign tsq_wdata[0] = rx_ts_wdata;

  // ---------------- Tx Engine ----------------
  tx_sar_t tx_ts_wmask, tx_ts_wdata;
  logic    tx_st_valid, tx_rs_valid;
  tx_engine #(.WS_EN(WS_EN), .WS_LOCAL(WS_LOCAL), .MSS(MSS)) u_tx (
    .clk, .rst, .my_ip,
    .ev, .ev_valid, .ev_ready, .sid(tx_sid_c),
    .rev_valid, .rev_tuple,
    .st_valid(tx_st_valid), .st_ready(stq_ready[2]), .st_rsp_valid(strsp_valid[2]), .st_rsp_data(st_rdata),
    .rs_valid(tx_rs_valid), .rs_ready(rsq_ready[2]), .rs_rsp_valid(rsrsp_valid[2]), .rs_rsp_data(rs_rdata),
    .ts_valid(tsq_valid[1]), .ts_ready(tsq_ready[1]), .ts_we(tsq_we[1]),
    .ts_wmask(tx_ts_wmask), .ts_wdata(tx_ts_wdata), .ts_rsp_valid(tsrsp_valid[1]), .ts_rsp_data(ts_rdata),
    .rcmd_valid(tb_rcmd_valid), .rcmd_ready(tb_rcmd_ready), .rcmd_off(tb_rcmd_off), .rcmd_len(tb_rcmd_len),
    .rdat(tb_rdat), .rdat_valid(tb_rdat_valid), .rdat_ready(tb_rdat_ready),
    .loop_valid, .loop_ready, .loop_ev,
    .rt_set(tx_rt_set),
    .m(m_net), .m_valid(m_net_valid), .m_ready(m_net_ready),
    .stat_pkt(tx_spkt), .stat_rt(tx_srt), .stat_bytes(tx_sbytes)
  );
  assign rev_sid      = tx_sid_c;
  assign stq_valid[2] = tx_st_valid;
  assign stq_sid[2]   = tx_sid_c;
  assign stq_we[2]    = 1'b0;
  assign stq_lock[2]  = 1'b0;
  assign stq_wdata[2] = CLOSED;
  assign rsq_valid[2] = tx_rs_valid;
  assign rsq_sid[2]   = tx_sid_c;
  assign rsq_we[2]    = 1'b0;
  assign rsq_wmask[2] = '0;
  assign rsq_wdata[2] = '0;
  assign tsq_sid[1]   = tx_sid_c;
  assign tsq_wmask[1] = tx_ts_wmask;
  assign tsq_wdata[1] = tx_ts_wdata;

  // ---------------- Rx App If ----------------
  rx_sar_t ra_wmask, ra_wdata;
  rx_app_if #(.WS_LOCAL(WS_LOCAL)) u_rxapp (
    .clk, .rst,
    .nt_in_valid(rx_nt_valid), .nt_in_ready(rx_nt_ready), .nt_in(rx_nt),
    .nt_valid, .nt_ready, .nt,
    .rq_valid, .rq_ready, .rq_sid, .rq_len, .rd_rsp_valid, .rd_rsp_len,
    .rs_valid(rsq_valid[1]), .rs_ready(rsq_ready[1]), .rs_we(rsq_we[1]),
    .rs_wmask(ra_wmask), .rs_wdata(ra_wdata), .rs_sid(rsq_sid[1]),
    .rs_rsp_valid(rsrsp_valid[1]), .rs_rsp_data(rs_rdata),
    .rcmd_valid(rb_rcmd_valid), .rcmd_ready(rb_rcmd_ready), .rcmd_sid(rb_rcmd_sid),
    .rcmd_off(rb_rcmd_off), .rcmd_len(rb_rcmd_len)
  );
  assign rsq_wmask[1] = ra_wmask;
  assign rsq_wdata[1] = ra_wdata;

  // ---------------- Tx App If ----------------
  tx_sar_t ta_wmask, ta_wdata;
  tx_app_if #(.WS_LOCAL(WS_LOCAL)) u_txapp (
    .clk, .rst,
    .op_valid, .op_ready, .op_ip, .op_port, .op_rsp_valid, .op_rsp_ok, .op_rsp_sid,
    .cl_valid, .cl_ready, .cl_sid,
    .tx_valid, .tx_ready, .tx_sid, .tx_len, .tx_rsp_valid, .tx_rsp_ok,
    .pa_valid, .pa_ready, .pa_port,
    .sl_valid(sb_valid), .sl_ready(sb_ready), .sl_tuple(sb_tuple),
    .sl_rsp_valid(sb_rsp_valid), .sl_rsp_hit(sl_hit), .sl_rsp_sid(sl_sid),
    .st_valid(stq_valid[1]), .st_ready(stq_ready[1]), .st_we(stq_we[1]), .st_lock(stq_lock[1]),
    .st_wdata(stq_wdata[1]), .st_rsp_valid(strsp_valid[1]), .st_rsp_data(st_rdata),
    .ts_valid(tsq_valid[2]), .ts_ready(tsq_ready[2]), .ts_we(tsq_we[2]),
    .ts_wmask(ta_wmask), .ts_wdata(ta_wdata), .ts_rsp_valid(tsrsp_valid[2]), .ts_rsp_data(ts_rdata),
    .sid(app_sid),
    .wcmd_valid(tb_wcmd_valid), .wcmd_ready(tb_wcmd_ready), .wcmd_off(tb_wcmd_off),
    .wdat_done(s_app_valid && s_app_ready && s_app.last),
    .ev_valid(app_ev_valid), .ev_ready(app_ev_ready), .ev(app_ev)
  );
  assign stq_sid[1]   = app_sid;
  assign tsq_sid[2]   = app_sid;
  assign tsq_wmask[2] = ta_wmask;
  assign tsq_wdata[2] = ta_wdata;

  // ---------------- Statistics ----------------
  logic [7:0]       sinc;
  logic [7:0][15:0] samt;
  assign sinc = {ev_valid && ev_ready, tx_srt, tx_spkt && tx_sbytes != 0, tx_spkt,
                 st_bytes != 0, st_drop, st_cerr, st_pkt};
  assign samt = {16'd1, 16'd1, tx_sbytes, 16'd1, st_bytes, 16'd1, 16'd1, 16'd1};
  statistics #(.NCNT(8)) u_stat (
    .clk, .rst, .inc(sinc), .inc_amt(samt),
    .s_awvalid, .s_awready, .s_awaddr, .s_wvalid, .s_wready, .s_wdata,
    .s_bvalid, .s_bready, .s_bresp, .s_arvalid, .s_arready, .s_araddr,
    .s_rvalid, .s_rready, .s_rdata, .s_rresp
  );
endmodule
