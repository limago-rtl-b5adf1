// tx_engine: Tx Engine of the TOE, the outgoing data path. Every event
// from the Event Engine makes at most one TCP segment. The event carries
// the sessionID, so the Session Table (remote address and ports), State
// Table, Rx SAR and Tx SAR records are read right away. The decision:
//  SYN / SYN-ACK (also on re-transmission in SYN_SENT / SYN_RECEIVED):
//    sequence number una, Window Scale option if enabled;
//  TX, ACK, PROBE: send min(MSS, unsent data, usable peer window) bytes
//    from nxt if that is more than 0, else (ACK) a bare ACK or (PROBE) a
//    bare ACK with sequence number nxt-1 that the peer must answer; when
//    data is left and the window allows, a TX event is fed back;
//  RT (re-transmission timer): go back to una and send again from there
//    (go-back-N), or resend the FIN;
//  FIN: once all data is sent, FIN+ACK with sequence number nxt;
//  RST (port closed): RST+ACK with the numbers carried by the event.
// Payload is read from the Tx Buffer at offset (sequence mod buffer size)
// into a FIFO while the checksum unit sums it; then the TCP header (with
// the pseudo-header sum, header sum and payload sum folded into its
// checksum) and the IPv4 header are built and prepended, and the packet
// goes to the Outbound Packet Handler. Finally nxt is written back and
// the re-transmission timer armed. The advertised window is the free
// space of the receive buffer shifted right by the negotiated scale.
module tx_engine
  import limago_pkg::*;
#(
  parameter bit WS_EN    = 1'b1,
  parameter int WS_LOCAL = 0,
  parameter int MSS      = 1460,
  localparam int REG_W   = 16 + WS_LOCAL
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [31:0]      my_ip,
  input  event_t           ev,
  input  logic             ev_valid,
  output logic             ev_ready,
  output logic [SID_W-1:0] sid,
  output logic             rev_valid,
  input  tuple_t           rev_tuple,
  output logic             st_valid,
  input  logic             st_ready,
  input  logic             st_rsp_valid,
  input  tcp_state_e       st_rsp_data,
  output logic             rs_valid,
  input  logic             rs_ready,
  input  logic             rs_rsp_valid,
  input  rx_sar_t          rs_rsp_data,
  output logic             ts_valid,
  input  logic             ts_ready,
  output logic             ts_we,
  output tx_sar_t          ts_wmask,
  output tx_sar_t          ts_wdata,
  input  logic             ts_rsp_valid,
  input  tx_sar_t          ts_rsp_data,
  output logic             rcmd_valid,
  input  logic             rcmd_ready,
  output logic [REG_W-1:0] rcmd_off,
  output logic [15:0]      rcmd_len,
  input  axis_t            rdat,
  input  logic             rdat_valid,
  output logic             rdat_ready,
  output logic             loop_valid,
  input  logic             loop_ready,
  output event_t           loop_ev,
  output logic             rt_set,
  output axis_t            m,
  output logic             m_valid,
  input  logic             m_ready,
  output logic             stat_pkt,
  output logic             stat_rt,
  output logic [15:0]      stat_bytes
);
  typedef enum logic [3:0] {
    T_IDLE, T_REV, T_ST, T_STW, T_RS, T_RSW, T_TS, T_TSW, T_DEC, T_RCMD,
    T_PAY, T_CSW, T_HDR, T_SEND, T_UPD, T_LOOP
  } tst_e;
  tst_e       ts;
  event_t     e_q;
  tuple_t     tp_q;
  tcp_state_e s_q;
  rx_sar_t    rx_q;
  tx_sar_t    tx_q;
  // decision results
  logic        snd_q, synopt_q, loop_q, rts_q;
  logic [7:0]  flg_q;
  logic [31:0] seq_q, ack_q, nnxt_q;
  logic [15:0] plen_q, win_q;
  ev_type_e    lty_q;
  logic [15:0] psum_q;
  logic [15:0] ipid;

  // ---------------- decision ----------------
  logic        d_snd, d_synopt, d_loop, d_rts;
  logic [7:0]  d_flg;
  logic [31:0] d_seq, d_nnxt;
  logic [15:0] d_plen, d_win;
  ev_type_e    d_lty;
  always_comb begin
    logic [31:0] base, avail, infl, wl, pl, freeb, w;
    logic        data_st, fin_st;
    d_snd = 1'b0; d_synopt = 1'b0; d_loop = 1'b0; d_rts = 1'b0;
    d_flg = '0; d_seq = tx_q.nxt; d_nnxt = tx_q.nxt; d_plen = '0; d_lty = EV_TX;
    freeb = (32'd1 << REG_W) - (rx_q.recvd - rx_q.app_rd);
    w     = freeb >> tx_q.ws;
    d_win = (w > 32'hFFFF) ? 16'hFFFF : w[15:0];
    data_st = (s_q == ESTABLISHED) || (s_q == CLOSE_WAIT);
    fin_st  = (s_q == FIN_WAIT_1) || (s_q == LAST_ACK) || (s_q == CLOSING);
    base  = (e_q.typ == EV_RT) ? tx_q.una : tx_q.nxt;
    avail = tx_q.app_w - base;
    infl  = base - tx_q.una;
    wl    = (tx_q.rwin > infl) ? tx_q.rwin - infl : 32'd0;
    pl    = (avail < wl) ? avail : wl;
    if (pl > 32'(MSS)) pl = 32'(MSS);
    unique case (e_q.typ)
      EV_SYN, EV_SYNACK, EV_RT, EV_TX, EV_ACK, EV_PROBE, EV_FIN: begin
        if ((e_q.typ inside {EV_SYN, EV_RT}) && s_q == SYN_SENT) begin
          d_snd = 1'b1; d_flg = 8'h02; d_seq = tx_q.una; d_nnxt = tx_q.una + 32'd1;
          d_synopt = WS_EN; d_rts = 1'b1;
          d_win = (freeb > 32'hFFFF) ? 16'hFFFF : freeb[15:0];
        end else if ((e_q.typ inside {EV_SYNACK, EV_RT}) && s_q == SYN_RECEIVED) begin
          d_snd = 1'b1; d_flg = 8'h12; d_seq = tx_q.una; d_nnxt = tx_q.una + 32'd1;
          d_synopt = WS_EN; d_rts = 1'b1;
          d_win = (freeb > 32'hFFFF) ? 16'hFFFF : freeb[15:0];
        end else if (e_q.typ == EV_RT && fin_st && tx_q.una == tx_q.app_w) begin
          d_snd = 1'b1; d_flg = 8'h11; d_seq = tx_q.app_w; d_nnxt = tx_q.app_w + 32'd1; d_rts = 1'b1;
        end else if ((data_st || (fin_st && e_q.typ inside {EV_FIN, EV_RT})) && pl != 32'd0 &&
                     !(e_q.typ inside {EV_SYN, EV_SYNACK})) begin
          d_snd = 1'b1; d_flg = 8'h18; d_seq = base; d_plen = pl[15:0];
          d_nnxt = base + pl; d_rts = 1'b1;
          if (e_q.typ == EV_FIN) begin d_loop = 1'b1; d_lty = EV_FIN; end
          else if (avail != pl && wl != pl) begin d_loop = 1'b1; d_lty = EV_TX; end
        end else if (e_q.typ == EV_FIN && fin_st && tx_q.nxt == tx_q.app_w) begin
          d_snd = 1'b1; d_flg = 8'h11; d_seq = tx_q.nxt; d_nnxt = tx_q.nxt + 32'd1; d_rts = 1'b1;
        end else if ((e_q.typ inside {EV_ACK, EV_PROBE}) && !(s_q inside {CLOSED, SYN_SENT, SYN_RECEIVED})) begin
          d_snd = 1'b1; d_flg = 8'h10;
          // a probe carries the sequence number before the next byte, so
          // that the peer must answer with its current window
          if (e_q.typ == EV_PROBE) d_seq = tx_q.nxt - 32'd1;
        end
      end
      default: begin   // EV_RST
        d_snd = 1'b1; d_flg = 8'h14; d_seq = e_q.seq; d_win = '0;
      end
    endcase
  end

  // ---------------- headers ----------------
  logic [DW-1:0] hdr;
  logic [6:0]    hlen;
  always_comb begin
    logic [5:0]  thl;
    logic [15:0] tcplen;
    logic [31:0] tsum, dst;
    logic [DW-1:0] t;
    tuple_t tp;
    tp  = (e_q.typ == EV_RST) ? e_q.tuple : tp_q;
    thl = synopt_q ? 6'd24 : 6'd20;
    tcplen = {10'd0, thl} + plen_q;
    dst = tp.ip;
    hdr = '0;
    // IPv4 header
    hdr = wr8 (hdr, 0, 8'h45);
    hdr = wr16(hdr, 2, tcplen + 16'd20);
    hdr = wr16(hdr, 4, ipid);
    hdr = wr16(hdr, 6, 16'h4000);
    hdr = wr8 (hdr, 8, 8'd64);
    hdr = wr8 (hdr, 9, IP_TCP);
    hdr = wr32(hdr, 12, my_ip);
    hdr = wr32(hdr, 16, dst);
    hdr = wr16(hdr, 10, ~fold16(sum_bytes(hdr, 20)));
    // TCP header
    t = '0;
    t = wr16(t, 0, tp.lport);
    t = wr16(t, 2, tp.rport);
    t = wr32(t, 4, seq_q);
    t = wr32(t, 8, ack_q);
    t = wr8 (t, 12, {thl[5:2], 4'd0});
    t = wr8 (t, 13, flg_q);
    t = wr16(t, 14, win_q);
    if (synopt_q) t = wr32(t, 20, {8'd1, 8'd3, 8'd3, 8'(WS_LOCAL)});
    tsum = sum_bytes(t, 24)
         + {16'd0, my_ip[31:16]} + {16'd0, my_ip[15:0]}
         + {16'd0, dst[31:16]} + {16'd0, dst[15:0]}
         + 32'(IP_TCP) + {16'd0, tcplen} + {16'd0, psum_q};
    t = wr16(t, 16, ~fold16(tsum));
    hdr  = hdr | (t << 160);
    hlen = 7'd20 + {1'b0, thl};
  end

  // ---------------- payload ----------------
  axis_t pf;
  logic  pf_valid, pf_ready, pf_in_ready, cs_valid;
  logic [15:0] cs_sum;
  assign rdat_ready = (ts == T_PAY) && pf_in_ready;
  csum_acc u_csum (
    .clk, .rst, .in_valid(rdat_valid && rdat_ready), .in_data(rdat.data),
    .in_keep(rdat.keep), .in_last(rdat.last), .init(32'd0),
    .out_valid(cs_valid), .sum(cs_sum)
  );
  sync_fifo #(.W($bits(axis_t)), .DEPTH(64)) u_pf (
    .clk, .rst, .wr_valid(rdat_valid && rdat_ready), .wr_ready(pf_in_ready), .wr_data(rdat),
    .rd_valid(pf_valid), .rd_ready(pf_ready), .rd_data(pf), .count()
  );

  logic hdr_ready;
  axis_insert u_ins (
    .clk, .rst, .hdr(hdr), .hlen(hlen), .has_pl(plen_q != 16'd0),
    .hdr_valid(ts == T_HDR), .hdr_ready(hdr_ready),
    .s(pf), .s_valid(pf_valid), .s_ready(pf_ready),
    .m(m), .m_valid(m_valid), .m_ready(m_ready)
  );

  // ---------------- control ----------------
  assign ev_ready  = (ts == T_IDLE);
  assign sid       = e_q.sid;
  assign rev_valid = (ts == T_REV);
  assign st_valid  = (ts == T_ST);
  assign rs_valid  = (ts == T_RS);
  assign ts_valid  = (ts == T_TS) || (ts == T_UPD);
  assign ts_we     = (ts == T_UPD);
  always_comb begin
    ts_wmask     = '0;
    ts_wmask.nxt = '1;
    ts_wdata     = '0;
    ts_wdata.nxt = nnxt_q;
  end
  assign rcmd_valid = (ts == T_RCMD);
  assign rcmd_off   = seq_q[REG_W-1:0];
  assign rcmd_len   = plen_q;
  assign loop_valid = (ts == T_LOOP);
  always_comb begin
    loop_ev     = '0;
    loop_ev.typ = lty_q;
    loop_ev.sid = e_q.sid;
  end
  assign rt_set = (ts == T_UPD) && ts_ready && rts_q;

  always_ff @(posedge clk) begin
    stat_pkt   <= 1'b0;
    stat_rt    <= 1'b0;
    stat_bytes <= '0;
    if (rst) begin
      ts     <= T_IDLE;
      ipid   <= '0;
      psum_q <= '0;
      e_q    <= '0;
    end else begin
      unique case (ts)
        T_IDLE: if (ev_valid) begin
          e_q <= ev;
          ts  <= (ev.typ == EV_RST) ? T_DEC : T_REV;
          if (ev.typ == EV_RST) begin
            s_q <= CLOSED; rx_q <= '0; tx_q <= '0;
          end
        end
        T_REV: ts <= T_ST;
        T_ST:  begin tp_q <= rev_tuple; if (st_ready) ts <= T_STW; end
        T_STW: if (st_rsp_valid) begin s_q <= st_rsp_data; ts <= T_RS; end
        T_RS:  if (rs_ready) ts <= T_RSW;
        T_RSW: if (rs_rsp_valid) begin rx_q <= rs_rsp_data; ts <= T_TS; end
        T_TS:  if (ts_ready) ts <= T_TSW;
        T_TSW: if (ts_rsp_valid) begin tx_q <= ts_rsp_data; ts <= T_DEC; end
        T_DEC: begin
          snd_q <= d_snd; synopt_q <= d_synopt; loop_q <= d_loop; rts_q <= d_rts;
          flg_q <= d_flg; seq_q <= d_seq; nnxt_q <= d_nnxt; plen_q <= d_plen;
          win_q <= d_win; lty_q <= d_lty;
          ack_q <= (e_q.typ == EV_RST) ? e_q.ack : rx_q.recvd;
          psum_q <= '0;
          if (e_q.typ == EV_RT) stat_rt <= 1'b1;
          if (!d_snd) ts <= d_loop ? T_LOOP : T_IDLE;
          else ts <= (d_plen != 16'd0) ? T_RCMD : T_HDR;
        end
        T_RCMD: if (rcmd_ready) ts <= T_PAY;
        T_PAY:  if (rdat_valid && rdat_ready && rdat.last) ts <= T_CSW;
        T_CSW:  if (cs_valid) begin psum_q <= cs_sum; ts <= T_HDR; end
        T_HDR:  if (hdr_ready) begin
          ipid <= ipid + 16'd1;
          stat_pkt   <= 1'b1;
          stat_bytes <= plen_q;
          // a header-only segment leaves the inserter on this handshake
          if (plen_q != 16'd0)          ts <= T_SEND;
          else if (e_q.typ == EV_RST)   ts <= T_IDLE;
          else                          ts <= T_UPD;
        end
        T_SEND: if (m_valid && m_ready && m.last) ts <= (e_q.typ == EV_RST) ? T_IDLE : T_UPD;
        T_UPD:  if (ts_ready) ts <= loop_q ? T_LOOP : T_IDLE;
        T_LOOP: if (loop_ready) ts <= T_IDLE;
        default: ts <= T_IDLE;
      endcase
    end
  end
endmodule
