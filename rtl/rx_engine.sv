// rx_engine: Rx Engine of the TOE, the incoming data path.
// Stage A (one beat per cycle): the first beat of every IPv4/TCP packet is
// parsed (addresses, ports, sequence and acknowledgement numbers, flags,
// window, header length, the first 24 option bytes) and the TCP pseudo
// header sum is formed; the checksum unit adds the TCP segment (bytes
// from 20 up to the IP total length, so Ethernet padding is ignored) and
// the packet waits in a data FIFO. At the end of the packet its parsed
// fields and the checksum verdict go to a metadata FIFO.
// The input is always ready, as an Ethernet MAC cannot be held off: a
// packet that finds no room in the data or metadata FIFO is dropped whole
// (the sender's re-transmission recovers it).
// Stage B is a finite state machine that takes one packet at a time: a
// bad checksum drops it; the Port Table is asked for the destination port
// (CLOSE: dropped and answered with RST); the Session Lookup turns the
// three-tuple into a sessionID (a SYN to a LISTEN port creates one); the
// State Table (locked read), Rx SAR and Tx SAR records are read; for SYN
// segments the option parser looks for the Window Scale option (the scale
// used is the smaller of ours and the peer's, 0 if the peer sends none).
// The decision then updates the three tables, posts at most one event to
// the Event Engine (SYN-ACK, ACK, FIN or TX), arms or clears timers,
// notifies the application and writes an in-order payload that fits the
// receive buffer to the Rx Buffer at offset (sequence number mod buffer
// size). Segments out of order are not kept: they are answered with a
// duplicate ACK. A peer FIN is answered with our FIN at once (the
// application is notified; there is no half-closed state).
// Stage B takes about 15 cycles plus one per payload beat per packet.
module rx_engine
  import limago_pkg::*;
#(
  parameter bit WS_EN    = 1'b1,   // Window Scale option support
  parameter int WS_LOCAL = 0,      // our window-scale shift (0..14)
  localparam int REG_W   = 16 + WS_LOCAL
) (
  input  logic             clk,
  input  logic             rst,
  input  axis_t            s,
  input  logic             s_valid,
  output logic             s_ready,
  // Port Table
  output logic             pt_valid,
  output logic [15:0]      pt_port,
  input  logic             pt_rsp_valid,
  input  port_state_e      pt_rsp_state,
  // Session Lookup
  output logic             sl_valid,
  input  logic             sl_ready,
  output tuple_t           sl_tuple,
  output logic             sl_create,
  input  logic             sl_rsp_valid,
  input  logic             sl_rsp_hit,
  input  logic [SID_W-1:0] sl_rsp_sid,
  output logic             rel_valid,
  input  logic             rel_ready,
  output logic [SID_W-1:0] rel_sid,
  // State Table
  output logic             st_valid,
  input  logic             st_ready,
  output logic             st_we,
  output logic             st_lock,
  output logic [SID_W-1:0] st_sid,
  output tcp_state_e       st_wdata,
  input  logic             st_rsp_valid,
  input  tcp_state_e       st_rsp_data,
  // Rx SAR
  output logic             rs_valid,
  input  logic             rs_ready,
  output logic             rs_we,
  output rx_sar_t          rs_wmask,
  output rx_sar_t          rs_wdata,
  input  logic             rs_rsp_valid,
  input  rx_sar_t          rs_rsp_data,
  // Tx SAR
  output logic             ts_valid,
  input  logic             ts_ready,
  output logic             ts_we,
  output tx_sar_t          ts_wmask,
  output tx_sar_t          ts_wdata,
  input  logic             ts_rsp_valid,
  input  tx_sar_t          ts_rsp_data,
  output logic [SID_W-1:0] sid,        // session of the table requests
  // timers (pulses for session sid)
  output logic             rt_set,
  output logic             rt_clr,
  output logic             pr_set,
  output logic             tw_set,
  // events
  output logic             ev_valid,
  input  logic             ev_ready,
  output event_t           ev,
  // Rx Buffer write
  output logic             wcmd_valid,
  input  logic             wcmd_ready,
  output logic [REG_W-1:0] wcmd_off,
  output axis_t            wdat,
  output logic             wdat_valid,
  input  logic             wdat_ready,
  // application notifications
  output logic             nt_valid,
  input  logic             nt_ready,
  output notif_t           nt,
  // statistics pulses
  output logic             stat_pkt,
  output logic             stat_csum_err,
  output logic             stat_drop,
  output logic [15:0]      stat_bytes
);
  typedef struct packed {
    logic [31:0]  src_ip;
    logic [15:0]  sport;
    logic [15:0]  dport;
    logic [31:0]  seq;
    logic [31:0]  ack;
    logic [7:0]   flags;
    logic [15:0]  win;
    logic [6:0]   hlen;     // IP + TCP header bytes
    logic [15:0]  plen;     // payload bytes
    logic [191:0] opt;
    logic [5:0]   optlen;
    logic         ok;
  } meta_t;

  // ---------------- stage A ----------------
  logic          sop;
  logic [15:0]   rem_q, rem_cur;
  meta_t         ma;
  logic [31:0]   psum;
  axis_t         sk;            // beat with keep limited to the IP length
  logic          cs_valid;
  logic [15:0]   cs_sum;
  logic          df_ready, mf_ready;
  logic [3:0]    mf_count;
  meta_t         mh;
  logic          mh_valid, mh_pop;
  axis_t         df;
  logic          df_valid, df_pop;

  assign rem_cur = sop ? rd16(s.data, 2) : rem_q;
  always_comb begin
    sk      = s;
    sk.keep = s.keep & keep_n((rem_cur > 16'd64) ? 64 : int'(rem_cur));
  end
  // The input never stalls (the Ethernet MAC cannot be held off): a packet
  // that does not fit in the data FIFO, or finds the metadata FIFO full,
  // is dropped whole when its first beat arrives.
  logic [6:0]  df_count;
  logic        dropping, take, fits;
  assign s_ready = 1'b1;
  assign fits    = (7'd64 - df_count) >= 7'((rd16(s.data, 2) + 16'd63) >> 6) && (mf_count < 4'd7);
  assign take    = s_valid && (sop ? fits : !dropping);

  always_ff @(posedge clk) begin
    if (rst) begin
      sop      <= 1'b1;
      rem_q    <= '0;
      dropping <= 1'b0;
    end else if (s_valid && s_ready) begin
      sop   <= s.last;
      if (sop) dropping <= !fits;
      rem_q <= (rem_cur > 16'd64) ? rem_cur - 16'd64 : 16'd0;
      if (sop && fits) begin
        logic [15:0] tl;
        logic [6:0]  hl;
        tl = rd16(s.data, 2);
        hl = 7'd20 + {1'b0, s.data[8*32+4 +: 4], 2'b00};
        ma.ok     <= 1'b0;
        ma.src_ip <= rd32(s.data, 12);
        ma.sport  <= rd16(s.data, 20);
        ma.dport  <= rd16(s.data, 22);
        ma.seq    <= rd32(s.data, 24);
        ma.ack    <= rd32(s.data, 28);
        ma.flags  <= rd8(s.data, 33);
        ma.win    <= rd16(s.data, 34);
        ma.hlen   <= hl;
        ma.plen   <= (tl > {9'd0, hl}) ? tl - {9'd0, hl} : 16'd0;
        ma.opt    <= s.data[8*40 +: 192];
        ma.optlen <= (hl > 7'd40) ? 6'(hl - 7'd40) : 6'd0;
      end
    end
  end

  always_comb begin
    psum = {16'd0, rd16(s.data, 12)} + {16'd0, rd16(s.data, 14)}
         + {16'd0, rd16(s.data, 16)} + {16'd0, rd16(s.data, 18)}
         + 32'(IP_TCP) + {16'd0, rd16(s.data, 2) - 16'd20};
  end

  csum_acc u_csum (
    .clk, .rst,
    .in_valid(take), .in_data(s.data),
    .in_keep(sop ? (sk.keep & ~keep_n(20)) : sk.keep), .in_last(s.last),
    .init(psum), .out_valid(cs_valid), .sum(cs_sum)
  );

  sync_fifo #(.W($bits(axis_t)), .DEPTH(64)) u_df (
    .clk, .rst,
    .wr_valid(take), .wr_ready(df_ready), .wr_data(sk),
    .rd_valid(df_valid), .rd_ready(df_pop), .rd_data(df), .count(df_count)
  );

  meta_t mw;
  always_comb begin
    mw    = ma;
    mw.ok = (cs_sum == 16'hFFFF);
  end
  sync_fifo #(.W($bits(meta_t)), .DEPTH(8)) u_mf (
    .clk, .rst,
    .wr_valid(cs_valid), .wr_ready(mf_ready), .wr_data(mw),
    .rd_valid(mh_valid), .rd_ready(mh_pop), .rd_data(mh), .count(mf_count)
  );

  // ---------------- stage B ----------------
  typedef enum logic [4:0] {
    B_IDLE, B_PORT, B_LOOK, B_LOOKW, B_ST, B_STW, B_RX, B_RXW, B_TX, B_TXW,
    B_OPT, B_OPTW, B_DEC, B_WST, B_WRX, B_WTX, B_EV, B_NT, B_REL, B_WCMD,
    B_DATA, B_DRAIN, B_RST, B_DONE
  } bst_e;
  bst_e        bs;
  logic [SID_W-1:0] sid_q;
  tcp_state_e  s_q, ns_q;
  rx_sar_t     rx_q, rxw_q, rxm_q;
  tx_sar_t     tx_q, txw_q, txm_q;
  logic        wr_rx_q, wr_tx_q, ev_do_q, nt_do_q, rel_q, pay_q;
  logic        rt_set_q, rt_clr_q, pr_set_q, tw_set_q;
  ev_type_e    ev_typ_q;
  notif_e      nt_kind_q;
  port_state_e ps_q;
  logic        opt_start, opt_busy, opt_done, opt_wsv;
  logic [3:0]  opt_ws;
  logic [31:0] iss_ctr;
  logic        wsv_q;
  logic [3:0]  ws_q;

  wire f_fin = mh.flags[F_FIN];
  wire f_syn = mh.flags[F_SYN];
  wire f_rst = mh.flags[F_RST];
  wire f_ack = mh.flags[F_ACK];

  tcp_opt_parser u_opt (
    .clk, .rst, .start(opt_start), .opt(mh.opt), .len(mh.optlen),
    .busy(opt_busy), .done(opt_done), .ws_valid(opt_wsv), .ws(opt_ws)
  );

  // decision
  tcp_state_e  d_ns;
  rx_sar_t     d_rx, d_rxm;
  tx_sar_t     d_tx, d_txm;
  logic        d_wrx, d_wtx, d_ev, d_nt, d_rel, d_pay, d_rts, d_rtc, d_prs, d_tws;
  ev_type_e    d_evt;
  notif_e      d_ntk;
  always_comb begin
    tcp_state_e s1;
    logic [3:0]  wsn;
    logic        acc, fin_in_flight, fin_acked, fin_ok;
    logic [31:0] freeb, rcv;
    d_ns = s_q; d_rx = rx_q; d_tx = tx_q; d_rxm = '0; d_txm = '0;
    d_wrx = 1'b0; d_wtx = 1'b0; d_ev = 1'b0; d_nt = 1'b0; d_rel = 1'b0; d_pay = 1'b0;
    d_rts = 1'b0; d_rtc = 1'b0; d_prs = 1'b0; d_tws = 1'b0;
    d_evt = EV_ACK; d_ntk = N_DATA;
    s1 = s_q;
    freeb = '0;
    fin_ok = 1'b0;
    wsn = (WS_EN && wsv_q) ? ((ws_q < 4'(WS_LOCAL)) ? ws_q : 4'(WS_LOCAL)) : 4'd0;
    acc = ((mh.ack - tx_q.una) <= (tx_q.nxt - tx_q.una));
    fin_in_flight = (tx_q.nxt == tx_q.app_w + 32'd1);
    fin_acked = 1'b0;
    rcv = rx_q.recvd;
    if (f_rst) begin
      if (s_q != CLOSED) begin
        d_ns = CLOSED; d_rel = 1'b1; d_rtc = 1'b1; d_nt = 1'b1; d_ntk = N_CLOSED;
      end
    end else if (f_syn && !f_ack) begin
      if (s_q == CLOSED) begin
        d_rx  = '{mh.seq + 32'd1, mh.seq + 32'd1};
        d_rxm = '1; d_wrx = 1'b1;
        d_tx  = '{iss_ctr, iss_ctr, iss_ctr + 32'd1, {16'd0, mh.win}, wsn};
        d_txm = '1; d_wtx = 1'b1;
        d_ns  = SYN_RECEIVED;
        d_ev  = 1'b1; d_evt = EV_SYNACK;
      end else if (s_q == SYN_RECEIVED) begin
        d_ev = 1'b1; d_evt = EV_SYNACK;
      end
    end else if (f_syn && f_ack) begin
      if (s_q == SYN_SENT && mh.ack == tx_q.nxt) begin
        d_rx  = '{mh.seq + 32'd1, mh.seq + 32'd1};
        d_rxm = '1; d_wrx = 1'b1;
        d_tx.una = mh.ack; d_tx.rwin = {16'd0, mh.win}; d_tx.ws = wsn;
        d_txm.una = '1; d_txm.rwin = '1; d_txm.ws = '1; d_wtx = 1'b1;
        d_ns = ESTABLISHED; d_rtc = 1'b1;
        d_ev = 1'b1; d_evt = EV_ACK;
        d_nt = 1'b1; d_ntk = N_OPENED;
      end else if (s_q == ESTABLISHED) begin
        d_ev = 1'b1; d_evt = EV_ACK;
      end
    end else if (f_ack) begin
      if (s_q == SYN_RECEIVED && mh.ack == tx_q.nxt) begin
        s1 = ESTABLISHED;
        d_nt = 1'b1; d_ntk = N_ACCEPTED;
      end
      if (s1 inside {ESTABLISHED, CLOSE_WAIT, FIN_WAIT_1, FIN_WAIT_2, CLOSING, LAST_ACK}) begin
        if (acc) begin
          d_tx.una  = mh.ack;
          d_tx.rwin = {16'd0, mh.win} << tx_q.ws;
          d_txm.una = '1; d_txm.rwin = '1; d_wtx = 1'b1;
          if (mh.ack == tx_q.nxt) d_rtc = 1'b1;
          else if (mh.ack != tx_q.una) d_rts = 1'b1;
          if (mh.win == 16'd0 && tx_q.app_w != tx_q.nxt) d_prs = 1'b1;
          if ((mh.ack != tx_q.una || tx_q.rwin == 32'd0) && tx_q.app_w != tx_q.nxt && !fin_in_flight) begin
            d_ev = 1'b1; d_evt = EV_TX;
          end
          fin_acked = (mh.ack == tx_q.nxt) && fin_in_flight;
          if (fin_acked) begin
            if (s1 == FIN_WAIT_1) s1 = FIN_WAIT_2;
            else if (s1 == CLOSING) begin s1 = TIME_WAIT; d_tws = 1'b1; end
            else if (s1 == LAST_ACK) begin
              s1 = CLOSED; d_rel = 1'b1; d_nt = 1'b1; d_ntk = N_CLOSED;
            end
          end
        end
        if (mh.plen != 16'd0 && s1 inside {ESTABLISHED, FIN_WAIT_1, FIN_WAIT_2}) begin
          freeb = (32'd1 << REG_W) - (rx_q.recvd - rx_q.app_rd);
          d_ev = 1'b1; d_evt = EV_ACK;
          if (mh.seq == rx_q.recvd && {16'd0, mh.plen} <= freeb && mh.hlen < 7'd64) begin
            d_pay = 1'b1;
            rcv = rx_q.recvd + {16'd0, mh.plen};
            d_rx.recvd = rcv; d_rxm.recvd = '1; d_wrx = 1'b1;
            d_nt = 1'b1; d_ntk = N_DATA;
          end
        end
        // an empty segment that is not the next expected one (a window
        // probe) is answered with an ACK (RFC 793)
        if (mh.plen == 16'd0 && !f_fin && mh.seq != rx_q.recvd &&
            (s1 inside {ESTABLISHED, FIN_WAIT_1, FIN_WAIT_2, CLOSE_WAIT})) begin
          d_ev = 1'b1; d_evt = EV_ACK;
        end
        fin_ok = f_fin && (mh.seq + {16'd0, mh.plen} == rcv) &&
                 (s1 inside {ESTABLISHED, FIN_WAIT_1, FIN_WAIT_2});
        if (fin_ok) begin
          d_rx.recvd = rcv + 32'd1; d_rxm.recvd = '1; d_wrx = 1'b1;
          d_ev = 1'b1;
          if (s1 == ESTABLISHED) begin
            s1 = LAST_ACK; d_evt = EV_FIN;
            if (!d_pay) begin d_nt = 1'b1; d_ntk = N_CLOSED; end
          end else if (s1 == FIN_WAIT_1) begin
            s1 = CLOSING; d_evt = EV_ACK;
          end else begin
            s1 = TIME_WAIT; d_evt = EV_ACK; d_tws = 1'b1; d_rtc = 1'b1;
          end
        end
        d_ns = s1;
      end
    end
  end

  // control signals
  always_comb begin
    pt_valid = 1'b0; pt_port = mh.dport;
    sl_valid = (bs == B_LOOK);
    sl_tuple = '{mh.src_ip, mh.sport, mh.dport};
    sl_create = f_syn && !f_ack && ps_q == P_LISTEN;
    rel_valid = (bs == B_REL) && rel_q; rel_sid = sid_q;
    st_valid = (bs == B_ST) || (bs == B_WST);
    st_we    = (bs == B_WST); st_lock = (bs == B_ST); st_sid = sid_q; st_wdata = ns_q;
    rs_valid = (bs == B_RX) || (bs == B_WRX);
    rs_we    = (bs == B_WRX); rs_wmask = rxm_q; rs_wdata = rxw_q;
    ts_valid = (bs == B_TX) || (bs == B_WTX);
    ts_we    = (bs == B_WTX); ts_wmask = txm_q; ts_wdata = txw_q;
    sid      = sid_q;
    ev_valid = ((bs == B_EV) && ev_do_q) || (bs == B_RST);
    ev       = '0;
    if (bs == B_RST) begin
      ev.typ   = EV_RST;
      ev.tuple = '{mh.src_ip, mh.sport, mh.dport};
      ev.seq   = f_ack ? mh.ack : 32'd0;
      ev.ack   = mh.seq + {16'd0, mh.plen} + {31'd0, f_syn} + {31'd0, f_fin};
    end else begin
      ev.typ = ev_typ_q;
      ev.sid = sid_q;
    end
    nt_valid = (bs == B_NT) && nt_do_q;
    nt       = '{nt_kind_q, sid_q, mh.plen};
    wcmd_valid = (bs == B_WCMD);
    wcmd_off   = rx_q.recvd[REG_W-1:0];
    opt_start  = (bs == B_OPT);
    if (bs == B_IDLE && mh_valid && mh.ok) pt_valid = 1'b1;
    rt_set = (bs == B_WST) && rt_set_q;
    rt_clr = (bs == B_WST) && rt_clr_q;
    pr_set = (bs == B_WST) && pr_set_q;
    tw_set = (bs == B_WST) && tw_set_q;
  end

  // payload path: data FIFO -> strip headers -> Rx Buffer
  logic st_in_ready;
  assign df_pop = (bs == B_DRAIN) ? df_valid : ((bs == B_DATA) && st_in_ready);
  axis_strip u_strip (
    .clk, .rst, .n_bytes(mh.hlen[5:0]),
    .s(df), .s_valid(df_valid && bs == B_DATA), .s_ready(st_in_ready),
    .m(wdat), .m_valid(wdat_valid), .m_ready(wdat_ready)
  );
  assign mh_pop = (bs == B_DONE);

  always_ff @(posedge clk) begin
    stat_pkt      <= 1'b0;
    stat_csum_err <= 1'b0;
    stat_drop     <= 1'b0;
    stat_bytes    <= '0;
    if (rst) begin
      bs      <= B_IDLE;
      iss_ctr <= 32'h1000_0000;
    end else begin
      iss_ctr <= iss_ctr + 32'd1;
      unique case (bs)
        B_IDLE: if (mh_valid) begin
          stat_pkt <= 1'b1;
          if (!mh.ok) begin stat_csum_err <= 1'b1; bs <= B_DRAIN; end
          else bs <= B_PORT;
        end
        B_PORT: if (pt_rsp_valid) begin
          ps_q <= pt_rsp_state;
          if (pt_rsp_state == P_CLOSE) begin
            stat_drop <= 1'b1;
            bs <= f_rst ? B_DRAIN : B_RST;
          end else bs <= B_LOOK;
        end
        B_LOOK:  if (sl_ready) bs <= B_LOOKW;
        B_LOOKW: if (sl_rsp_valid) begin
          sid_q <= sl_rsp_sid;
          if (sl_rsp_hit) bs <= B_ST;
          else begin stat_drop <= 1'b1; bs <= B_DRAIN; end
        end
        B_ST:  if (st_ready) bs <= B_STW;
        B_STW: if (st_rsp_valid) begin s_q <= st_rsp_data; bs <= B_RX; end
        B_RX:  if (rs_ready) bs <= B_RXW;
        B_RXW: if (rs_rsp_valid) begin rx_q <= rs_rsp_data; bs <= B_TX; end
        B_TX:  if (ts_ready) bs <= B_TXW;
        B_TXW: if (ts_rsp_valid) begin
          tx_q  <= ts_rsp_data;
          wsv_q <= 1'b0;
          ws_q  <= '0;
          bs    <= (f_syn && WS_EN) ? B_OPT : B_DEC;
        end
        B_OPT:  if (!opt_busy) bs <= B_OPTW;
        B_OPTW: if (opt_done) begin wsv_q <= opt_wsv; ws_q <= opt_ws; bs <= B_DEC; end
        B_DEC: begin
          ns_q <= d_ns; rxw_q <= d_rx; rxm_q <= d_rxm; txw_q <= d_tx; txm_q <= d_txm;
          wr_rx_q <= d_wrx; wr_tx_q <= d_wtx; ev_do_q <= d_ev; ev_typ_q <= d_evt;
          nt_do_q <= d_nt; nt_kind_q <= d_ntk; rel_q <= d_rel; pay_q <= d_pay;
          rt_set_q <= d_rts; rt_clr_q <= d_rtc; pr_set_q <= d_prs; tw_set_q <= d_tws;
          bs <= B_WST;
        end
        B_WST: if (st_ready) bs <= wr_rx_q ? B_WRX : wr_tx_q ? B_WTX : B_EV;
        B_WRX: if (rs_ready) bs <= wr_tx_q ? B_WTX : B_EV;
        B_WTX: if (ts_ready) bs <= B_EV;
        B_EV:  if (!ev_do_q || ev_ready) bs <= B_NT;
        B_NT:  if (!nt_do_q || nt_ready) bs <= B_REL;
        B_REL: if (!rel_q || rel_ready) begin
          bs <= pay_q ? B_WCMD : B_DRAIN;
          if (pay_q) stat_bytes <= mh.plen;
        end
        B_WCMD: if (wcmd_ready) bs <= B_DATA;
        B_DATA: if (wdat_valid && wdat_ready && wdat.last) bs <= B_DONE;
        B_RST:  if (ev_ready) bs <= B_DRAIN;
        B_DRAIN: if (df_valid && df.last) bs <= B_DONE;
        B_DONE: bs <= B_IDLE;
        default: bs <= B_IDLE;
      endcase
    end
  end
endmodule
