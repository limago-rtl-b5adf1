// tb_limago_full: the same end-to-end scenario as tb_limago_top, run on
// two nodes whose stack has every parameter at its default: 10,000
// sessions, 64 KiB buffers without window scaling, timer tick of 322
// cycles, re-transmission and probe after 1000 ticks and TIME-WAIT of
// 10,000 ticks (about 3.2 million cycles). Node A sends 150,000 bytes in
// random chunks to B's echo server and checks the echo; the link drops
// and corrupts one segment each, B pauses its reader so the window
// closes, and the connection is closed down to TIME-WAIT expiry. At this
// size the sender's buffer equals the receiver's window, so a closed
// window leaves no unsent data and no probe is needed: the probe count is
// printed but not required here (tb_limago_top requires it).
`timescale 1ns/1ps
module tb_limago_full;
  import limago_pkg::*;

  localparam int TOTAL = 150000;       // bytes sent by A and echoed by B
  localparam int WD    = 12000000;      // watchdog, cycles
  localparam int TMO   = 4000000;       // time-out of a single step, cycles
  localparam int EXP_WS = 0;           // negotiated window scale

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  `define STEP begin @(negedge clk); #1; end
  `define CHECK(c, msg) begin checks++; if (!(c)) begin failures++; $display("FAIL %0t: %s", $time, msg); end end

  localparam logic [47:0] MAC_A = 48'h02_00_00_00_00_0a, MAC_B = 48'h02_00_00_00_00_0b;
  localparam logic [31:0] IP_A  = 32'h0a000001, IP_B = 32'h0a000002;

  // ---------------- node signals ----------------
  axis_t a_tx, b_tx, a_rx, b_rx;
  logic  a_tx_v, a_tx_r, b_tx_v, b_tx_r, a_rx_v, a_rx_r, b_rx_v, b_rx_r;

  logic             a_lis_v, a_lis_r, a_lis_rv, a_lis_ok, b_lis_v, b_lis_r, b_lis_rv, b_lis_ok;
  logic [15:0]      a_lis_p, b_lis_p;
  logic             a_op_v, a_op_r, a_op_rv, a_op_ok, b_op_v, b_op_r, b_op_rv, b_op_ok;
  logic [31:0]      a_op_ip, b_op_ip;
  logic [15:0]      a_op_p, b_op_p;
  logic [SID_W-1:0] a_op_sid, b_op_sid, a_cl_sid, b_cl_sid, a_tx_sid, b_tx_sid, a_rq_sid, b_rq_sid;
  logic             a_cl_v, a_cl_r, b_cl_v, b_cl_r;
  logic             a_txq_v, a_txq_r, a_txq_rv, a_txq_ok, b_txq_v, b_txq_r, b_txq_rv, b_txq_ok;
  logic [15:0]      a_tx_len, b_tx_len, a_rq_len, b_rq_len, a_rd_len, b_rd_len;
  axis_t            a_sapp, b_sapp, a_mapp, b_mapp;
  logic             a_sapp_v, a_sapp_r, b_sapp_v, b_sapp_r, a_mapp_v, b_mapp_v;
  logic             a_nt_v, b_nt_v, a_rq_v, a_rq_r, b_rq_v, b_rq_r, a_rd_v, b_rd_v;
  notif_t           a_nt, b_nt;
  logic             a_ar_v, a_ar_r, a_r_v, b_ar_v, b_ar_r, b_r_v;
  logic [7:0]       a_ar_a, b_ar_a;
  logic [31:0]      a_r_d, b_r_d;
  logic [31:0]      a_indrop, a_outdrop, a_echo, b_indrop, b_outdrop, b_echo;
  logic             a_mw, b_mw;
  logic [31:0]      a_mw_idx, b_mw_idx;

  tb_node #(.FULL(1'b1)) n_a (
    .clk, .rst, .my_mac(MAC_A), .my_ip(IP_A),
    .s_eth(a_rx), .s_eth_valid(a_rx_v), .s_eth_ready(a_rx_r),
    .m_eth(a_tx), .m_eth_valid(a_tx_v), .m_eth_ready(a_tx_r),
    .lis_valid(a_lis_v), .lis_ready(a_lis_r), .lis_port(a_lis_p), .lis_rsp_valid(a_lis_rv), .lis_rsp_ok(a_lis_ok),
    .op_valid(a_op_v), .op_ready(a_op_r), .op_ip(a_op_ip), .op_port(a_op_p),
    .op_rsp_valid(a_op_rv), .op_rsp_ok(a_op_ok), .op_rsp_sid(a_op_sid),
    .cl_valid(a_cl_v), .cl_ready(a_cl_r), .cl_sid(a_cl_sid),
    .tx_valid(a_txq_v), .tx_ready(a_txq_r), .tx_sid(a_tx_sid), .tx_len(a_tx_len),
    .tx_rsp_valid(a_txq_rv), .tx_rsp_ok(a_txq_ok),
    .s_app(a_sapp), .s_app_valid(a_sapp_v), .s_app_ready(a_sapp_r),
    .nt_valid(a_nt_v), .nt_ready(1'b1), .nt(a_nt),
    .rq_valid(a_rq_v), .rq_ready(a_rq_r), .rq_sid(a_rq_sid), .rq_len(a_rq_len),
    .rd_rsp_valid(a_rd_v), .rd_rsp_len(a_rd_len), .m_app(a_mapp), .m_app_valid(a_mapp_v), .m_app_ready(1'b1),
    .s_arvalid(a_ar_v), .s_arready(a_ar_r), .s_araddr(a_ar_a), .s_rvalid(a_r_v), .s_rdata(a_r_d),
    .in_drop_cnt(a_indrop), .out_drop_cnt(a_outdrop), .icmp_echo_cnt(a_echo),
    .rxm_wr_valid_o(a_mw), .rxm_wr_idx_o(a_mw_idx)
  );
  tb_node #(.FULL(1'b1)) n_b (
    .clk, .rst, .my_mac(MAC_B), .my_ip(IP_B),
    .s_eth(b_rx), .s_eth_valid(b_rx_v), .s_eth_ready(b_rx_r),
    .m_eth(b_tx), .m_eth_valid(b_tx_v), .m_eth_ready(b_tx_r),
    .lis_valid(b_lis_v), .lis_ready(b_lis_r), .lis_port(b_lis_p), .lis_rsp_valid(b_lis_rv), .lis_rsp_ok(b_lis_ok),
    .op_valid(b_op_v), .op_ready(b_op_r), .op_ip(b_op_ip), .op_port(b_op_p),
    .op_rsp_valid(b_op_rv), .op_rsp_ok(b_op_ok), .op_rsp_sid(b_op_sid),
    .cl_valid(b_cl_v), .cl_ready(b_cl_r), .cl_sid(b_cl_sid),
    .tx_valid(b_txq_v), .tx_ready(b_txq_r), .tx_sid(b_tx_sid), .tx_len(b_tx_len),
    .tx_rsp_valid(b_txq_rv), .tx_rsp_ok(b_txq_ok),
    .s_app(b_sapp), .s_app_valid(b_sapp_v), .s_app_ready(b_sapp_r),
    .nt_valid(b_nt_v), .nt_ready(1'b1), .nt(b_nt),
    .rq_valid(b_rq_v), .rq_ready(b_rq_r), .rq_sid(b_rq_sid), .rq_len(b_rq_len),
    .rd_rsp_valid(b_rd_v), .rd_rsp_len(b_rd_len), .m_app(b_mapp), .m_app_valid(b_mapp_v), .m_app_ready(1'b1),
    .s_arvalid(b_ar_v), .s_arready(b_ar_r), .s_araddr(b_ar_a), .s_rvalid(b_r_v), .s_rdata(b_r_d),
    .in_drop_cnt(b_indrop), .out_drop_cnt(b_outdrop), .icmp_echo_cnt(b_echo),
    .rxm_wr_valid_o(b_mw), .rxm_wr_idx_o(b_mw_idx)
  );

  // ---------------- mechanism counters ----------------
  int m_grat_arp = 0, m_arp_req = 0, m_arp_rep = 0, m_arp_miss = 0, m_echo = 0, m_in_drop = 0;
  int m_rst = 0, m_syn = 0, m_accept = 0, m_ws = 0, m_wrap = 0, m_rt = 0, m_csum = 0;
  int m_probe = 0, m_zero_win = 0, m_fin = 0, m_tw_release = 0, m_pad = 0, m_drop_inj = 0;

  // ---------------- link model ----------------
  // A->B: injected frames take priority while inj_v is set; frames can
  // be dropped (drop_next_data) or have one payload byte flipped.
  axis_t inj; logic inj_v, inj_r;
  logic  ab_sop = 1'b1, ba_sop = 1'b1, ab_drop = 1'b0, ab_corr = 1'b0, ba_drop = 1'b0;
  int    ab_beat = 0, data_frames = 0, ba_arp_seen = 0;
  logic  ab_drop_now, ab_corr_now, ba_drop_now;

  function automatic logic is_tcp_data(axis_t x);
    return rd16(x.data, 12) == 16'h0800 && rd8(x.data, 23) == 8'd6 && rd16(x.data, 16) > 16'd200;
  endfunction

  always_comb begin
    ab_drop_now = ab_sop ? (is_tcp_data(a_tx) && data_frames == 40) : ab_drop;
    ab_corr_now = ab_sop ? (is_tcp_data(a_tx) && data_frames == 60) : ab_corr;
    ba_drop_now = ba_sop ? (rd16(b_tx.data, 12) == 16'h0806 && ba_arp_seen == 0) : ba_drop;
    inj_r = b_rx_r;
    if (inj_v) begin
      b_rx = inj; b_rx_v = 1'b1; a_tx_r = 1'b0;
    end else begin
      b_rx = a_tx;
      if (ab_corr_now && ab_beat == 1) b_rx.data[15:8] = ~a_tx.data[15:8];
      b_rx_v = a_tx_v && !ab_drop_now;
      a_tx_r = ab_drop_now ? 1'b1 : b_rx_r;
    end
    a_rx   = b_tx;
    a_rx_v = b_tx_v && !ba_drop_now;
    b_tx_r = ba_drop_now ? 1'b1 : a_rx_r;
  end

  always_ff @(posedge clk) begin
    if (a_tx_v && a_tx_r && !inj_v) begin
      ab_sop  <= a_tx.last;
      ab_beat <= a_tx.last ? 0 : ab_beat + 1;
      if (ab_sop) begin
        ab_drop <= ab_drop_now; ab_corr <= ab_corr_now;
        if (is_tcp_data(a_tx)) data_frames <= data_frames + 1;
        if (ab_drop_now) m_drop_inj <= m_drop_inj + 1;
      end
    end
    if (b_tx_v && b_tx_r) begin
      ba_sop <= b_tx.last;
      if (ba_sop) begin
        ba_drop <= ba_drop_now;
        if (rd16(b_tx.data, 12) == 16'h0806) ba_arp_seen <= ba_arp_seen + 1;
      end
    end
  end

  // frame monitor on both directions: ARP kinds, padding, TCP flags, echo
  task automatic mon(axis_t x, bit from_a);
    if ($test$plusargs("trace"))
      $display("%0d %s type=%04x proto=%0d len=%0d sp=%0d dp=%0d seq=%08x ack=%08x fl=%02x win=%0d", cyc, from_a ? "A>B" : "B>A",
               rd16(x.data, 12), rd8(x.data, 23), rd16(x.data, 16), rd16(x.data, 34), rd16(x.data, 36),
               rd32(x.data, 38), rd32(x.data, 42), rd8(x.data, 47), rd16(x.data, 48));
    if (rd16(x.data, 12) == 16'h0806) begin
      if (rd16(x.data, 20) == 16'd1 && rd32(x.data, 28) == rd32(x.data, 38)) m_grat_arp++;
      else if (rd16(x.data, 20) == 16'd1) m_arp_req++;
      else m_arp_rep++;
      if (keep_cnt(x.keep) == 60) m_pad++;
      `CHECK(keep_cnt(x.keep) == 60 && x.last, "ARP frame not padded to 60 bytes")
    end else if (rd16(x.data, 12) == 16'h0800 && rd8(x.data, 23) == 8'd6) begin
      if (rd8(x.data, 47) & 8'h04) m_rst++;
      if ((rd8(x.data, 47) & 8'h12) == 8'h02) m_syn++;
      if (rd8(x.data, 47) & 8'h01) m_fin++;
      if (!from_a && rd16(x.data, 48) == 16'd0 && (rd8(x.data, 47) & 8'h10)) m_zero_win++;
    end else if (!from_a && rd16(x.data, 12) == 16'h0800 && rd8(x.data, 23) == 8'd1 && rd8(x.data, 34) == 8'd0) begin
      m_echo++;
      `CHECK(rd32(x.data, 30) == IP_A && rd32(x.data, 26) == IP_B, "echo reply addresses")
      `CHECK(rd16(x.data, 38) == 16'h1234 && rd16(x.data, 40) == 16'h0007, "echo reply id/seq")
      `CHECK(rd8(x.data, 35) == 8'd0, "echo reply code")
    end
  endtask
  // whole-frame check of the IPv4 and TCP checksums
  int m_csum_ok = 0;
  function automatic void check_frame(byte unsigned f[$], bit from_a);
    logic [31:0] acc;
    int ihl, tot;
    if (f.size() < 34 || {f[12], f[13]} != 16'h0800) return;
    tot = {f[16], f[17]};
    acc = 0;
    for (int k = 14; k < 34; k += 2) acc += {f[k], f[k+1]};
    `CHECK(fold16(acc) == 16'hFFFF, "IPv4 header checksum on the link")
    if (f[23] != 8'd6 || (from_a && ab_corr)) return;
    acc = {f[26], f[27]} + {f[28], f[29]} + {f[30], f[31]} + {f[32], f[33]} + 32'd6 + 32'(tot - 20);
    for (int k = 34; k < 14 + tot; k += 2) acc += {f[k], (k + 1 < 14 + tot) ? f[k+1] : 8'd0};
    checks++;
    if (fold16(acc) != 16'hFFFF) begin
      failures++;
      $display("FAIL %0d: TCP checksum on the link (%s, len %0d, sum %04x)", cyc, from_a ? "A>B" : "B>A", tot, fold16(acc));
    end else m_csum_ok++;
  endfunction
  byte unsigned fa[$], fb[$];
  logic a_mon_sop = 1'b1, b_mon_sop = 1'b1;
  always @(posedge clk) begin
    if (a_tx_v && a_tx_r && !inj_v) begin
      for (int k = 0; k < 64; k++) if (a_tx.keep[k]) fa.push_back(a_tx.data[8*k +: 8]);
      if (a_tx.last) begin check_frame(fa, 1'b1); fa = {}; end
    end
    if (b_tx_v && b_tx_r) begin
      for (int k = 0; k < 64; k++) if (b_tx.keep[k]) fb.push_back(b_tx.data[8*k +: 8]);
      if (b_tx.last) begin check_frame(fb, 1'b0); fb = {}; end
    end
  end
  always @(posedge clk) begin
    if (a_tx_v && a_tx_r && !inj_v) begin if (a_mon_sop) mon(a_tx, 1'b1); a_mon_sop <= a_tx.last; end
    if (b_tx_v && b_tx_r) begin if (b_mon_sop) mon(b_tx, 1'b0); b_mon_sop <= b_tx.last; end
    if (a_mw && (a_mw_idx == 0) && cyc > 1000) m_wrap++;
  end

  // ---------------- payload pattern ----------------
  function automatic logic [7:0] pat(int i);
    return 8'((i * 13) ^ (i >> 7) ^ (i >> 15));
  endfunction

  typedef byte unsigned byte_q_t[$];

  // ---------------- node B: echo server ----------------
  int b_got = 0, b_used = 0, b_accepts = 0, b_closed = 0;
  logic [SID_W-1:0] b_sid;
  logic b_pause = 1'b0;
  always @(posedge clk) if (b_nt_v && !rst) begin
    case (b_nt.kind)
      N_ACCEPTED: begin b_sid <= b_nt.sid; b_accepts <= b_accepts + 1; m_accept++; end
      N_DATA:     b_got <= b_got + int'(b_nt.len);
      N_CLOSED:   b_closed <= b_closed + 1;
      default: ;
    endcase
  end


  // AXI4-Lite read of a statistics counter
  task automatic stat_rd(bit node_b, int idx, output logic [31:0] v);
    if (node_b) begin b_ar_v = 1'b1; b_ar_a = 8'(4*idx); end
    else        begin a_ar_v = 1'b1; a_ar_a = 8'(4*idx); end
    forever begin logic ok; ok = node_b ? b_ar_r : a_ar_r; @(negedge clk); #1; if (ok) break; end
    a_ar_v = 1'b0; b_ar_v = 1'b0;
    forever begin logic ok; ok = node_b ? b_r_v : a_r_v; v = node_b ? b_r_d : a_r_d; `STEP if (ok) break; end
  endtask

  // B: read len bytes into q
  task automatic b_read(int len, inout byte_q_t q);
    int got = 0;
    b_rq_v = 1'b1; b_rq_sid = b_sid; b_rq_len = 16'(len);
    forever begin logic ok; ok = b_rq_r; @(negedge clk); #1; if (ok) break; end
    b_rq_v = 1'b0;
    while (got < len) begin
      if (b_mapp_v)
        for (int k = 0; k < 64; k++) if (b_mapp.keep[k]) begin q.push_back(b_mapp.data[8*k +: 8]); got++; end
      `STEP
    end
  endtask

  // B: send the first len bytes of q (retrying while the buffer is full)
  task automatic b_send(int len, inout byte_q_t q);
    logic ok;
    do begin
      b_txq_v = 1'b1; b_tx_sid = b_sid; b_tx_len = 16'(len);
      forever begin logic r; r = b_txq_r; @(negedge clk); #1; if (r) break; end
      b_txq_v = 1'b0;
      while (!b_txq_rv) `STEP
      ok = b_txq_ok;
      `STEP
      if (!ok) repeat (50) `STEP
    end while (!ok);
    while (len > 0) begin
      int n = len > 64 ? 64 : len;
      b_sapp = '0;
      for (int k = 0; k < n; k++) begin b_sapp.data[8*k +: 8] = q.pop_front(); b_sapp.keep[k] = 1'b1; end
      len -= n;
      b_sapp.last = (len == 0);
      b_sapp_v = 1'b1;
      forever begin logic r; r = b_sapp_r; @(negedge clk); #1; if (r) break; end
      b_sapp_v = 1'b0;
    end
  endtask

  initial begin : b_app
    byte_q_t q;
    automatic bit paused = 0;
    b_lis_v = 0; b_op_v = 0; b_cl_v = 0; b_txq_v = 0; b_sapp_v = 0; b_rq_v = 0; b_ar_v = 0;
    b_lis_p = 0; b_op_ip = 0; b_op_p = 0; b_cl_sid = 0; b_tx_sid = 0; b_tx_len = 0; b_sapp = '0;
    b_rq_sid = 0; b_rq_len = 0; b_ar_a = 0;
    wait (!rst);
    `STEP
    b_lis_v = 1'b1; b_lis_p = 16'd5001;
    forever begin logic r; r = b_lis_r; @(negedge clk); #1; if (r) break; end
    b_lis_v = 1'b0;
    while (!b_lis_rv) `STEP
    `CHECK(b_lis_ok, "listen on 5001 refused")
    forever begin
      `STEP
      if (!paused && b_used >= 100000) begin
        paused = 1;
        repeat (700000) `STEP
      end
      if (b_got > b_used) begin
        automatic int n = b_got - b_used;
        if (n > 2000) n = 2000;
        b_read(n, q);
        b_used += n;
        b_send(n, q);
      end
    end
  end

  // ---------------- node A: client ----------------
  int a_got = 0, a_closed_cnt = 0, a_opened = 0;
  logic [SID_W-1:0] a_closed_sid;
  always @(posedge clk) if (a_nt_v && !rst) begin
    case (a_nt.kind)
      N_OPENED: a_opened <= a_opened + 1;
      N_DATA:   a_got <= a_got + int'(a_nt.len);
      N_CLOSED: begin a_closed_cnt <= a_closed_cnt + 1; a_closed_sid <= a_nt.sid; end
      default: ;
    endcase
  end

  task automatic a_open(logic [15:0] port, output logic ok, output logic [SID_W-1:0] sid);
    a_op_v = 1'b1; a_op_ip = IP_B; a_op_p = port;
    forever begin logic r; r = a_op_r; @(negedge clk); #1; if (r) break; end
    a_op_v = 1'b0;
    while (!a_op_rv) `STEP
    ok = a_op_ok; sid = a_op_sid;
    `STEP
  endtask

  // inject one frame (bytes in fr) into B's receive port
  task automatic inject(byte unsigned fr[$]);
    int i = 0;
    while (i < fr.size()) begin
      inj = '0;
      for (int k = 0; k < 64 && i < fr.size(); k++, i++) begin inj.data[8*k +: 8] = fr[i]; inj.keep[k] = 1'b1; end
      inj.last = (i == fr.size());
      inj_v = 1'b1;
      forever begin logic r; r = inj_r; @(negedge clk); #1; if (r) break; end
      inj_v = 1'b0;
    end
  endtask

  function automatic void put16(ref byte unsigned f[$], input int o, input logic [15:0] v);
    f[o] = v[15:8]; f[o+1] = v[7:0];
  endfunction

  logic [SID_W-1:0] a_sid;
  int   a_sent = 0, a_rcvd = 0, mism = 0;
  logic a_conn = 1'b0, a_tx_done = 1'b0;

  initial begin : a_send
    a_txq_v = 0; a_sapp_v = 0; a_sapp = '0; a_tx_sid = 0; a_tx_len = 0;
    wait (a_conn);
    while (a_sent < TOTAL) begin
      automatic int len = 1 + int'($urandom_range(2999));
      logic ok;
      if (len > TOTAL - a_sent) len = TOTAL - a_sent;
      do begin
        a_txq_v = 1'b1; a_tx_sid = a_sid; a_tx_len = 16'(len);
        forever begin logic r; r = a_txq_r; @(negedge clk); #1; if (r) break; end
        a_txq_v = 1'b0;
        while (!a_txq_rv) `STEP
        ok = a_txq_ok;
        `STEP
        if (!ok) repeat (50) `STEP
      end while (!ok);
      while (len > 0) begin
        automatic int n = len > 64 ? 64 : len;
        a_sapp = '0;
        for (int k = 0; k < n; k++) begin a_sapp.data[8*k +: 8] = pat(a_sent); a_sapp.keep[k] = 1'b1; a_sent++; end
        len -= n;
        a_sapp.last = (len == 0);
        a_sapp_v = 1'b1;
        forever begin logic r; r = a_sapp_r; @(negedge clk); #1; if (r) break; end
        a_sapp_v = 1'b0;
      end
    end
    a_tx_done = 1'b1;
  end

  initial begin : a_recv
    a_rq_v = 0; a_rq_sid = 0; a_rq_len = 0;
    wait (a_conn);
    while (a_rcvd < TOTAL) begin
      `STEP
      if (a_got > a_rcvd) begin
        automatic int n = a_got - a_rcvd, got = 0;
        if (n > 4000) n = 4000;
        a_rq_v = 1'b1; a_rq_sid = a_sid; a_rq_len = 16'(n);
        forever begin logic r; r = a_rq_r; @(negedge clk); #1; if (r) break; end
        a_rq_v = 1'b0;
        while (got < n) begin
          if (a_mapp_v)
            for (int k = 0; k < 64; k++) if (a_mapp.keep[k]) begin
              if (a_mapp.data[8*k +: 8] != pat(a_rcvd)) begin
                if (mism < 5) $display("data mismatch at byte %0d: %02x expected %02x", a_rcvd, a_mapp.data[8*k +: 8], pat(a_rcvd));
                mism++;
              end
              a_rcvd++; got++;
            end
          `STEP
        end
      end
    end
  end

  initial begin : main
    byte unsigned fr[$];
    logic ok;
    logic [SID_W-1:0] sid_c;
    logic [31:0] v;
    logic [15:0] s;
    int t0;
    a_lis_v = 0; a_op_v = 0; a_cl_v = 0; a_ar_v = 0; a_lis_p = 0; a_op_ip = 0; a_op_p = 0; a_cl_sid = 0; a_ar_a = 0;
    inj_v = 0; inj = '0;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    repeat (2000) `STEP

    // ICMP echo request to B (id 0x1234, seq 7, 32 bytes of data)
    fr = {};
    for (int k = 0; k < 74; k++) fr.push_back(8'(k));
    for (int k = 0; k < 6; k++) begin fr[k] = MAC_B[47-8*k -: 8]; fr[6+k] = MAC_A[47-8*k -: 8]; end
    put16(fr, 12, 16'h0800); put16(fr, 14, 16'h4500); put16(fr, 16, 16'd60); put16(fr, 18, 16'h0001);
    put16(fr, 20, 16'h0000); put16(fr, 22, 16'h4001); put16(fr, 24, 16'h0000);
    put16(fr, 26, IP_A[31:16]); put16(fr, 28, IP_A[15:0]); put16(fr, 30, IP_B[31:16]); put16(fr, 32, IP_B[15:0]);
    begin
      automatic logic [31:0] acc = 0;
      for (int k = 14; k < 34; k += 2) acc += {fr[k], fr[k+1]};
      put16(fr, 24, ~fold16(acc));
      put16(fr, 34, 16'h0800); put16(fr, 36, 16'h0000); put16(fr, 38, 16'h1234); put16(fr, 40, 16'h0007);
      acc = 0;
      for (int k = 34; k < 74; k += 2) acc += {fr[k], fr[k+1]};
      put16(fr, 36, ~fold16(acc));
    end
    inject(fr);
    // the same frame sent to another MAC address must be dropped on entry
    fr[5] = 8'h77;
    inject(fr);
    repeat (500) `STEP
    `CHECK(b_echo == 1, "B did not answer exactly one echo request")
    `CHECK(b_indrop >= 1, "frame for another MAC not dropped")
    m_in_drop = int'(b_indrop);

    // SYN to a closed port: the answer is a RST and the session is closed
    a_open(16'd80, ok, sid_c);
    `CHECK(ok, "open to port 80 not accepted locally")
    t0 = int'(cyc);
    while (a_closed_cnt == 0 && int'(cyc) - t0 < TMO) `STEP
    `CHECK(a_closed_cnt == 1 && a_closed_sid == sid_c, "no reset on a SYN to a closed port")
    m_arp_miss = int'(a_outdrop);

    // connection to the echo server
    a_open(16'd5001, ok, a_sid);
    `CHECK(ok, "open to port 5001 refused")
    t0 = int'(cyc);
    while (a_opened == 0 && int'(cyc) - t0 < TMO) `STEP
    `CHECK(a_opened == 1, "connection not opened")
    while (b_accepts == 0 && int'(cyc) - t0 < TMO) `STEP
    `CHECK(b_accepts == 1, "server did not see the connection")
    if (n_a.g_full.u_dut.u_toe.u_txsar.rec[a_sid][3:0] == 4'(EXP_WS)) m_ws++;
    if (n_b.g_full.u_dut.u_toe.u_txsar.rec[b_sid][3:0] == 4'(EXP_WS)) m_ws++;
    `CHECK(m_ws == 2, "negotiated window scale differs from min(local, peer)")
    a_conn = 1'b1;

    wait (a_tx_done && a_rcvd >= TOTAL);
    `CHECK(mism == 0, "echoed data differs from sent data")
    `CHECK(a_rcvd == TOTAL, "echoed byte count")

    // close: A sends FIN, B's side closes, A waits in TIME-WAIT
    a_cl_v = 1'b1; a_cl_sid = a_sid;
    forever begin logic r; r = a_cl_r; @(negedge clk); #1; if (r) break; end
    a_cl_v = 1'b0;
    t0 = int'(cyc);
    while (b_closed == 0 && int'(cyc) - t0 < TMO) `STEP
    `CHECK(b_closed == 1, "server did not see the close")
    while (m_tw_release == 0 && int'(cyc) - t0 < TMO) `STEP
    repeat (100) `STEP
    `CHECK(n_a.g_full.u_dut.u_toe.u_st.st[a_sid] == CLOSED, "A's session not CLOSED after TIME-WAIT")

    stat_rd(1'b0, 6, v); m_rt = int'(v);
    stat_rd(1'b1, 1, v); m_csum = int'(v);
    stat_rd(1'b0, 0, v);
    `CHECK(v > 200, "A received-segment counter")
    stat_rd(1'b1, 3, v);
    `CHECK(v >= TOTAL, "B received-byte counter")

    $display("mechanisms: grat_arp=%0d arp_req=%0d arp_rep=%0d arp_miss=%0d echo=%0d in_drop=%0d rst=%0d syn=%0d accept=%0d ws=%0d",
             m_grat_arp, m_arp_req, m_arp_rep, m_arp_miss, m_echo, m_in_drop, m_rst, m_syn, m_accept, m_ws);
    $display("mechanisms: wrap=%0d drop_inj=%0d rt=%0d csum_err=%0d zero_win=%0d probe=%0d fin=%0d tw_release=%0d pad=%0d cycles=%0d",
             m_wrap, m_drop_inj, m_rt, m_csum, m_zero_win, m_probe, m_fin, m_tw_release, m_pad, cyc);
    `CHECK(m_grat_arp >= 2, "gratuitous ARP")
    `CHECK(m_arp_req >= 1, "ARP request")
    `CHECK(m_arp_rep >= 1, "ARP reply")
    `CHECK(m_arp_miss >= 1, "ARP miss")
    `CHECK(m_echo >= 1, "ICMP echo")
    `CHECK(m_in_drop >= 1, "inbound drop")
    `CHECK(m_rst >= 1, "RST")
    `CHECK(m_syn >= 2, "SYN")
    `CHECK(m_accept >= 1, "passive open")
    `CHECK(m_wrap >= 1, "buffer wrap-around")
    `CHECK(m_drop_inj >= 1, "dropped segment")
    `CHECK(m_rt >= 1, "retransmission")
    `CHECK(m_csum >= 1, "checksum error")
    `CHECK(m_zero_win >= 1, "zero window")
    `CHECK(m_fin >= 2, "FIN")
    `CHECK(m_tw_release >= 1, "TIME-WAIT expiry")
    `CHECK(m_pad >= 1, "padding")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst && n_a.g_full.u_dut.u_toe.pr_fire && n_a.g_full.u_dut.u_toe.pr_fire_ready) m_probe++;
    if (!rst && n_a.g_full.u_dut.u_toe.tw_fire && n_a.g_full.u_dut.u_toe.tw_fire_ready) begin
      m_tw_release++;
      if ($test$plusargs("trace")) $display("%0d A time-wait expiry sid=%0d", cyc, n_a.g_full.u_dut.u_toe.tw_fsid);
    end
  end

  always @(posedge clk) if ($test$plusargs("trace")) begin
    if (n_a.g_full.u_dut.u_toe.ev_valid && n_a.g_full.u_dut.u_toe.ev_ready)
      $display("%0d A event %s sid=%0d", cyc, n_a.g_full.u_dut.u_toe.ev.typ.name(), n_a.g_full.u_dut.u_toe.ev.sid);
    if (n_b.g_full.u_dut.u_toe.ev_valid && n_b.g_full.u_dut.u_toe.ev_ready)
      $display("%0d B event %s sid=%0d", cyc, n_b.g_full.u_dut.u_toe.ev.typ.name(), n_b.g_full.u_dut.u_toe.ev.sid);
  end


  always @(posedge clk) if ($test$plusargs("trace")) begin
    if (a_nt_v) $display("%0d A notif %s sid=%0d len=%0d", cyc, a_nt.kind.name(), a_nt.sid, a_nt.len);
    if (b_nt_v) $display("%0d B notif %s sid=%0d len=%0d", cyc, b_nt.kind.name(), b_nt.sid, b_nt.len);
    if (a_txq_rv) $display("%0d A tx rsp ok=%0d", cyc, a_txq_ok);
    if (b_txq_rv) $display("%0d B tx rsp ok=%0d st=%0d sar=%x", cyc, b_txq_ok, n_b.g_full.u_dut.u_toe.u_st.st[b_sid], n_b.g_full.u_dut.u_toe.u_txsar.rec[b_sid]);
    if (a_txq_v && a_txq_r) $display("%0d A tx req len=%0d", cyc, a_tx_len);
  end

  initial begin : watchdog
    repeat (WD) @(posedge clk);
    failures++;
    $display("watchdog expired: a_sent=%0d a_rcvd=%0d b_used=%0d", a_sent, a_rcvd, b_used);
    $display("A: tx=%0d rx=%0d out=%0d  B: tx=%0d rx=%0d out=%0d",
             n_a.g_full.u_dut.u_toe.u_tx.ts, n_a.g_full.u_dut.u_toe.u_rx.bs, n_a.g_full.u_dut.u_out.st,
             n_b.g_full.u_dut.u_toe.u_tx.ts, n_b.g_full.u_dut.u_toe.u_rx.bs, n_b.g_full.u_dut.u_out.st);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
