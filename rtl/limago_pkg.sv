// limago_pkg: types, constants and byte helpers shared by the Limago stack.
//
// Packets travel on a 512-bit AXI4-Stream (64 bytes per beat). Byte 0 of a
// packet sits in data[7:0] and tkeep[0] qualifies it, as on the vendor
// 100G MAC stream. Multi-byte header fields are big-endian (network order):
// the 16-bit field at byte offset k is {byte k, byte k+1}. The helpers below
// read and write such fields. The TCP connection state follows RFC 793; the
// session key is the three-tuple (remote IP, remote port, local port),
// since the local IP address never changes.
package limago_pkg;

  localparam int DW  = 512;   // stream width in bits
  localparam int KW  = 64;    // bytes per beat
  localparam int SID_W = 16;  // sessionID width

  typedef struct packed {
    logic [DW-1:0] data;
    logic [KW-1:0] keep;
    logic          last;
  } axis_t;

  // TCP connection states (RFC 793)
  typedef enum logic [3:0] {
    CLOSED, SYN_SENT, SYN_RECEIVED, ESTABLISHED, FIN_WAIT_1, FIN_WAIT_2,
    CLOSING, TIME_WAIT, CLOSE_WAIT, LAST_ACK
  } tcp_state_e;

  // Port table states
  typedef enum logic [1:0] { P_CLOSE = 2'd0, P_LISTEN = 2'd1, P_ACTIVE = 2'd2 } port_state_e;

  // Events handed to the Tx Engine
  typedef enum logic [2:0] {
    EV_TX, EV_RT, EV_ACK, EV_SYN, EV_SYNACK, EV_FIN, EV_RST, EV_PROBE
  } ev_type_e;

  typedef struct packed {
    logic [31:0] ip;     // remote IPv4 address
    logic [15:0] rport;  // remote TCP port
    logic [15:0] lport;  // local TCP port
  } tuple_t;             // 64-bit CuckooCAM key

  typedef struct packed {
    ev_type_e           typ;
    logic [SID_W-1:0]   sid;
    tuple_t             tuple; // only used by RST (no session exists)
    logic [31:0]        seq;   // RST: sequence number to send
    logic [31:0]        ack;   // RST: acknowledgement number to send
  } event_t;

  // Rx SAR record: next expected sequence number, next byte the
  // application reads (both as TCP sequence numbers)
  typedef struct packed {
    logic [31:0] recvd;
    logic [31:0] app_rd;
  } rx_sar_t;

  // Tx SAR record: oldest unacknowledged byte, next byte to send, end of
  // the data written by the application, peer's window in bytes (already
  // scaled) and the negotiated window-scale shift
  typedef struct packed {
    logic [31:0] una;
    logic [31:0] nxt;
    logic [31:0] app_w;
    logic [31:0] rwin;
    logic [3:0]  ws;
  } tx_sar_t;

  // Notifications to the application
  typedef enum logic [1:0] { N_DATA, N_OPENED, N_ACCEPTED, N_CLOSED } notif_e;
  typedef struct packed {
    notif_e           kind;
    logic [SID_W-1:0] sid;
    logic [15:0]      len;   // N_DATA: payload bytes now readable
  } notif_t;

  // Ethertypes and IP protocols
  localparam logic [15:0] ETH_ARP  = 16'h0806;
  localparam logic [15:0] ETH_IPV4 = 16'h0800;
  localparam logic [7:0]  IP_ICMP  = 8'd1;
  localparam logic [7:0]  IP_TCP   = 8'd6;

  // TDEST values of the inbound switch
  localparam logic [1:0] DEST_ARP = 2'd0, DEST_ICMP = 2'd1, DEST_TCP = 2'd2;

  // TCP flag bits (byte 13 of the TCP header)
  localparam int F_FIN = 0, F_SYN = 1, F_RST = 2, F_PSH = 3, F_ACK = 4;

  function automatic logic [7:0] rd8(logic [DW-1:0] d, int unsigned k);
    return d[8*k +: 8];
  endfunction

  function automatic logic [15:0] rd16(logic [DW-1:0] d, int unsigned k);
    return {d[8*k +: 8], d[8*(k+1) +: 8]};
  endfunction

  function automatic logic [31:0] rd32(logic [DW-1:0] d, int unsigned k);
    return {rd16(d, k), rd16(d, k+2)};
  endfunction

  function automatic logic [47:0] rd48(logic [DW-1:0] d, int unsigned k);
    return {rd16(d, k), rd32(d, k+2)};
  endfunction

  function automatic logic [DW-1:0] wr8(logic [DW-1:0] d, int unsigned k, logic [7:0] v);
    logic [DW-1:0] r;
    r = d;
    r[8*k +: 8] = v;
    return r;
  endfunction

  function automatic logic [DW-1:0] wr16(logic [DW-1:0] d, int unsigned k, logic [15:0] v);
    return wr8(wr8(d, k, v[15:8]), k+1, v[7:0]);
  endfunction

  function automatic logic [DW-1:0] wr32(logic [DW-1:0] d, int unsigned k, logic [31:0] v);
    return wr16(wr16(d, k, v[31:16]), k+2, v[15:0]);
  endfunction

  function automatic logic [DW-1:0] wr48(logic [DW-1:0] d, int unsigned k, logic [47:0] v);
    return wr32(wr16(d, k, v[47:32]), k+2, v[31:0]);
  endfunction

  // Fold a wide one's-complement accumulator to 16 bits (end-around carry).
  function automatic logic [15:0] fold16(logic [31:0] s);
    logic [31:0] t;
    t = {16'd0, s[15:0]} + {16'd0, s[31:16]};
    t = {16'd0, t[15:0]} + {16'd0, t[31:16]};
    return t[15:0];
  endfunction

  // One's-complement sum (unfolded) of the 16-bit big-endian words of the
  // first n bytes of a beat; an odd last byte is padded with zero.
  function automatic logic [31:0] sum_bytes(logic [DW-1:0] d, int unsigned n);
    logic [31:0] s;
    s = '0;
    for (int i = 0; i < KW/2; i++) begin
      if (2*i < n)   s += {16'd0, d[16*i +: 8], 8'd0};
      if (2*i+1 < n) s += {24'd0, d[16*i+8 +: 8]};
    end
    return s;
  endfunction

  // tkeep mask for the first n bytes (n = 0..64)
  function automatic logic [KW-1:0] keep_n(int unsigned n);
    return (n >= KW) ? '1 : ((KW'(1) << n) - KW'(1));
  endfunction

  // number of valid bytes in a contiguous tkeep
  function automatic logic [6:0] keep_cnt(logic [KW-1:0] k);
    logic [6:0] c;
    c = '0;
    for (int i = 0; i < KW; i++) c += 7'(k[i]);
    return c;
  endfunction

endpackage
