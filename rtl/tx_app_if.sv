// tx_app_if: Tx App If, the application's transmit interface, with three
// request channels served one at a time.
//  open {ip, port}: take a free ephemeral local port from the Port Table,
//    create the session through the Session Lookup, set SYN_SENT, set up
//    the Tx SAR record (initial sequence number from a free-running
//    counter) and post a SYN event; answers {sid, ok}. The connection is
//    usable when the Rx Engine notifies it as opened.
//  close {sid}: locked read of the state; ESTABLISHED becomes FIN_WAIT_1,
//    CLOSE_WAIT becomes LAST_ACK, and a FIN event is posted.
//  send {sid, len}: the connection must be ESTABLISHED and the Tx Buffer
//    must have len bytes free (buffer size - (app_w - una)); the answer
//    {ok} comes first, and only after ok=1 does the application stream
//    its len bytes, which are written to the Tx Buffer at offset (app_w
//    mod buffer size). app_w is then advanced and a TX event posted.
module tx_app_if
  import limago_pkg::*;
#(
  parameter int WS_LOCAL = 0,
  localparam int REG_W   = 16 + WS_LOCAL
) (
  input  logic             clk,
  input  logic             rst,
  // application requests
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
  // Port Table ephemeral allocation
  output logic             pa_valid,
  input  logic             pa_ready,
  input  logic [15:0]      pa_port,
  // Session Lookup (client B)
  output logic             sl_valid,
  input  logic             sl_ready,
  output tuple_t           sl_tuple,
  input  logic             sl_rsp_valid,
  input  logic             sl_rsp_hit,
  input  logic [SID_W-1:0] sl_rsp_sid,
  // State Table
  output logic             st_valid,
  input  logic             st_ready,
  output logic             st_we,
  output logic             st_lock,
  output tcp_state_e       st_wdata,
  input  logic             st_rsp_valid,
  input  tcp_state_e       st_rsp_data,
  // Tx SAR
  output logic             ts_valid,
  input  logic             ts_ready,
  output logic             ts_we,
  output tx_sar_t          ts_wmask,
  output tx_sar_t          ts_wdata,
  input  logic             ts_rsp_valid,
  input  tx_sar_t          ts_rsp_data,
  output logic [SID_W-1:0] sid,
  // Tx Buffer write command; data comes from the application
  output logic             wcmd_valid,
  input  logic             wcmd_ready,
  output logic [REG_W-1:0] wcmd_off,
  input  logic             wdat_done,     // last beat written
  // events
  output logic             ev_valid,
  input  logic             ev_ready,
  output event_t           ev
);
  typedef enum logic [4:0] {
    A_IDLE,
    O_PORT, O_SL, O_SLW, O_ST, O_TS, O_EV, O_RSP,
    C_RD, C_RDW, C_WR, C_EV,
    S_ST, S_STW, S_TS, S_TSW, S_CMD, S_DATA, S_UPD, S_EV
  } ast_e;
  ast_e             st;
  logic [SID_W-1:0] sid_q;
  logic [31:0]      ip_q, iss, appw_q;
  logic [15:0]      port_q, lport_q, len_q;
  tcp_state_e       ns_q, s_q;
  logic             ok_q;

  assign op_ready = (st == A_IDLE);
  assign cl_ready = (st == A_IDLE) && !op_valid;
  assign tx_ready = (st == A_IDLE) && !op_valid && !cl_valid;
  assign sid      = sid_q;
  assign pa_valid = (st == O_PORT);
  assign sl_valid = (st == O_SL);
  assign sl_tuple = '{ip_q, port_q, lport_q};

  always_comb begin
    st_valid = (st == O_ST) || (st == C_RD) || (st == C_WR) || (st == S_ST);
    st_we    = (st == O_ST) || (st == C_WR);
    st_lock  = (st == C_RD);
    st_wdata = (st == O_ST) ? SYN_SENT : ns_q;
    ts_valid = (st == O_TS) || (st == S_TS) || (st == S_UPD);
    ts_we    = (st == O_TS) || (st == S_UPD);
    ts_wmask = '0;
    ts_wdata = '0;
    if (st == O_TS) begin
      ts_wmask = '1;
      ts_wdata = '{iss, iss, iss + 32'd1, 32'd0, 4'd0};
    end else begin
      ts_wmask.app_w = '1;
      ts_wdata.app_w = appw_q + {16'd0, len_q};
    end
    ev_valid = (st == O_EV) || (st == C_EV) || (st == S_EV);
    ev       = '0;
    ev.sid   = sid_q;
    ev.typ   = (st == O_EV) ? EV_SYN : (st == C_EV) ? EV_FIN : EV_TX;
    wcmd_valid = (st == S_CMD);
    wcmd_off   = appw_q[REG_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st           <= A_IDLE;
      iss          <= 32'h2000_0000;
      op_rsp_valid <= 1'b0;
      tx_rsp_valid <= 1'b0;
      op_rsp_ok    <= 1'b0;
      op_rsp_sid   <= '0;
      tx_rsp_ok    <= 1'b0;
    end else begin
      iss          <= iss + 32'd7;
      op_rsp_valid <= 1'b0;
      tx_rsp_valid <= 1'b0;
      unique case (st)
        A_IDLE: begin
          if (op_valid) begin
            ip_q <= op_ip; port_q <= op_port; st <= O_PORT;
          end else if (cl_valid) begin
            sid_q <= cl_sid; st <= C_RD;
          end else if (tx_valid) begin
            sid_q <= tx_sid; len_q <= tx_len; st <= S_ST;
          end
        end
        // ---- active open
        O_PORT: if (pa_ready) begin lport_q <= pa_port; st <= O_SL; end
        O_SL:   if (sl_ready) st <= O_SLW;
        O_SLW:  if (sl_rsp_valid) begin
          sid_q <= sl_rsp_sid;
          ok_q  <= sl_rsp_hit;
          st    <= sl_rsp_hit ? O_ST : O_RSP;
        end
        O_ST:   if (st_ready) st <= O_TS;
        O_TS:   if (ts_ready) st <= O_EV;
        O_EV:   if (ev_ready) st <= O_RSP;
        O_RSP: begin
          op_rsp_valid <= 1'b1;
          op_rsp_ok    <= ok_q;
          op_rsp_sid   <= sid_q;
          st <= A_IDLE;
        end
        // ---- close
        C_RD:  if (st_ready) st <= C_RDW;
        C_RDW: if (st_rsp_valid) begin
          s_q  <= st_rsp_data;
          ns_q <= (st_rsp_data == ESTABLISHED) ? FIN_WAIT_1 :
                  (st_rsp_data == CLOSE_WAIT)  ? LAST_ACK : st_rsp_data;
          st   <= C_WR;
        end
        C_WR:  if (st_ready) st <= (s_q == ESTABLISHED || s_q == CLOSE_WAIT) ? C_EV : A_IDLE;
        C_EV:  if (ev_ready) st <= A_IDLE;
        // ---- send
        S_ST:  if (st_ready) st <= S_STW;
        S_STW: if (st_rsp_valid) begin s_q <= st_rsp_data; st <= S_TS; end
        S_TS:  if (ts_ready) st <= S_TSW;
        S_TSW: if (ts_rsp_valid) begin
          logic [31:0] used;
          used   = ts_rsp_data.app_w - ts_rsp_data.una;
          appw_q <= ts_rsp_data.app_w;
          tx_rsp_valid <= 1'b1;
          if (s_q == ESTABLISHED && len_q != 16'd0 &&
              used + {16'd0, len_q} <= (32'd1 << REG_W)) begin
            tx_rsp_ok <= 1'b1;
            st <= S_CMD;
          end else begin
            tx_rsp_ok <= 1'b0;
            st <= A_IDLE;
          end
        end
        S_CMD:  if (wcmd_ready) st <= S_DATA;
        S_DATA: if (wdat_done) st <= S_UPD;
        S_UPD:  if (ts_ready) st <= S_EV;
        S_EV:   if (ev_ready) st <= A_IDLE;
        default: st <= A_IDLE;
      endcase
    end
  end
endmodule
