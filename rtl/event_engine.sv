// event_engine: Event Engine. It merges the events for the Tx Engine from
// the Rx Engine (acknowledgements, SYN-ACK, RST, FIN), the Tx Engine's own
// continuation of a transmission, the Tx App If (SYN, data, FIN) and the
// re-transmission and probe timers (which give only a sessionID). Each
// event makes the Tx Engine send one packet. The Tx Engine's continuation
// comes first and always has one FIFO slot kept free for it: the Tx Engine
// waits for it to be taken before it reads the next event, so without the
// reserved slot a FIFO filled by the other sources would never drain. The
// other sources follow with the fixed priority Rx, App, re-transmission,
// probe. The merged events go through a 16-entry FIFO. Counts every event
// taken.
module event_engine
  import limago_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  event_t           rx_ev,
  input  logic             rx_valid,
  output logic             rx_ready,
  input  event_t           loop_ev,
  input  logic             loop_valid,
  output logic             loop_ready,
  input  event_t           app_ev,
  input  logic             app_valid,
  output logic             app_ready,
  input  logic [SID_W-1:0] rt_sid,
  input  logic             rt_valid,
  output logic             rt_ready,
  input  logic [SID_W-1:0] probe_sid,
  input  logic             probe_valid,
  output logic             probe_ready,
  output event_t           m,
  output logic             m_valid,
  input  logic             m_ready,
  output logic [31:0]      ev_cnt
);
  event_t     in_ev;
  logic       in_valid, in_ready, room;
  logic [4:0] cnt;

  assign room = (cnt < 5'd15);   // one slot kept for the continuation

  always_comb begin
    in_ev = '0;
    rx_ready = 1'b0; loop_ready = 1'b0; app_ready = 1'b0; rt_ready = 1'b0; probe_ready = 1'b0;
    in_valid = 1'b1;
    if (loop_valid)       begin in_ev = loop_ev; loop_ready = in_ready; end
    else if (!room)       in_valid = 1'b0;
    else if (rx_valid)    begin in_ev = rx_ev;   rx_ready   = in_ready; end
    else if (app_valid)   begin in_ev = app_ev;  app_ready  = in_ready; end
    else if (rt_valid)    begin in_ev.typ = EV_RT;    in_ev.sid = rt_sid;    rt_ready    = in_ready; end
    else if (probe_valid) begin in_ev.typ = EV_PROBE; in_ev.sid = probe_sid; probe_ready = in_ready; end
    else in_valid = 1'b0;
  end

  sync_fifo #(.W($bits(event_t)), .DEPTH(16)) u_q (
    .clk, .rst,
    .wr_valid(in_valid), .wr_ready(in_ready), .wr_data(in_ev),
    .rd_valid(m_valid), .rd_ready(m_ready), .rd_data(m), .count(cnt)
  );

  always_ff @(posedge clk) begin
    if (rst) ev_cnt <= '0;
    else if (in_valid && in_ready) ev_cnt <= ev_cnt + 1;
  end
endmodule
