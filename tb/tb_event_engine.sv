// tb_event_engine: unit test of the Event Engine.
// Five sources (Rx Engine, Tx Engine continuation, Tx App If,
// re-transmission timer, probe timer) each offer a numbered stream of
// events while the consumer takes them at random. A monitor tracks the
// queue fill level and checks on every cycle that the right source is
// taken: the continuation whenever the 16-entry queue has room, the others
// in the order Rx, App, re-transmission, probe and only while at least two
// entries are free (one is kept for the continuation). It also checks that
// an event taken into an empty queue is visible the next cycle, that every
// event comes out exactly once and in order per source, that timer events
// carry the right type, and that the event counter matches. A first phase
// with the consumer stopped checks that the fifteenth entry is the last
// one the other sources get. The priority order and the reserved entry are
// this design's choices. A watchdog stops the run if it hangs.
`timescale 1ns/1ps
module tb_event_engine;
  import limago_pkg::*;
  localparam int N = 300;
  logic clk = 0, rst = 1;
  always #1.55 clk = ~clk;

  event_t rx_ev = '0, loop_ev = '0, app_ev = '0, m;
  logic rx_valid = 0, loop_valid = 0, app_valid = 0, rt_valid = 0, probe_valid = 0;
  logic rx_ready, loop_ready, app_ready, rt_ready, probe_ready;
  logic [SID_W-1:0] rt_sid = '0, probe_sid = '0;
  logic m_valid, m_ready = 0;
  logic [31:0] ev_cnt;

  event_engine dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    #400_000;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // source index: 0 rx, 1 loop, 2 app, 3 rt, 4 probe
  int occ = 0, taken = 0, outn = 0;
  int nxt_out [5] = '{0, 0, 0, 0, 0};
  int src_cnt [5] = '{0, 0, 0, 0, 0};
  bit was_empty_take = 0;

  function automatic int winner(input logic [4:0] v, input int o);
    if (v[1] && o < 16) return 1;
    if (o >= 15) return -1;
    if (v[0]) return 0;
    if (v[2]) return 2;
    if (v[3]) return 3;
    if (v[4]) return 4;
    return -1;
  endfunction

  always @(posedge clk) if (!rst) begin
    logic [4:0] v, r;
    int w, got;
    v = {probe_valid, rt_valid, app_valid, loop_valid, rx_valid};
    r = {probe_ready, rt_ready, app_ready, loop_ready, rx_ready};
    if (was_empty_take) chk(m_valid === 1'b1, "event visible the cycle after it is taken");
    w = winner(v, occ);
    got = -1;
    for (int i = 0; i < 5; i++) if (v[i] && r[i]) got = i;
    chk($countones(v & r) <= 1, "one source per cycle");
    chk(got == w, $sformatf("taken source %0d expected %0d (fill %0d, valid %b)", got, w, occ, v));
    was_empty_take = (got >= 0) && (occ == 0);
    if (got >= 0) begin occ++; taken++; end
    if (m_valid && m_ready) begin
      int s, k;
      if (m.typ == EV_RT)         begin s = 3; k = int'(m.sid); end
      else if (m.typ == EV_PROBE) begin s = 4; k = int'(m.sid); end
      else begin s = int'(m.seq[31:16]); k = int'(m.seq[15:0]); end
      chk(s < 5 && k == nxt_out[s], $sformatf("event source %0d number %0d, expected %0d", s, k, nxt_out[s]));
      if (s < 5) nxt_out[s] = k + 1;
      occ--; outn++;
    end
    chk(occ >= 0 && occ <= 16, "fill level in range");
  end

  task automatic src(input int s, input int first, input int n, input int gap);
    for (int k = first; k < first + n; k++) begin
      event_t e;
      e = '0;
      e.typ = (s == 2) ? EV_TX : EV_ACK;
      e.sid = SID_W'(k);
      e.seq = {16'(s), 16'(k)};
      @(negedge clk); #1;
      case (s)
        0: begin rx_ev = e;   rx_valid = 1; end
        1: begin loop_ev = e; loop_valid = 1; end
        2: begin app_ev = e;  app_valid = 1; end
        3: begin rt_sid = SID_W'(k);    rt_valid = 1; end
        4: begin probe_sid = SID_W'(k); probe_valid = 1; end
      endcase
      forever begin
        logic r;
        #0.2;
        case (s) 0: r = rx_ready; 1: r = loop_ready; 2: r = app_ready;
                 3: r = rt_ready; default: r = probe_ready; endcase
        @(negedge clk); #1;
        if (r) break;
      end
      case (s)
        0: rx_valid = 0; 1: loop_valid = 0; 2: app_valid = 0;
        3: rt_valid = 0; 4: probe_valid = 0;
      endcase
      src_cnt[s]++;
      repeat ($urandom_range(gap)) @(negedge clk);
    end
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst = 0;
    // phase 1: consumer stopped, the other sources fill 15 entries
    fork
      src(0, 0, 10, 0);
      src(2, 0, 10, 0);
    join_none
    repeat (40) @(negedge clk);
    chk(occ == 15, $sformatf("other sources stop at 15 entries (fill %0d)", occ));
    chk(rx_ready === 1'b0 && app_ready === 1'b0, "no room for a non-continuation event");
    src(1, 0, 1, 0);
    chk(occ == 16, "continuation takes the reserved entry");
    // phase 2: random consumer, all sources
    fork
      forever begin @(negedge clk); #1; m_ready = ($urandom_range(3) != 0); end
    join_none
    wait (src_cnt[0] == 10 && src_cnt[2] == 10);
    fork
      src(0, 10, N, 3);
      src(1, 1, N, 6);
      src(2, 10, N, 2);
      src(3, 0, N, 4);
      src(4, 0, N, 5);
    join
    wait (occ == 0);
    repeat (3) @(negedge clk);
    chk(nxt_out[0] == N + 10 && nxt_out[1] == N + 1 && nxt_out[2] == N + 10,
        "every Rx, continuation and App event delivered once");
    chk(nxt_out[3] == N && nxt_out[4] == N, "every timer event delivered once");
    chk(ev_cnt == 32'(taken) && taken == outn, $sformatf("event counter %0d, taken %0d", ev_cnt, taken));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
