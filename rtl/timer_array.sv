// timer_array: one of the TOE timers (re-transmission, probe or
// time-wait). Each connection has one entry {active, expiry time} in an
// array, so memory grows linearly with the number of connections. A free
// running time base advances by one every TICK cycles. set arms (or
// re-arms) the timer of a session to expire DELAY ticks from now, clear
// disarms it. A scan pointer visits one session per cycle; an active
// entry whose expiry time has passed is disarmed and reported on fire
// (held until fire_ready). set and clear win over the scan in a cycle
// where both would write.
module timer_array
  import limago_pkg::*;
#(
  parameter int MAX_SESS = 10000,
  parameter int TICK     = 322,     // cycles per tick (1 us at 322 MHz)
  parameter int DELAY    = 1000,    // ticks until expiry
  parameter int TW       = 24       // width of the time base
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             set_valid,
  input  logic [SID_W-1:0] set_sid,
  input  logic             clr_valid,
  input  logic [SID_W-1:0] clr_sid,
  output logic             fire_valid,
  input  logic             fire_ready,
  output logic [SID_W-1:0] fire_sid
);
  logic [TW:0]      ent [MAX_SESS];   // {active, expiry}
  logic [TW-1:0]    now;
  logic [$clog2(TICK+1)-1:0] pre;
  logic [SID_W-1:0] ptr;
  logic [TW:0]      e;
  logic             wr_busy;

  assign e       = ent[ptr];
  wire   [TW-1:0] diff = now - e[TW-1:0];
  wire   due     = e[TW] && !diff[TW-1];              // now >= expiry (modulo)
  assign wr_busy = set_valid || clr_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      now        <= '0;
      pre        <= '0;
      ptr        <= '0;
      fire_valid <= 1'b0;
      fire_sid   <= '0;
    end else begin
      if (pre == ($clog2(TICK+1))'(TICK - 1)) begin
        pre <= '0;
        now <= now + 1'b1;
      end else pre <= pre + 1'b1;

      if (fire_valid && fire_ready) fire_valid <= 1'b0;

      if (set_valid)      ent[set_sid] <= {1'b1, now + TW'(DELAY)};
      else if (clr_valid) ent[clr_sid] <= '0;

      if (!fire_valid || fire_ready) begin
        if (due && !wr_busy) begin
          ent[ptr]   <= '0;
          fire_valid <= 1'b1;
          fire_sid   <= ptr;
        end
        if (!(due && wr_busy))
          ptr <= (ptr == SID_W'(MAX_SESS - 1)) ? '0 : ptr + 1'b1;
      end
    end
  end

  initial for (int i = 0; i < MAX_SESS; i++) ent[i] = '0;
endmodule
