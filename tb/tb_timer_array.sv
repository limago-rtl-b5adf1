// tb_timer_array: arms timers of a 12-session array (TICK 4 cycles, DELAY
// 10 ticks) at random times, clears some of them, and checks that each
// armed timer fires exactly once, for the right session, no earlier than
// DELAY ticks after it was armed and no later than that plus one scan of
// the array and one tick; cleared timers must never fire.
`timescale 1ns/1ps
module tb_timer_array;
  import limago_pkg::*;
  localparam int N = 12, TICK = 4, DELAY = 10;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  `define STEP begin @(negedge clk); #1; end
  `define CHECK(c, msg) begin checks++; if (!(c)) begin failures++; $display("FAIL %0t: %s", $time, msg); end end

  logic set_valid, clr_valid, fire_valid, fire_ready;
  logic [SID_W-1:0] set_sid, clr_sid, fire_sid;
  timer_array #(.MAX_SESS(N), .TICK(TICK), .DELAY(DELAY)) dut (.clk, .rst, .set_valid, .set_sid,
    .clr_valid, .clr_sid, .fire_valid, .fire_ready, .fire_sid);

  longint armed_at [N];
  bit     armed [N];
  int     fires = 0;

  initial begin
    set_valid = 0; clr_valid = 0; set_sid = 0; clr_sid = 0; fire_ready = 1;
    repeat (3) `STEP
    rst = 1'b0;
    `STEP
    for (int r = 0; r < 40; r++) begin
      automatic int s = $urandom_range(N - 1);
      if (!armed[s]) begin
        set_valid = 1; set_sid = SID_W'(s); armed[s] = 1; armed_at[s] = cyc;
        `STEP
        set_valid = 0;
        if ($urandom_range(3) == 0) begin
          clr_valid = 1; clr_sid = SID_W'(s); armed[s] = 0;
          `STEP
          clr_valid = 0;
        end
      end
      repeat ($urandom_range(30)) `STEP
    end
    repeat ((DELAY + 2) * TICK + 3 * N) `STEP
    foreach (armed[i]) `CHECK(!armed[i], $sformatf("timer %0d never fired", i))
    `CHECK(fires > 5, "too few expiries")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && fire_valid && fire_ready) begin
    automatic longint d = cyc - armed_at[fire_sid];
    fires++;
    `CHECK(armed[fire_sid], $sformatf("timer %0d fired while not armed", fire_sid))
    `CHECK(d >= (DELAY - 1) * TICK && d <= (DELAY + 1) * TICK + N + 2,
           $sformatf("timer %0d fired after %0d cycles", fire_sid, d))
    armed[fire_sid] = 0;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
