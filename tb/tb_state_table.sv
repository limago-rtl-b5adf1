// tb_state_table: unit test of the State Table.
// Four drivers hit the table at once on a small set of sessions so that
// they collide: ports 0 and 1 do locked read-modify-write (read with lock,
// wait a random time, write a new state), port 2 only reads, port 3 only
// writes. A monitor keeps a reference copy of every state and checks that
// at most one request is taken per cycle, the lowest-numbered eligible
// port wins, read data arrives exactly one cycle after the request is
// taken and matches the reference, and no port is ever granted a session
// locked by another port. The one-request-per-cycle arbiter and the lock
// scheme are this design's choices; the document only asks that the
// table's updates be atomic. A watchdog stops the run if it hangs.
`timescale 1ns/1ps
module tb_state_table;
  import limago_pkg::*;
  localparam int NS = 16;
  localparam int OPS = 400;
  logic clk = 0, rst = 1;
  always #1.55 clk = ~clk;

  logic [3:0]            req_valid = 0, req_ready;
  logic [3:0][SID_W-1:0] req_sid = '0;
  logic [3:0]            req_we = 0, req_lock = 0;
  tcp_state_e [3:0]      req_wdata;
  logic [3:0]            rsp_valid;
  tcp_state_e            rsp_data;

  state_table #(.MAX_SESS(NS)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    #200_000;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // reference model and monitor
  tcp_state_e ref_st [NS];
  logic [3:0] mlk = 0;
  logic [SID_W-1:0] mlk_sid [4];
  logic [3:0] exp_rsp = 0;
  tcp_state_e exp_data;
  initial for (int i = 0; i < NS; i++) ref_st[i] = CLOSED;

  always @(posedge clk) if (!rst) begin
    logic [3:0] g, el;
    if (exp_rsp != 0) begin
      chk(rsp_valid == exp_rsp, $sformatf("rsp_valid %b exp %b", rsp_valid, exp_rsp));
      chk(rsp_data == exp_data, $sformatf("rsp_data %0d exp %0d", rsp_data, exp_data));
    end else
      chk(rsp_valid == 0, "no response without a read");
    exp_rsp = 0;
    g = req_valid & req_ready;
    chk($countones(g) <= 1, "one grant per cycle");
    for (int p = 0; p < 4; p++) begin
      el[p] = req_valid[p];
      for (int q = 0; q < 4; q++)
        if (q != p && mlk[q] && mlk_sid[q] == req_sid[p]) el[p] = 0;
    end
    chk(g == (el & -el), $sformatf("grant %b eligible %b", g, el));
    for (int p = 0; p < 4; p++) if (g[p]) begin
      for (int q = 0; q < 4; q++)
        if (q != p) chk(!(mlk[q] && mlk_sid[q] == req_sid[p]), "granted a locked session");
      if (req_we[p]) begin
        ref_st[req_sid[p]] = req_wdata[p];
        mlk[p] = 0;
      end else begin
        exp_rsp[p] = 1;
        exp_data = ref_st[req_sid[p]];
        if (req_lock[p]) begin mlk[p] = 1; mlk_sid[p] = req_sid[p]; end
      end
    end
  end

  task automatic issue(input int p, input int sid, input bit we, input bit lock,
                       input tcp_state_e wd);
    @(negedge clk); #1;
    req_valid[p] = 1; req_sid[p] = SID_W'(sid); req_we[p] = we;
    req_lock[p] = lock; req_wdata[p] = wd;
    forever begin logic r; #0.2; r = req_ready[p]; @(negedge clk); #1; if (r) break; end
    req_valid[p] = 0;
  endtask

  int done = 0;
  initial begin
    for (int p = 0; p < 4; p++) req_wdata[p] = CLOSED;
    repeat (4) @(negedge clk);
    rst = 0;
    fork
      for (int n = 0; n < OPS; n++) begin : p0
        int s; s = $urandom_range(NS-1);
        issue(0, s, 0, 1, CLOSED);
        repeat ($urandom_range(4)) @(negedge clk);
        issue(0, s, 1, 0, tcp_state_e'($urandom_range(9)));
      end
      for (int n = 0; n < OPS; n++) begin : p1
        int s; s = $urandom_range(NS-1);
        issue(1, s, 0, 1, CLOSED);
        repeat ($urandom_range(4)) @(negedge clk);
        issue(1, s, 1, 0, tcp_state_e'($urandom_range(9)));
      end
      for (int n = 0; n < OPS; n++) begin : p2
        issue(2, $urandom_range(NS-1), 0, 0, CLOSED);
        repeat ($urandom_range(2)) @(negedge clk);
      end
      for (int n = 0; n < OPS; n++) begin : p3
        issue(3, $urandom_range(NS-1), 1, 0, tcp_state_e'($urandom_range(9)));
        repeat ($urandom_range(3)) @(negedge clk);
      end
    join
    repeat (3) @(negedge clk);
    // every entry reads back as the reference holds it
    for (int s = 0; s < NS; s++) issue(2, s, 0, 0, CLOSED);
    repeat (3) @(negedge clk);
    chk(mlk == 0, "all locks released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
