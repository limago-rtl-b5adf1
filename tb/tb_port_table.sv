// tb_port_table: unit test of the Port Table.
// It waits for the clear after reset (65,536 cycles, one entry per cycle),
// then checks: every query answers exactly one cycle later; a fresh port
// reads CLOSE; listening on a static port (< 32768) is accepted and the
// port reads LISTEN; listening on an ephemeral port is refused; ephemeral
// allocations hand out ports >= 32768 that become ACTIVE and are distinct;
// a release closes an ephemeral port again. The query latency of one cycle
// is this design's choice; the 2-bit, 65,536-entry layout follows the
// document. A reference array mirrors the expected state of every port
// touched. A watchdog stops the run if it hangs.
`timescale 1ns/1ps
module tb_port_table;
  import limago_pkg::*;
  logic clk = 0, rst = 1;
  always #1.55 clk = ~clk;

  logic q_valid = 0; logic [15:0] q_port = 0;
  logic q_rsp_valid; port_state_e q_rsp_state;
  logic lis_valid = 0, lis_ready; logic [15:0] lis_port = 0;
  logic lis_rsp_valid, lis_rsp_ok;
  logic alloc_valid = 0, alloc_ready; logic [15:0] alloc_port;
  logic rel_valid = 0; logic [15:0] rel_port = 0;

  port_table dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    #3_000_000;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  port_state_e ref_ps [logic [15:0]];
  function automatic port_state_e exp_state(input logic [15:0] p);
    return ref_ps.exists(p) ? ref_ps[p] : P_CLOSE;
  endfunction

  // query one port, check the answer comes exactly one cycle later
  task automatic query(input logic [15:0] p);
    @(negedge clk); #1; q_valid = 1; q_port = p;
    @(negedge clk); #1; q_valid = 0;
    chk(q_rsp_valid === 1'b1, "query answer after one cycle");
    chk(q_rsp_state === exp_state(p), $sformatf("port %0d state %0d exp %0d",
        p, q_rsp_state, exp_state(p)));
    @(negedge clk); #1;
    chk(q_rsp_valid === 1'b0, "query answer lasts one cycle");
  endtask

  task automatic listen(input logic [15:0] p);
    bit exp_ok;
    exp_ok = !p[15];
    @(negedge clk); #1; lis_valid = 1; lis_port = p;
    forever begin logic r; r = lis_ready; @(negedge clk); #1; if (r) break; end
    lis_valid = 0;
    chk(lis_rsp_valid === 1'b1, "listen answer one cycle after handshake");
    chk(lis_rsp_ok === exp_ok, $sformatf("listen %0d ok=%0b", p, lis_rsp_ok));
    if (exp_ok) ref_ps[p] = P_LISTEN;
  endtask

  task automatic alloc(output logic [15:0] p);
    @(negedge clk); #1; alloc_valid = 1;
    forever begin
      logic r; r = alloc_ready; p = alloc_port;
      @(negedge clk); #1; if (r) break;
    end
    alloc_valid = 0;
    chk(p[15] === 1'b1, $sformatf("ephemeral port %0d >= 32768", p));
    chk(exp_state(p) == P_CLOSE, $sformatf("ephemeral port %0d was free", p));
    ref_ps[p] = P_ACTIVE;
  endtask

  task automatic release_port(input logic [15:0] p);
    @(negedge clk); #1; rel_valid = 1; rel_port = p;
    @(negedge clk); #1; rel_valid = 0;
    if (p[15]) ref_ps[p] = P_CLOSE;
  endtask

  logic [15:0] got [$];
  initial begin
    int t0;
    repeat (4) @(negedge clk);
    rst = 0;
    t0 = cyc;
    while (!lis_ready) @(negedge clk);
    chk(cyc - t0 >= 65536 && cyc - t0 <= 65540,
        $sformatf("clear after reset takes %0d cycles", cyc - t0));
    for (int i = 0; i < 40; i++) query(16'($urandom));
    query(16'd0); query(16'hFFFF);
    // listens
    listen(16'd80); listen(16'd5001); listen(16'd32767); listen(16'd40000);
    query(16'd80); query(16'd5001); query(16'd32767); query(16'd40000); query(16'd81);
    for (int i = 0; i < 30; i++) listen(16'($urandom) & 16'h7FFF);
    foreach (ref_ps[p]) query(p);
    // ephemeral allocation
    for (int i = 0; i < 20; i++) begin
      logic [15:0] p;
      alloc(p);
      foreach (got[k]) chk(got[k] != p, "ephemeral ports distinct");
      got.push_back(p);
      query(p);
    end
    // release half of them, and a static port (ignored)
    for (int i = 0; i < 10; i++) begin release_port(got[i]); query(got[i]); end
    release_port(16'd80); query(16'd80);
    // a listen request waits while a release is presented
    @(negedge clk); #1; rel_valid = 1; rel_port = got[10];
    #0.2;
    chk(lis_ready === 1'b0 && alloc_ready === 1'b0, "release has priority");
    @(negedge clk); #1; rel_valid = 0; ref_ps[got[10]] = P_CLOSE;
    query(got[10]);
    foreach (ref_ps[p]) query(p);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
