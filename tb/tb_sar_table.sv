// tb_sar_table: unit test of the SAR (segmentation and reassembly) table.
// Three clients issue random requests on a few sessions at the same time:
// plain reads and reads with a write under a random bit mask. A monitor
// keeps a reference copy of every record and checks that exactly one
// request is taken per cycle when any is pending, the lowest-numbered port
// wins, the record as it was before the write returns exactly one cycle
// after the request is taken, and only the masked bits change. The
// masked-write interface and fixed-priority arbiter are this design's
// choices; the document only describes the pointers each record holds.
// A watchdog stops the run if it hangs.
`timescale 1ns/1ps
module tb_sar_table;
  import limago_pkg::*;
  localparam int NS = 8, W = 128, NP = 3, OPS = 500;
  logic clk = 0, rst = 1;
  always #1.55 clk = ~clk;

  logic [NP-1:0]            req_valid = 0, req_ready;
  logic [NP-1:0][SID_W-1:0] req_sid = '0;
  logic [NP-1:0]            req_we = 0;
  logic [NP-1:0][W-1:0]     req_wmask = '0, req_wdata = '0;
  logic [NP-1:0]            rsp_valid;
  logic [W-1:0]             rsp_data;

  sar_table #(.MAX_SESS(NS), .W(W), .NP(NP)) dut (.*);

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

  logic [W-1:0] ref_rec [NS];
  logic [NP-1:0] exp_rsp = 0;
  logic [W-1:0] exp_data;
  initial for (int i = 0; i < NS; i++) ref_rec[i] = '0;

  always @(posedge clk) if (!rst) begin
    logic [NP-1:0] g;
    chk(rsp_valid == exp_rsp, $sformatf("rsp_valid %b exp %b", rsp_valid, exp_rsp));
    if (exp_rsp != 0) chk(rsp_data == exp_data, "read data is the record before the write");
    g = req_valid & req_ready;
    chk(g == (req_valid & -req_valid), $sformatf("grant %b valid %b", g, req_valid));
    exp_rsp = g;
    for (int p = 0; p < NP; p++) if (g[p]) begin
      exp_data = ref_rec[req_sid[p]];
      if (req_we[p])
        ref_rec[req_sid[p]] = (ref_rec[req_sid[p]] & ~req_wmask[p]) | (req_wdata[p] & req_wmask[p]);
    end
  end

  function automatic logic [W-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic issue(input int p, input int sid, input bit we,
                       input logic [W-1:0] m, input logic [W-1:0] d);
    @(negedge clk); #1;
    req_valid[p] = 1; req_sid[p] = SID_W'(sid); req_we[p] = we;
    req_wmask[p] = m; req_wdata[p] = d;
    forever begin logic r; #0.2; r = req_ready[p]; @(negedge clk); #1; if (r) break; end
    req_valid[p] = 0;
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst = 0;
    fork
      for (int n = 0; n < OPS; n++) begin : d0
        issue(0, $urandom_range(NS-1), $urandom_range(1), rnd() & rnd(), rnd());
        repeat ($urandom_range(3)) @(negedge clk);
      end
      for (int n = 0; n < OPS; n++) begin : d1
        issue(1, $urandom_range(NS-1), $urandom_range(1), rnd() | rnd(), rnd());
        repeat ($urandom_range(2)) @(negedge clk);
      end
      for (int n = 0; n < OPS; n++)
        issue(2, $urandom_range(NS-1), $urandom_range(1), rnd(), rnd());
    join
    for (int s = 0; s < NS; s++) issue(2, s, 0, '0, '0);
    repeat (3) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
