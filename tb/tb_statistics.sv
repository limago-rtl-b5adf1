// tb_statistics: random increments on all eight counters for 2000 cycles
// are summed by a reference model; each counter is then read over the
// AXI4-Lite port and compared, one is cleared by a write and read again,
// and an address past the counters must return the 0xDEADBEEF marker.
`timescale 1ns/1ps
module tb_statistics;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `define STEP begin @(negedge clk); #1; end
  `define CHECK(c, msg) begin checks++; if (!(c)) begin failures++; $display("FAIL %0t: %s", $time, msg); end end

  logic [7:0] inc;
  logic [7:0][15:0] inc_amt;
  logic awvalid, awready, wvalid, wready, bvalid, arvalid, arready, rvalid;
  logic [7:0] awaddr, araddr;
  logic [31:0] wdata, rdata;
  logic [1:0] bresp, rresp;
  statistics dut (.clk, .rst, .inc, .inc_amt, .s_awvalid(awvalid), .s_awready(awready), .s_awaddr(awaddr),
    .s_wvalid(wvalid), .s_wready(wready), .s_wdata(wdata), .s_bvalid(bvalid), .s_bready(1'b1), .s_bresp(bresp),
    .s_arvalid(arvalid), .s_arready(arready), .s_araddr(araddr), .s_rvalid(rvalid), .s_rready(1'b1),
    .s_rdata(rdata), .s_rresp(rresp));

  logic [31:0] refc [8];

  task automatic rd(input int a, output logic [31:0] v);
    arvalid = 1; araddr = 8'(a);
    forever begin logic r; r = arready; @(negedge clk); #1; if (r) break; end
    arvalid = 0;
    while (!rvalid) `STEP
    v = rdata;
    `STEP
  endtask

  initial begin
    logic [31:0] v;
    inc = 0; inc_amt = '0; awvalid = 0; wvalid = 0; arvalid = 0; awaddr = 0; araddr = 0; wdata = 0;
    foreach (refc[i]) refc[i] = 0;
    repeat (3) `STEP
    rst = 1'b0;
    `STEP
    repeat (2000) begin
      inc = 8'($urandom);
      for (int i = 0; i < 8; i++) begin
        inc_amt[i] = 16'($urandom);
        if (inc[i]) refc[i] += {16'd0, inc_amt[i]};
      end
      `STEP
    end
    inc = 0;
    `STEP
    for (int i = 0; i < 8; i++) begin
      rd(4 * i, v);
      `CHECK(v == refc[i], $sformatf("counter %0d = %0d expected %0d", i, v, refc[i]))
    end
    // clear counter 3
    awvalid = 1; awaddr = 8'd12; wvalid = 1; wdata = 0;
    while (!(awready)) `STEP
    `STEP
    awvalid = 0;
    while (!wready) `STEP
    `STEP
    wvalid = 0;
    repeat (3) `STEP
    rd(12, v);
    `CHECK(v == 0, "counter 3 not cleared")
    rd(8, v);
    `CHECK(v == refc[2], "counter 2 changed by the clear of counter 3")
    rd(4 * 40, v);
    `CHECK(v == 32'hDEAD_BEEF, "read past the counters")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
