// tb_tcp_opt_parser: random TCP option lists (NOP, MSS, SACK-permitted,
// timestamps, Window Scale with shifts 0..15, an optional end-of-list)
// are walked by the parser and by a reference walk in the testbench. The
// Window Scale result must match (shift capped at 14) and the walk must
// take one cycle per option plus a fixed two cycles.
`timescale 1ns/1ps
module tb_tcp_opt_parser;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `define STEP begin @(negedge clk); #1; end
  `define CHECK(c, msg) begin checks++; if (!(c)) begin failures++; $display("FAIL %0t: %s", $time, msg); end end

  logic start, busy, done, ws_valid;
  logic [191:0] opt;
  logic [5:0] len;
  logic [3:0] ws;
  tcp_opt_parser dut (.clk, .rst, .start, .opt, .len, .busy, .done, .ws_valid, .ws);

  initial begin
    int nws = 0;
    start = 0; opt = '0; len = 0;
    repeat (3) `STEP
    rst = 1'b0;
    `STEP
    for (int t = 0; t < 500; t++) begin
      automatic byte unsigned b[$];
      automatic int items = 0, cyc = 0;
      automatic bit has_ws = 0;
      automatic logic [3:0] exp_ws = 0;
      while (b.size() < 16) begin
        case ($urandom_range(4))
          0: b.push_back(8'd1);
          1: begin b.push_back(8'd2); b.push_back(8'd4); b.push_back(8'h05); b.push_back(8'hb4); end
          2: begin b.push_back(8'd4); b.push_back(8'd2); end
          3: begin b.push_back(8'd8); b.push_back(8'd10); repeat (8) b.push_back(8'($urandom)); end
          default: if (!has_ws) begin
            automatic int v = $urandom_range(15);
            b.push_back(8'd3); b.push_back(8'd3); b.push_back(8'(v));
            has_ws = 1; exp_ws = (v > 14) ? 4'd14 : 4'(v);
          end
        endcase
        items++;
      end
      if ($urandom_range(1)) begin b.push_back(8'd0); b.push_back(8'($urandom)); end
      if (b.size() > 24) begin t--; continue; end
      // reference walk counts the options (a skipped case above adds nothing)
      items = 0;
      for (int i = 0; i < b.size(); ) begin
        if (b[i] == 0) break;
        items++;
        i += (b[i] == 1) ? 1 : b[i+1];
      end
      opt = '0;
      foreach (b[i]) opt[8*i +: 8] = b[i];
      len = 6'(b.size());
      start = 1'b1;
      `STEP
      start = 1'b0;
      while (!done && cyc < 100) begin `STEP cyc++; end
      `CHECK(done, "walk did not end")
      `CHECK(ws_valid == has_ws, "Window Scale presence")
      if (has_ws) `CHECK(ws == exp_ws, $sformatf("shift %0d expected %0d", ws, exp_ws))
      `CHECK(cyc == items + 1, $sformatf("walk took %0d cycles for %0d options", cyc, items))
      if (has_ws) nws++;
      `STEP
    end
    `CHECK(nws > 50, "too few lists with the option")
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
