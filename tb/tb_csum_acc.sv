// tb_csum_acc: checks the one's-complement checksum accumulator against a
// byte-by-byte reference on 300 random packets of 1..300 bytes with random
// partial last beats and a random initial value. A packet is correct when
// the folded sum of its bytes plus init is 0xFFFF once its checksum field
// holds the complement; here the raw folded sum is compared. The result
// must appear exactly one cycle after the last beat (one beat per cycle).
`timescale 1ns/1ps
module tb_csum_acc;
  import limago_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `define STEP begin @(negedge clk); #1; end
  `define CHECK(c, msg) begin checks++; if (!(c)) begin failures++; $display("FAIL %0t: %s", $time, msg); end end

  logic          in_valid, in_last, out_valid;
  logic [DW-1:0] in_data;
  logic [KW-1:0] in_keep;
  logic [31:0]   init;
  logic [15:0]   sum;

  csum_acc dut (.clk, .rst, .in_valid, .in_data, .in_keep, .in_last, .init, .out_valid, .sum);

  function automatic logic [15:0] ref_sum(byte unsigned b[$], logic [31:0] i0);
    logic [31:0] a = {16'd0, fold16(i0)};
    for (int k = 0; k < b.size(); k += 2) begin
      a += {b[k], (k + 1 < b.size()) ? b[k+1] : 8'd0};
      a = {16'd0, fold16(a)};
    end
    return fold16(a);
  endfunction

  initial begin
    in_valid = 0; in_last = 0; in_data = '0; in_keep = '0; init = '0;
    repeat (3) `STEP
    rst = 1'b0;
    `STEP
    for (int p = 0; p < 300; p++) begin
      automatic byte unsigned b[$];
      automatic int n = 1 + int'($urandom_range(299));
      logic [15:0] exp;
      for (int k = 0; k < n; k++) b.push_back(8'($urandom));
      init = $urandom;
      exp  = ref_sum(b, init);
      for (int o = 0; o < n; o += 64) begin
        in_data = '0; in_keep = '0;
        for (int k = 0; k < 64 && o + k < n; k++) begin in_data[8*k +: 8] = b[o+k]; in_keep[k] = 1'b1; end
        // bytes outside keep carry garbage and must be ignored
        for (int k = 0; k < 64; k++) if (!in_keep[k]) in_data[8*k +: 8] = 8'($urandom);
        in_valid = 1'b1; in_last = (o + 64 >= n);
        `STEP
      end
      in_valid = 1'b0; in_last = 1'b0;
      `CHECK(out_valid, "result not valid one cycle after the last beat")
      `CHECK(sum == exp, $sformatf("packet %0d: sum %04x expected %04x", p, sum, exp))
      if ($urandom_range(1)) `STEP

    end
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
