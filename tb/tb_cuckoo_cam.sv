// tb_cuckoo_cam: checks the cuckoo hash CAM against an associative-array
// reference. A small table (2 x 16 slots, 8-entry stash) is filled with 24
// random keys so that insertions must displace entries and use the stash;
// every key is then looked up (hit with the right value), random absent
// keys must miss, half of the keys are deleted and the lookups repeated.
// The lookup latency is checked: the answer comes a fixed two cycles
// after the request is taken, whatever the table holds.
`timescale 1ns/1ps
module tb_cuckoo_cam;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `define STEP begin @(negedge clk); #1; end
  `define CHECK(c, msg) begin checks++; if (!(c)) begin failures++; $display("FAIL %0t: %s", $time, msg); end end

  logic        req_valid, req_ready, rsp_valid, rsp_hit, rsp_ok;
  logic [1:0]  req_op, rsp_op;
  logic [63:0] req_key;
  logic [15:0] req_val, rsp_val;
  logic [3:0]  stash_used;

  cuckoo_cam #(.TAB_AW(4)) dut (.clk, .rst, .req_valid, .req_ready, .req_op, .req_key, .req_val,
                                .rsp_valid, .rsp_op, .rsp_hit, .rsp_ok, .rsp_val, .stash_used);

  logic [15:0] refm [logic [63:0]];
  logic [63:0] keys [$];
  int lat;

  task automatic op(input logic [1:0] o, input logic [63:0] k, input logic [15:0] v,
                    output logic hit, output logic ok, output logic [15:0] val);
    int t = 0;
    req_valid = 1'b1; req_op = o; req_key = k; req_val = v;
    forever begin logic r; r = req_ready; @(negedge clk); #1; if (r) break; end
    req_valid = 1'b0;
    while (!rsp_valid) begin `STEP t++; end
    lat = t + 1;
    hit = rsp_hit; ok = rsp_ok; val = rsp_val;
    `CHECK(rsp_op == o, "response kind")
    `STEP
  endtask

  initial begin
    logic h, ok; logic [15:0] v;
    int placed;
    req_valid = 0; req_op = 0; req_key = 0; req_val = 0;
    repeat (3) `STEP
    rst = 1'b0;
    `STEP
    placed = 0;
    for (int i = 0; i < 24; i++) begin
      automatic logic [63:0] k = {$urandom, $urandom};
      op(2'd1, k, 16'(i + 100), h, ok, v);
      if (ok) begin refm[k] = 16'(i + 100); keys.push_back(k); placed++; end
    end
    $display("placed %0d of 24 keys, stash holds %0d", placed, stash_used);
    `CHECK(placed >= 20, "too many insertions failed")
    `CHECK(stash_used <= 8, "stash count")
    foreach (keys[i]) begin
      op(2'd0, keys[i], 16'd0, h, ok, v);
      `CHECK(h && v == refm[keys[i]], "lookup of a present key")
      `CHECK(lat == 2, $sformatf("lookup latency %0d cycles, expected 2", lat))
    end
    for (int i = 0; i < 50; i++) begin
      automatic logic [63:0] k = {$urandom, $urandom};
      op(2'd0, k, 16'd0, h, ok, v);
      `CHECK(!h, "lookup of an absent key hit")
      `CHECK(lat == 2, "lookup latency (miss)")
    end
    for (int i = 0; i < keys.size(); i += 2) begin
      op(2'd2, keys[i], 16'd0, h, ok, v);
      `CHECK(h, "delete of a present key")
      refm.delete(keys[i]);
    end
    foreach (keys[i]) begin
      op(2'd0, keys[i], 16'd0, h, ok, v);
      `CHECK(h == refm.exists(keys[i]), "lookup after delete")
      if (h) `CHECK(v == refm[keys[i]], "value after delete")
    end
    // re-insert into the freed slots
    for (int i = 0; i < keys.size(); i += 2) begin
      op(2'd1, keys[i], 16'(7000 + i), h, ok, v);
      `CHECK(ok, "re-insert after delete")
      op(2'd0, keys[i], 16'd0, h, ok, v);
      `CHECK(h && v == 16'(7000 + i), "lookup after re-insert")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
