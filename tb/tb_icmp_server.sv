// tb_icmp_server: unit test of the ICMP module.
// It sends random IPv4/ICMP packets (20-byte IP header, 8 to 300 bytes of
// ICMP) as byte queues cut into 64-byte beats: echo requests with a
// correct checksum, and other ICMP types that must be dropped. The
// receiver stalls at random. For every echo request the testbench checks
// the reply byte by byte: addresses swapped, type 0, code and the rest of
// the message unchanged, the ICMP checksum over the whole reply correct,
// and the IP header checksum still correct. It also checks that the reply
// has the same number of beats as the request, that the first reply beat
// is offered in the same cycle as the request beat (the module adds no
// latency: this design's choice), and that the echo counter matches.
// A watchdog stops the run if it hangs.
`timescale 1ns/1ps
module tb_icmp_server;
  import limago_pkg::*;
  localparam int NPKT = 300;
  logic clk = 0, rst = 1;
  always #1.55 clk = ~clk;

  axis_t s = '0, m;
  logic s_valid = 0, s_ready, m_valid, m_ready = 0;
  logic [31:0] echo_cnt;

  icmp_server dut (.*);

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

  function automatic logic [15:0] csum(input byte unsigned b[$], input int from, input int to);
    logic [31:0] a;
    a = 0;
    for (int i = from; i < to; i += 2)
      a += {b[i], (i + 1 < to) ? b[i+1] : 8'h00};
    while (a[31:16] != 0) a = a[15:0] + a[31:16];
    return ~a[15:0];
  endfunction

  typedef byte unsigned bq_t[$];
  bq_t exp_q[$];
  int  exp_beats[$];
  int  n_echo = 0;

  // receiver: random stalls, rebuild each reply and compare
  initial begin
    byte unsigned got[$];
    int beats;
    beats = 0;
    forever begin
      @(negedge clk); #1;
      m_ready = ($urandom_range(3) != 0);
      #0.2;
      if (m_valid && m_ready && !rst) begin
        for (int i = 0; i < 64; i++) if (m.keep[i]) got.push_back(m.data[8*i +: 8]);
        beats++;
        if (m.last) begin
          bq_t e;
          int eb;
          if (exp_q.size() == 0) chk(0, "reply without a request");
          else begin
            e = exp_q.pop_front(); eb = exp_beats.pop_front();
            chk(got.size() == e.size(), $sformatf("reply length %0d exp %0d", got.size(), e.size()));
            chk(beats == eb, $sformatf("reply has %0d beats, request %0d, len %0d", beats, eb, e.size()));
            if (got.size() == e.size()) begin
              bit same;
              same = 1;
              for (int i = 0; i < e.size(); i++)
                if (i != 22 && i != 23 && got[i] != e[i]) same = 0;
              chk(same, "reply bytes");
              chk(csum(got, 20, got.size()) == 16'h0000, "ICMP checksum of the reply");
              chk(csum(got, 0, 20) == 16'h0000, "IP header checksum of the reply");
            end
          end
          got.delete(); beats = 0;
        end
      end
    end
  end

  // input side: also checks that a beat offered to the module is offered
  // on to the output in the same cycle when it is an echo request
  bit cur_echo = 0;
  always @(posedge clk) if (!rst && s_valid)
    chk(m_valid == cur_echo, "echo beat passes through in the same cycle");

  task automatic send(input byte unsigned b[$], input bit echo);
    int n;
    n = b.size();
    cur_echo = echo;
    for (int o = 0; o < n; o += 64) begin
      @(negedge clk); #1;
      s.data = '0; s.keep = '0;
      for (int i = 0; i < 64 && o + i < n; i++) begin
        s.data[8*i +: 8] = b[o+i]; s.keep[i] = 1'b1;
      end
      s.last = (o + 64 >= n); s_valid = 1;
      forever begin logic r; #0.2; r = s_ready; @(negedge clk); #1; if (r) break; end
      s_valid = 0;
      repeat ($urandom_range(2)) @(negedge clk);
    end
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst = 0;
    for (int k = 0; k < NPKT; k++) begin
      byte unsigned b[$], e[$];
      int len, typ;
      logic [15:0] c;
      b.delete(); e.delete();
      len = 20 + $urandom_range(8, 300);
      case ($urandom_range(3))
        0: typ = 0; 1: typ = 3; default: typ = 8;
      endcase
      for (int i = 0; i < len; i++) b.push_back(8'($urandom));
      b[0] = 8'h45; b[1] = 0; b[2] = 8'(len >> 8); b[3] = 8'(len);
      b[8] = 64; b[9] = 1; b[10] = 0; b[11] = 0;
      b[20] = 8'(typ); b[21] = 0; b[22] = 0; b[23] = 0;
      c = csum(b, 0, 20); b[10] = c[15:8]; b[11] = c[7:0];
      c = csum(b, 20, len); b[22] = c[15:8]; b[23] = c[7:0];
      if (typ == 8) begin
        e = b;
        for (int i = 0; i < 4; i++) begin e[12+i] = b[16+i]; e[16+i] = b[12+i]; end
        e[20] = 0;
        exp_q.push_back(e); exp_beats.push_back((len + 63) / 64);
        n_echo++;
      end
      send(b, typ == 8);
    end
    cur_echo = 0;
    repeat (50) @(negedge clk);
    chk(exp_q.size() == 0, $sformatf("%0d replies missing", exp_q.size()));
    chk(echo_cnt == 32'(n_echo), $sformatf("echo counter %0d exp %0d", echo_cnt, n_echo));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
