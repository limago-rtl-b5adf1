// icmp_server: ICMP module. It answers ICMP echo requests (type 8, code 0)
// with echo replies: source and destination IPv4 addresses are swapped,
// the type becomes 0 and the ICMP checksum is updated incrementally
// (RFC 1624: HC' = ~(~HC + ~m + m'), with m = 0x0800 and m' = 0); the IP
// header checksum is unchanged by the swap. Only the first beat is
// modified, so the reply streams out at one beat per cycle with no packet
// buffer. Other ICMP messages are dropped. Input and output are IPv4
// packets without the Ethernet header (20-byte IP header assumed).
module icmp_server
  import limago_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  axis_t s,
  input  logic  s_valid,
  output logic  s_ready,
  output axis_t m,
  output logic  m_valid,
  input  logic  m_ready,
  output logic [31:0] echo_cnt
);
  logic sop, pass_q;
  wire  is_echo = rd8(s.data, 20) == 8'd8 && rd8(s.data, 21) == 8'd0;
  wire  pass    = sop ? is_echo : pass_q;

  always_comb begin
    logic [DW-1:0] d;
    logic [31:0]   c;
    d = s.data;
    c = '0;
    if (sop) begin
      d = wr32(d, 12, rd32(s.data, 16));
      d = wr32(d, 16, rd32(s.data, 12));
      d = wr8 (d, 20, 8'd0);
      c = {16'd0, ~rd16(s.data, 22)} + 32'h0000_F7FF;
      d = wr16(d, 22, ~fold16(c));
    end
    m.data  = d;
    m.keep  = s.keep;
    m.last  = s.last;
    m_valid = s_valid && pass;
    s_ready = pass ? m_ready : 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sop      <= 1'b1;
      pass_q   <= 1'b0;
      echo_cnt <= '0;
    end else if (s_valid && s_ready) begin
      sop <= s.last;
      if (sop) begin
        pass_q <= is_echo;
        if (is_echo) echo_cnt <= echo_cnt + 1;
      end
    end
  end
endmodule
