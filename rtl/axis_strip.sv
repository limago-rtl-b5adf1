// axis_strip: removes the first n_bytes (0..63) bytes of every packet on a
// 512-bit stream and re-aligns the rest to byte 0. n_bytes is sampled with
// the first beat of each packet. Each output beat is the held beat shifted
// down by n bytes joined with the next beat shifted up by 64-n bytes (a 64
// to 1 byte multiplexer per output byte). One beat per cycle, plus one idle
// cycle after a packet whose last beat has to be flushed on its own.
// Packets with no bytes left are dropped.
module axis_strip
  import limago_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [5:0] n_bytes,
  input  axis_t      s,
  input  logic       s_valid,
  output logic       s_ready,
  output axis_t      m,
  output logic       m_valid,
  input  logic       m_ready
);
  axis_t      h;
  logic       hv, sop;
  logic [5:0] n, n_use;
  logic [9:0] sh_lo, sh_hi;
  logic       take, drop_h;

  assign n_use = sop ? n_bytes : n;  // offset for a beat loaded now
  assign sh_lo = {n, 3'b0};
  assign sh_hi = 10'd512 - {n, 3'b0};

  always_comb begin
    m       = '0;
    m_valid = 1'b0;
    s_ready = 1'b0;
    take    = 1'b0;
    drop_h  = 1'b0;
    if (!hv) begin
      s_ready = 1'b1;
    end else if (h.last) begin
      m.data  = h.data >> sh_lo;
      m.keep  = h.keep >> n;
      m.last  = 1'b1;
      m_valid = (m.keep != '0);
      drop_h  = (m.keep == '0) || m_ready;
    end else begin
      m.data  = (h.data >> sh_lo) | (s.data << sh_hi);
      m.keep  = (h.keep >> n) | (s.keep << (7'd64 - {1'b0, n}));
      m.last  = s.last && (n != '0) && ((s.keep >> n) == '0);
      m_valid = s_valid;
      s_ready = m_ready;
    end
    take = s_valid && s_ready;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hv  <= 1'b0;
      sop <= 1'b1;
      n   <= '0;
    end else begin
      if (drop_h) hv <= 1'b0;
      if (take) begin
        if (hv && !h.last && m.last) begin
          hv <= 1'b0;               // next beat fully merged into the output
        end else begin
          h  <= s;
          hv <= 1'b1;
        end
        n   <= n_use;
        sop <= s.last;
      end
    end
  end
endmodule
