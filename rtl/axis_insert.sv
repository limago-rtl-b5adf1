// axis_insert: prepends a header of hlen bytes (1..64) to a packet on a
// 512-bit stream. A header request {hdr, hlen, has_pl} is taken on the hdr
// handshake; if has_pl is set the payload packet on s follows it, shifted up
// by hlen bytes, otherwise the header alone is sent. The bytes of a payload
// beat that do not fit are carried into the next output beat; a last beat
// whose carry is not empty costs one extra cycle. One beat per cycle.
module axis_insert
  import limago_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic [DW-1:0] hdr,
  input  logic [6:0]    hlen,
  input  logic          has_pl,
  input  logic          hdr_valid,
  output logic          hdr_ready,
  input  axis_t         s,
  input  logic          s_valid,
  output logic          s_ready,
  output axis_t         m,
  output logic          m_valid,
  input  logic          m_ready
);
  typedef enum logic [1:0] { IDLE, BODY, FLUSH } st_e;
  st_e           st;
  logic [DW-1:0] cd;     // carried data
  logic [KW-1:0] ck;     // carried keep
  logic [6:0]    hl;
  logic [9:0]    sh;
  logic [DW-1:0] nd;
  logic [KW-1:0] nk;

  assign sh = {hl, 3'b0};
  assign nd = s.data >> (10'd512 - sh);
  assign nk = s.keep >> (7'd64 - hl);

  always_comb begin
    m         = '0;
    m_valid   = 1'b0;
    s_ready   = 1'b0;
    hdr_ready = 1'b0;
    unique case (st)
      IDLE: begin
        hdr_ready = 1'b1;
        if (!has_pl) begin
          m.data    = hdr;
          m.keep    = keep_n(hlen);
          m.last    = 1'b1;
          m_valid   = hdr_valid;
          hdr_ready = m_ready;
        end
      end
      BODY: begin
        m.data  = cd | (s.data << sh);
        m.keep  = ck | (s.keep << hl);
        m.last  = s.last && (nk == '0);
        m_valid = s_valid;
        s_ready = m_ready;
      end
      FLUSH: begin
        m.data  = cd;
        m.keep  = ck;
        m.last  = 1'b1;
        m_valid = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= IDLE;
      hl <= 7'd1;
      cd <= '0;
      ck <= '0;
    end else begin
      unique case (st)
        IDLE: if (hdr_valid && hdr_ready && has_pl) begin
          st <= BODY;
          hl <= hlen;
          cd <= hdr & ~({DW{1'b1}} << {hlen, 3'b0});
          ck <= keep_n(hlen);
        end
        BODY: if (s_valid && s_ready) begin
          cd <= nd;
          ck <= nk;
          if (s.last) st <= (nk == '0) ? IDLE : FLUSH;
        end
        FLUSH: if (m_ready) st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end
endmodule
