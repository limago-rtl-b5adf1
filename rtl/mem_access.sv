// mem_access: access to one payload buffer (Rx or Tx) in external memory.
// Each connection owns a circular buffer of 2^REG_W bytes (REG_W = 16 +
// window-scale shift) at byte address sid * 2^REG_W; the offset inside it
// is the TCP sequence number modulo the buffer size, so accesses are
// unaligned and may run past the end of the buffer.
// Write: a command {sid, off} is followed by a payload packet aligned at
// byte 0. Each beat is shifted up by off[5:0] bytes; the bytes that spill
// over are carried into the next memory word, and a final partial word is
// flushed after the last beat. Read: a command {sid, off, len} reads the
// ceil((off[5:0]+len)/64) words that hold the bytes and a byte-shifter
// (axis_strip, a 64 to 1 multiplexer per byte) re-aligns them to byte 0;
// the packet ends after exactly len bytes. In both directions the word
// index inside the buffer counts modulo the buffer size, so a transfer
// that reaches the end of the circular buffer continues at its start: the
// transfer is split at the wrap-around into two address runs with no
// change of alignment (buffers are a multiple of 64 bytes).
// Memory side: word-wide (512-bit) write port with byte strobes, and a
// read port that takes one word address per cycle and returns the words
// in order, any number of cycles later. At most 16 reads are outstanding.
// One beat per cycle in each direction.
module mem_access
  import limago_pkg::*;
#(
  parameter int SID_BITS = 16,
  parameter int REG_W    = 16,
  localparam int WA_W    = SID_BITS + REG_W - 6   // word address width
) (
  input  logic                clk,
  input  logic                rst,
  // write command and data
  input  logic                wcmd_valid,
  output logic                wcmd_ready,
  input  logic [SID_BITS-1:0] wcmd_sid,
  input  logic [REG_W-1:0]    wcmd_off,
  input  axis_t               wdat,
  input  logic                wdat_valid,
  output logic                wdat_ready,
  // read command and data
  input  logic                rcmd_valid,
  output logic                rcmd_ready,
  input  logic [SID_BITS-1:0] rcmd_sid,
  input  logic [REG_W-1:0]    rcmd_off,
  input  logic [15:0]         rcmd_len,
  output axis_t               rdat,
  output logic                rdat_valid,
  input  logic                rdat_ready,
  // memory word port
  output logic                mwr_valid,
  input  logic                mwr_ready,
  output logic [WA_W-1:0]     mwr_addr,
  output logic [DW-1:0]       mwr_data,
  output logic [KW-1:0]       mwr_strb,
  output logic                mrd_valid,
  input  logic                mrd_ready,
  output logic [WA_W-1:0]     mrd_addr,
  input  logic                mrsp_valid,
  input  logic [DW-1:0]       mrsp_data
);
  localparam int RWW = REG_W - 6;   // word index width inside a buffer

  // ---------------- write path ----------------
  typedef enum logic [1:0] { W_IDLE, W_DATA, W_FLUSH } wst_e;
  wst_e                wst;
  logic [SID_BITS-1:0] w_sid;
  logic [RWW-1:0]      w_idx;
  logic [5:0]          w_o;
  logic [DW-1:0]       w_cd;
  logic [KW-1:0]       w_ck;
  logic [9:0]          w_sh;
  assign w_sh = {w_o, 3'b0};

  always_comb begin
    wcmd_ready = (wst == W_IDLE);
    wdat_ready = 1'b0;
    mwr_valid  = 1'b0;
    mwr_addr   = {w_sid, w_idx};
    mwr_data   = w_cd | (wdat.data << w_sh);
    mwr_strb   = w_ck | (wdat.keep << w_o);
    if (wst == W_DATA) begin
      mwr_valid  = wdat_valid;
      wdat_ready = mwr_ready;
    end else if (wst == W_FLUSH) begin
      mwr_valid = 1'b1;
      mwr_data  = w_cd;
      mwr_strb  = w_ck;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wst  <= W_IDLE;
      w_cd <= '0;
      w_ck <= '0;
    end else begin
      unique case (wst)
        W_IDLE: if (wcmd_valid) begin
          w_sid <= wcmd_sid;
          w_idx <= wcmd_off[REG_W-1:6];
          w_o   <= wcmd_off[5:0];
          w_cd  <= '0;
          w_ck  <= '0;
          wst   <= W_DATA;
        end
        W_DATA: if (wdat_valid && mwr_ready) begin
          w_cd  <= wdat.data >> (10'd512 - w_sh);
          w_ck  <= wdat.keep >> (7'd64 - {1'b0, w_o});
          w_idx <= w_idx + 1'b1;       // wraps at the end of the buffer
          if (wdat.last)
            wst <= ((wdat.keep >> (7'd64 - {1'b0, w_o})) != '0) ? W_FLUSH : W_IDLE;
        end
        W_FLUSH: if (mwr_ready) wst <= W_IDLE;
        default: wst <= W_IDLE;
      endcase
    end
  end

  // ---------------- read path ----------------
  logic                r_busy;
  logic [SID_BITS-1:0] r_sid;
  logic [RWW-1:0]      r_idx;
  logic [5:0]          r_o;
  logic [11:0]         r_words, r_issued, r_popped;
  logic [6:0]          r_lastk;   // valid bytes in the last word
  logic [4:0]          outst;
  logic                q_valid, q_ready;
  logic [DW-1:0]       q_data;
  axis_t               w_beat;
  logic [16:0]         span;

  assign span       = {11'd0, rcmd_off[5:0]} + {1'b0, rcmd_len};
  assign rcmd_ready = !r_busy;
  assign mrd_valid  = r_busy && (r_issued != r_words) && (outst < 5'd16);
  assign mrd_addr   = {r_sid, r_idx};

  sync_fifo #(.W(DW), .DEPTH(16)) u_rq (
    .clk, .rst,
    .wr_valid(mrsp_valid), .wr_ready(), .wr_data(mrsp_data),
    .rd_valid(q_valid), .rd_ready(q_ready), .rd_data(q_data), .count()
  );

  always_comb begin
    w_beat.data = q_data;
    w_beat.last = (r_popped == r_words - 12'd1);
    w_beat.keep = w_beat.last ? keep_n(r_lastk) : '1;
  end

  axis_strip u_align (
    .clk, .rst,
    .n_bytes(r_o),
    .s(w_beat), .s_valid(q_valid), .s_ready(q_ready),
    .m(rdat), .m_valid(rdat_valid), .m_ready(rdat_ready)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      r_busy   <= 1'b0;
      outst    <= '0;
      r_issued <= '0;
      r_popped <= '0;
      r_words  <= '0;
    end else begin
      outst <= outst + 5'(mrd_valid && mrd_ready) - 5'(q_valid && q_ready);
      if (!r_busy) begin
        if (rcmd_valid && rcmd_len != '0) begin
          r_busy   <= 1'b1;
          r_sid    <= rcmd_sid;
          r_idx    <= rcmd_off[REG_W-1:6];
          r_o      <= rcmd_off[5:0];
          r_words  <= 12'((span + 17'd63) >> 6);
          r_lastk  <= (span[5:0] == 6'd0) ? 7'd64 : {1'b0, span[5:0]};
          r_issued <= '0;
          r_popped <= '0;
        end
      end else begin
        if (mrd_valid && mrd_ready) begin
          r_issued <= r_issued + 1'b1;
          r_idx    <= r_idx + 1'b1;    // wraps at the end of the buffer
        end
        if (q_valid && q_ready) begin
          r_popped <= r_popped + 1'b1;
          if (w_beat.last) r_busy <= 1'b0;
        end
      end
    end
  end
endmodule
