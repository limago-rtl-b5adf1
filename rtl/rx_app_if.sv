// rx_app_if: Rx App If, the application's receive interface. The Rx
// Engine's notifications (new data, connection opened, accepted, closed)
// are queued for the application. The application asks for data with a
// read request {sid, len}; the Rx SAR record gives the next unread
// sequence number app_rd and how much is there (recvd - app_rd); up to len
// of those bytes are read from the Rx Buffer at offset (app_rd mod buffer
// size) and streamed to the application (the stream comes straight from
// the buffer reader), then app_rd is advanced, which opens the receive
// window again. A request for a session with no data is answered with an
// empty response (rd_rsp_len = 0) and no stream.
module rx_app_if
  import limago_pkg::*;
#(
  parameter int WS_LOCAL = 0,
  localparam int REG_W   = 16 + WS_LOCAL
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             nt_in_valid,
  output logic             nt_in_ready,
  input  notif_t           nt_in,
  output logic             nt_valid,
  input  logic             nt_ready,
  output notif_t           nt,
  input  logic             rq_valid,
  output logic             rq_ready,
  input  logic [SID_W-1:0] rq_sid,
  input  logic [15:0]      rq_len,
  output logic             rd_rsp_valid,
  output logic [15:0]      rd_rsp_len,
  output logic             rs_valid,
  input  logic             rs_ready,
  output logic             rs_we,
  output rx_sar_t          rs_wmask,
  output rx_sar_t          rs_wdata,
  output logic [SID_W-1:0] rs_sid,
  input  logic             rs_rsp_valid,
  input  rx_sar_t          rs_rsp_data,
  output logic             rcmd_valid,
  input  logic             rcmd_ready,
  output logic [SID_W-1:0] rcmd_sid,
  output logic [REG_W-1:0] rcmd_off,
  output logic [15:0]      rcmd_len
);
  sync_fifo #(.W($bits(notif_t)), .DEPTH(32)) u_nq (
    .clk, .rst, .wr_valid(nt_in_valid), .wr_ready(nt_in_ready), .wr_data(nt_in),
    .rd_valid(nt_valid), .rd_ready(nt_ready), .rd_data(nt), .count()
  );

  typedef enum logic [2:0] { R_IDLE, R_RD, R_RDW, R_CMD, R_UPD } rst_e;
  rst_e             st;
  logic [SID_W-1:0] sid_q;
  logic [15:0]      len_q;
  logic [31:0]      ptr_q;

  assign rq_ready   = (st == R_IDLE);
  assign rs_valid   = (st == R_RD) || (st == R_UPD);
  assign rs_we      = (st == R_UPD);
  assign rs_sid     = sid_q;
  assign rcmd_valid = (st == R_CMD);
  assign rcmd_sid   = sid_q;
  assign rcmd_off   = ptr_q[REG_W-1:0];
  assign rcmd_len   = len_q;
  always_comb begin
    rs_wmask        = '0;
    rs_wmask.app_rd = '1;
    rs_wdata        = '0;
    rs_wdata.app_rd = ptr_q + {16'd0, len_q};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st           <= R_IDLE;
      rd_rsp_valid <= 1'b0;
      rd_rsp_len   <= '0;
    end else begin
      rd_rsp_valid <= 1'b0;
      unique case (st)
        R_IDLE: if (rq_valid) begin
          sid_q <= rq_sid;
          len_q <= rq_len;
          st    <= R_RD;
        end
        R_RD:  if (rs_ready) st <= R_RDW;
        R_RDW: if (rs_rsp_valid) begin
          logic [31:0] avail;
          avail = rs_rsp_data.recvd - rs_rsp_data.app_rd;
          ptr_q <= rs_rsp_data.app_rd;
          if (avail < {16'd0, len_q}) len_q <= avail[15:0];
          rd_rsp_valid <= 1'b1;
          rd_rsp_len   <= (avail < {16'd0, len_q}) ? avail[15:0] : len_q;
          st <= (avail == 32'd0 || len_q == 16'd0) ? R_IDLE : R_CMD;
        end
        R_CMD: if (rcmd_ready) st <= R_UPD;
        R_UPD: if (rs_ready) st <= R_IDLE;
        default: st <= R_IDLE;
      endcase
    end
  end
endmodule
