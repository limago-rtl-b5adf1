// sar_table: Tx or Rx SAR (segmentation and reassembly) table. It keeps
// one record of W bits per connection (the pointers that describe the TCP
// window of the connection) and serves NP clients. A request reads the
// record and may write any subset of its bits (wmask), so each client
// updates only the fields it owns. One request is served per cycle, lowest
// port first; the record as it was before the write returns one cycle
// after the request is taken (rsp_valid of that port).
module sar_table
  import limago_pkg::*;
#(
  parameter int MAX_SESS = 10000,
  parameter int W        = 128,
  parameter int NP       = 3
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [NP-1:0]          req_valid,
  output logic [NP-1:0]          req_ready,
  input  logic [NP-1:0][SID_W-1:0] req_sid,
  input  logic [NP-1:0]          req_we,
  input  logic [NP-1:0][W-1:0]   req_wmask,
  input  logic [NP-1:0][W-1:0]   req_wdata,
  output logic [NP-1:0]          rsp_valid,
  output logic [W-1:0]           rsp_data
);
  logic [W-1:0] rec [MAX_SESS];
  logic [$clog2(NP+1)-1:0] g;
  logic gv;

  always_comb begin
    gv = 1'b0;
    g  = '0;
    for (int p = NP-1; p >= 0; p--) if (req_valid[p]) begin gv = 1'b1; g = p[$clog2(NP+1)-1:0]; end
    req_ready = gv ? (NP'(1) << g) : '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rsp_valid <= '0;
    end else begin
      rsp_valid <= req_ready;
      if (gv) begin
        rsp_data <= rec[req_sid[g]];
        if (req_we[g])
          rec[req_sid[g]] <= (rec[req_sid[g]] & ~req_wmask[g]) | (req_wdata[g] & req_wmask[g]);
      end
    end
  end

  initial for (int i = 0; i < MAX_SESS; i++) rec[i] = '0;
endmodule
