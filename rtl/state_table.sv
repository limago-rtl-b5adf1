// state_table: State Table. It stores the RFC 793 state of every
// connection and serves three clients: port 0 (Rx Engine) and port 1 (Tx
// App If) do read-modify-write, port 2 (Tx Engine) and port 3 (time-wait
// expiry) only read or only write. A read with lock set locks the session
// for its port; the other ports' requests for a locked session wait until
// the lock owner writes the new state, which releases the lock. This makes
// every read-modify-write atomic. One request is served per cycle, port 0
// first; read data returns one cycle after the request is taken.
module state_table
  import limago_pkg::*;
#(
  parameter int MAX_SESS = 10000
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [3:0]            req_valid,
  output logic [3:0]            req_ready,
  input  logic [3:0][SID_W-1:0] req_sid,
  input  logic [3:0]            req_we,
  input  logic [3:0]            req_lock,
  input  tcp_state_e [3:0]      req_wdata,
  output logic [3:0]            rsp_valid,
  output tcp_state_e            rsp_data
);
  tcp_state_e       st [MAX_SESS];
  logic [3:0]       lk;                 // port holds a lock
  logic [3:0][SID_W-1:0] lk_sid;
  logic [3:0]       elig, grant;

  always_comb begin
    for (int p = 0; p < 4; p++) begin
      elig[p] = req_valid[p];
      for (int q = 0; q < 4; q++)
        if (q != p && lk[q] && lk_sid[q] == req_sid[p]) elig[p] = 1'b0;
    end
    grant = '0;
    for (int p = 3; p >= 0; p--) if (elig[p]) grant = 4'(1) << p;
    req_ready = grant;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      lk        <= '0;
      rsp_valid <= '0;
    end else begin
      rsp_valid <= '0;
      for (int p = 0; p < 4; p++) begin
        if (grant[p]) begin
          rsp_valid[p] <= !req_we[p];
          rsp_data     <= st[req_sid[p]];
          if (req_we[p]) begin
            st[req_sid[p]] <= req_wdata[p];
            lk[p]          <= 1'b0;
          end else if (req_lock[p]) begin
            lk[p]     <= 1'b1;
            lk_sid[p] <= req_sid[p];
          end
        end
      end
    end
  end

  initial for (int i = 0; i < MAX_SESS; i++) st[i] = CLOSED;
endmodule
