// port_table: Port Table. It holds the state of every TCP port, CLOSE,
// LISTEN or ACTIVE (2 bits x 65,536 ports). Ports below 32768 are static:
// the application opens them for listening. Ports from 32768 up are
// ephemeral: an active open takes the next CLOSE port found by a rotating
// search pointer and marks it ACTIVE; releasing a connection closes its
// ephemeral port again. The Rx Engine queries a port and gets its state
// one cycle later. Priority when several requests meet: release, listen,
// ephemeral search; the query port is always served.
module port_table
  import limago_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // Rx Engine query
  input  logic        q_valid,
  input  logic [15:0] q_port,
  output logic        q_rsp_valid,
  output port_state_e q_rsp_state,
  // application listen (static ports)
  input  logic        lis_valid,
  output logic        lis_ready,
  input  logic [15:0] lis_port,
  output logic        lis_rsp_valid,
  output logic        lis_rsp_ok,
  // ephemeral port allocation for active opens
  input  logic        alloc_valid,
  output logic        alloc_ready,
  output logic [15:0] alloc_port,
  // release of an ephemeral port
  input  logic        rel_valid,
  input  logic [15:0] rel_port
);
  port_state_e ps [65536];
  logic        init_done;
  logic [15:0] init_ptr;
  logic [14:0] eph;        // search pointer inside 32768..65535

  wire  [15:0] eph_port = {1'b1, eph};
  assign lis_ready   = init_done && !rel_valid;
  assign alloc_port  = eph_port;
  assign alloc_ready = init_done && !rel_valid && !lis_valid && ps[eph_port] == P_CLOSE;

  always_ff @(posedge clk) begin
    q_rsp_valid <= q_valid;
    q_rsp_state <= ps[q_port];
    if (rst) begin
      init_done     <= 1'b0;
      init_ptr      <= '0;
      eph           <= '0;
      lis_rsp_valid <= 1'b0;
    end else if (!init_done) begin
      ps[init_ptr] <= P_CLOSE;          // clear the table after reset
      init_ptr     <= init_ptr + 1'b1;
      if (init_ptr == 16'hFFFF) init_done <= 1'b1;
    end else begin
      lis_rsp_valid <= 1'b0;
      if (rel_valid) begin
        if (rel_port[15]) ps[rel_port] <= P_CLOSE;
      end else if (lis_valid) begin
        lis_rsp_valid <= 1'b1;
        lis_rsp_ok    <= !lis_port[15];
        if (!lis_port[15]) ps[lis_port] <= P_LISTEN;
      end else if (alloc_valid) begin
        if (ps[eph_port] == P_CLOSE) ps[eph_port] <= P_ACTIVE;
        eph <= eph + 1'b1;
      end
    end
  end
endmodule
