// session_lookup: Session Lookup with its Session Table. It turns the
// three-tuple of a segment (remote IP, remote port, local port) into the
// sessionID that indexes every other table, through the CuckooCAM. Two
// clients can look up: port A (Rx Engine) and port B (Tx App If, active
// opens); with create set, a tuple that is not found is inserted with a
// new sessionID. New sessionIDs are handed out in order (0, 1, 2, ...)
// and then taken from a FIFO of released ones. The Session Table maps a
// sessionID back to its tuple for the Tx Engine (rev_* port, one-cycle
// read). release deletes a session from the CAM, returns its ID and, for
// an ephemeral local port, tells the Port Table to close it.
// Requests are served one at a time: release first, then A, then B.
module session_lookup
  import limago_pkg::*;
#(
  parameter int MAX_SESS = 10000,
  parameter int TAB_AW   = 13
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             a_valid,
  output logic             a_ready,
  input  tuple_t           a_tuple,
  input  logic             a_create,
  output logic             a_rsp_valid,
  input  logic             b_valid,
  output logic             b_ready,
  input  tuple_t           b_tuple,
  input  logic             b_create,
  output logic             b_rsp_valid,
  output logic             rsp_hit,       // found or created
  output logic             rsp_created,
  output logic [SID_W-1:0] rsp_sid,
  input  logic             rel_valid,
  output logic             rel_ready,
  input  logic [SID_W-1:0] rel_sid,
  output logic             port_rel_valid,
  output logic [15:0]      port_rel,
  input  logic             rev_valid,
  input  logic [SID_W-1:0] rev_sid,
  output tuple_t           rev_tuple,
  output logic [SID_W-1:0] sess_used
);
  localparam int FD = 1 << $clog2(MAX_SESS);
  typedef enum logic [2:0] { IDLE, LOOK, INS, REL_RD, REL_DEL, REL_WAIT } st_e;
  st_e st;

  tuple_t           stab [MAX_SESS];
  logic             cl;            // 0: client A, 1: client B
  tuple_t           tq;
  logic             cq;
  logic [SID_W-1:0] sid_q, next_new;
  logic             cam_req_valid, cam_req_ready, cam_rsp_valid, cam_hit, cam_ok;
  logic [1:0]       cam_op, cam_rsp_op;
  logic [SID_W-1:0] cam_val, cam_rsp_val;
  logic             fq_valid, fq_ready;
  logic [SID_W-1:0] fq_sid;
  logic             fr_push;
  logic             iss;           // CAM request of this state issued

  cuckoo_cam #(.KEY_W(64), .VAL_W(SID_W), .TAB_AW(TAB_AW)) u_cam (
    .clk, .rst,
    .req_valid(cam_req_valid), .req_ready(cam_req_ready), .req_op(cam_op),
    .req_key(tq), .req_val(cam_val),
    .rsp_valid(cam_rsp_valid), .rsp_op(cam_rsp_op), .rsp_hit(cam_hit), .rsp_ok(cam_ok),
    .rsp_val(cam_rsp_val), .stash_used()
  );

  sync_fifo #(.W(SID_W), .DEPTH(FD)) u_free (
    .clk, .rst,
    .wr_valid(fr_push), .wr_ready(), .wr_data(sid_q),
    .rd_valid(fq_valid), .rd_ready(fq_ready), .rd_data(fq_sid), .count()
  );

  wire can_new = fq_valid || (next_new != SID_W'(MAX_SESS));
  wire [SID_W-1:0] new_sid = fq_valid ? fq_sid : next_new;

  assign rel_ready = (st == IDLE);
  assign a_ready   = (st == IDLE) && !rel_valid;
  assign b_ready   = (st == IDLE) && !rel_valid && !a_valid;

  always_comb begin
    cam_req_valid = (st == LOOK || st == INS || st == REL_DEL) && !iss;
    cam_op        = (st == INS) ? 2'd1 : (st == REL_DEL) ? 2'd2 : 2'd0;
    cam_val       = new_sid;
    fq_ready      = 1'b0;
    fr_push       = 1'b0;
    if (st == INS && !iss && cam_req_ready && fq_valid) fq_ready = 1'b1;
    if (st == REL_WAIT && cam_rsp_valid)        fr_push  = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rev_valid) rev_tuple <= stab[rev_sid];
    if (cam_req_valid && cam_req_ready) iss <= 1'b1;
    if (cam_rsp_valid || st == IDLE)    iss <= 1'b0;
    if (rst) begin
      iss            <= 1'b0;
      st             <= IDLE;
      next_new       <= '0;
      a_rsp_valid    <= 1'b0;
      b_rsp_valid    <= 1'b0;
      port_rel_valid <= 1'b0;
      sess_used      <= '0;
      rsp_hit        <= 1'b0;
      rsp_created    <= 1'b0;
      rsp_sid        <= '0;
    end else begin
      a_rsp_valid    <= 1'b0;
      b_rsp_valid    <= 1'b0;
      port_rel_valid <= 1'b0;
      unique case (st)
        IDLE: begin
          if (rel_valid) begin
            sid_q <= rel_sid;
            st    <= REL_RD;
          end else if (a_valid) begin
            cl <= 1'b0; tq <= a_tuple; cq <= a_create; st <= LOOK;
          end else if (b_valid) begin
            cl <= 1'b1; tq <= b_tuple; cq <= b_create; st <= LOOK;
          end
        end
        LOOK: if (cam_rsp_valid) begin
          if (cam_hit || !cq || !can_new) begin
            rsp_hit     <= cam_hit;
            rsp_created <= 1'b0;
            rsp_sid     <= cam_rsp_val;
            a_rsp_valid <= !cl;
            b_rsp_valid <= cl;
            st          <= IDLE;
          end else begin
            st <= INS;          // iss is cleared by the response
          end
        end
        INS: begin
          if (!iss && cam_req_ready) begin
            sid_q <= new_sid;
            if (!fq_valid) next_new <= next_new + 1'b1;
            stab[new_sid] <= tq;
          end
          if (cam_rsp_valid) begin
            rsp_hit     <= cam_ok;
            rsp_created <= cam_ok;
            rsp_sid     <= sid_q;
            a_rsp_valid <= !cl;
            b_rsp_valid <= cl;
            sess_used   <= sess_used + 1'b1;
            st          <= IDLE;
          end
        end
        REL_RD: begin
          tq <= stab[sid_q];
          st <= REL_DEL;
        end
        REL_DEL: if (!iss && cam_req_ready) begin
          port_rel_valid <= 1'b1;
          port_rel       <= tq.lport;
          st             <= REL_WAIT;
        end
        REL_WAIT: if (cam_rsp_valid) begin
          sess_used <= sess_used - 1'b1;
          st        <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
