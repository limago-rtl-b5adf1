// cuckoo_cam: CuckooCAM, the exact-match table that maps a TCP three-tuple
// (64-bit key) to a sessionID (16-bit value). Two tables of 2^TAB_AW slots
// are addressed by two different hashes of the key, and a small fully
// associative stash takes keys that could not be placed. A lookup or a
// delete reads both tables and the stash at once: lookup answers one cycle
// after it is taken. An insert that finds its slot taken evicts the old
// entry to its slot in the other table, and so on, up to MAX_KICKS moves;
// the last evicted entry goes to the stash. Only if the stash is full too
// does the insert fail: rsp_ok is low and rsp_val names the value whose
// entry was lost. Insert time thus grows with the load factor.
// Interface: one request channel (req_valid/req_ready) with an op code;
// responses come on rsp_valid with hit/value for lookups and ok for
// inserts and deletes. The hashes are this design's choice (xor-folds of
// the key rotated by different amounts, multiplied by odd constants).
module cuckoo_cam #(
  parameter int KEY_W     = 64,
  parameter int VAL_W     = 16,
  parameter int TAB_AW    = 13,   // 2 x 8192 slots for 10,000 connections
  parameter int STASH     = 8,
  parameter int MAX_KICKS = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             req_valid,
  output logic             req_ready,
  input  logic [1:0]       req_op,      // 0 lookup, 1 insert, 2 delete
  input  logic [KEY_W-1:0] req_key,
  input  logic [VAL_W-1:0] req_val,
  output logic             rsp_valid,
  output logic [1:0]       rsp_op,
  output logic             rsp_hit,     // lookup: found / delete: was present
  output logic             rsp_ok,      // insert: placed
  output logic [VAL_W-1:0] rsp_val,
  output logic [$clog2(STASH+1)-1:0] stash_used
);
  localparam int N = 1 << TAB_AW;
  localparam int ENT_W = 1 + KEY_W + VAL_W;
  typedef struct packed {
    logic             v;
    logic [KEY_W-1:0] k;
    logic [VAL_W-1:0] d;
  } ent_t;

  ent_t t0 [N];
  ent_t t1 [N];
  ent_t st [STASH];

  function automatic logic [TAB_AW-1:0] hash(logic [KEY_W-1:0] k, logic which);
    logic [63:0] x;
    x = 64'(k);
    if (which) x = {x[40:0], x[63:41]} ^ 64'h9E37_79B9_7F4A_7C15;
    x = x ^ (x >> 29);
    x = x * (which ? 64'hC2B2_AE3D_27D4_EB4F : 64'hBF58_476D_1CE4_E5B9);
    x = x ^ (x >> 31);
    return x[63 -: TAB_AW];
  endfunction

  typedef enum logic [2:0] { S_IDLE, S_LOOK, S_KICK, S_KICK2 } st_e;
  st_e state;

  logic [1:0]       op_q;
  logic [KEY_W-1:0] key_q;
  logic [VAL_W-1:0] val_q;
  ent_t             r0, r1, cur;
  logic [TAB_AW-1:0] a0_q, a1_q;
  logic             side;       // table the current entry goes to
  logic [$clog2(MAX_KICKS+1)-1:0] kicks;

  // stash search (combinational over the small stash)
  logic                      s_hit, s_free_found;
  logic [$clog2(STASH)-1:0]  s_idx, s_free;
  always_comb begin
    s_hit = 1'b0; s_idx = '0; s_free_found = 1'b0; s_free = '0;
    stash_used = '0;
    for (int i = STASH-1; i >= 0; i--) begin
      if (st[i].v && st[i].k == key_q) begin s_hit = 1'b1; s_idx = i[$clog2(STASH)-1:0]; end
      if (!st[i].v) begin s_free_found = 1'b1; s_free = i[$clog2(STASH)-1:0]; end
      stash_used += {{($clog2(STASH+1)-1){1'b0}}, st[i].v};
    end
  end

  assign req_ready = (state == S_IDLE);
  wire h0 = r0.v && r0.k == key_q;
  wire h1 = r1.v && r1.k == key_q;
  wire [TAB_AW-1:0] cur_a = side ? hash(cur.k, 1'b1) : hash(cur.k, 1'b0);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      rsp_valid <= 1'b0;
      for (int i = 0; i < STASH; i++) st[i] <= '0;
    end else begin
      rsp_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (req_valid) begin
          op_q  <= req_op;
          key_q <= req_key;
          val_q <= req_val;
          a0_q  <= hash(req_key, 1'b0);
          a1_q  <= hash(req_key, 1'b1);
          r0    <= t0[hash(req_key, 1'b0)];
          r1    <= t1[hash(req_key, 1'b1)];
          state <= S_LOOK;
        end
        S_LOOK: begin
          rsp_op  <= op_q;
          rsp_hit <= h0 || h1 || s_hit;
          rsp_val <= h0 ? r0.d : h1 ? r1.d : st[s_idx].d;
          rsp_ok  <= 1'b1;
          state   <= S_IDLE;
          rsp_valid <= 1'b1;
          if (op_q == 2'd2) begin                 // delete
            if (h0) t0[a0_q] <= '0;
            else if (h1) t1[a1_q] <= '0;
            else if (s_hit) st[s_idx] <= '0;
          end else if (op_q == 2'd1) begin        // insert
            if (h0) t0[a0_q].d <= val_q;          // update in place
            else if (h1) t1[a1_q].d <= val_q;
            else if (s_hit) st[s_idx].d <= val_q;
            else if (!r0.v) t0[a0_q] <= '{1'b1, key_q, val_q};
            else if (!r1.v) t1[a1_q] <= '{1'b1, key_q, val_q};
            else begin                            // evict from table 0
              t0[a0_q]  <= '{1'b1, key_q, val_q};
              cur       <= r0;
              side      <= 1'b1;
              kicks     <= '0;
              rsp_valid <= 1'b0;
              state     <= S_KICK;
            end
          end
        end
        S_KICK: begin                              // read the evicted entry's other slot
          r0    <= side ? t1[cur_a] : t0[cur_a];
          a0_q  <= cur_a;
          state <= S_KICK2;
        end
        S_KICK2: begin
          if (!r0.v) begin
            if (side) t1[a0_q] <= cur; else t0[a0_q] <= cur;
            rsp_valid <= 1'b1; rsp_ok <= 1'b1; state <= S_IDLE;
          end else if (kicks == ($clog2(MAX_KICKS+1))'(MAX_KICKS)) begin
            rsp_valid <= 1'b1;
            state     <= S_IDLE;
            if (s_free_found) begin
              st[s_free] <= cur;
              rsp_ok     <= 1'b1;
            end else begin
              rsp_ok     <= 1'b0;
              rsp_val    <= cur.d;
            end
          end else begin
            if (side) t1[a0_q] <= cur; else t0[a0_q] <= cur;
            cur   <= r0;
            side  <= ~side;
            kicks <= kicks + 1'b1;
            state <= S_KICK;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Tables are cleared by an initial loop; a reset does not walk them.
  initial begin
    for (int i = 0; i < N; i++) begin t0[i] = '0; t1[i] = '0; end
  end
endmodule
