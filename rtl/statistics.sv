// statistics: Statistics module. It counts inbound and outbound packet
// events of the stack in NCNT 32-bit counters (one increment input per
// counter; inc[i] adds inc_amt[i]) and lets a host read them through an
// AXI4-Lite slave: counter i is at byte address 4*i. Writing any value to
// a counter's address clears it. Reads answer one cycle after the address
// is taken; responses are always OKAY.
module statistics #(
  parameter int NCNT = 8
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [NCNT-1:0]        inc,
  input  logic [NCNT-1:0][15:0]  inc_amt,
  // AXI4-Lite
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [7:0]  s_awaddr,
  input  logic        s_wvalid,
  output logic        s_wready,
  input  logic [31:0] s_wdata,
  output logic        s_bvalid,
  input  logic        s_bready,
  output logic [1:0]  s_bresp,
  input  logic        s_arvalid,
  output logic        s_arready,
  input  logic [7:0]  s_araddr,
  output logic        s_rvalid,
  input  logic        s_rready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp
);
  logic [NCNT-1:0][31:0] cnt;
  logic [7:0]            aw_q;
  logic                  aw_have;
  wire                   wr_go = aw_have && s_wvalid && !s_bvalid;

  assign s_awready = !aw_have;
  assign s_wready  = wr_go;
  assign s_arready = !s_rvalid;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt      <= '0;
      aw_have  <= 1'b0;
      s_bvalid <= 1'b0;
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
    end else begin
      for (int i = 0; i < NCNT; i++) if (inc[i]) cnt[i] <= cnt[i] + {16'd0, inc_amt[i]};
      if (s_awvalid && s_awready) begin aw_have <= 1'b1; aw_q <= s_awaddr; end
      if (wr_go) begin
        if (int'(aw_q[7:2]) < NCNT) cnt[aw_q[7:2]] <= '0;
        aw_have  <= 1'b0;
        s_bvalid <= 1'b1;
      end
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (s_arvalid && s_arready) begin
        s_rvalid <= 1'b1;
        s_rdata  <= (int'(s_araddr[7:2]) < NCNT) ? cnt[s_araddr[7:2]] : 32'hDEAD_BEEF;
      end
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
    end
  end
endmodule
