// mem_model: behavioural model of the external payload memory (the DDR4
// behind its memory controller) for simulation only. A word-wide memory
// with byte-strobe writes; reads return the addressed word three cycles
// later, in order. Words never written read as zero. Storage is sparse,
// so the full address range of the design can be modelled.
module mem_model #(
  parameter int WA_W = 26
) (
  input  logic            clk,
  input  logic            wr_valid,
  output logic            wr_ready,
  input  logic [WA_W-1:0] wr_addr,
  input  logic [511:0]    wr_data,
  input  logic [63:0]     wr_strb,
  input  logic            rd_valid,
  output logic            rd_ready,
  input  logic [WA_W-1:0] rd_addr,
  output logic            rsp_valid,
  output logic [511:0]    rsp_data
);
  logic [511:0] mem [logic [WA_W-1:0]];
  logic [2:0]   pv;
  logic [511:0] pd [3];

  assign wr_ready  = 1'b1;
  assign rd_ready  = 1'b1;
  assign rsp_valid = pv[2];
  assign rsp_data  = pd[2];

  initial pv = '0;

  always @(posedge clk) begin
    if (wr_valid) begin
      logic [511:0] w;
      w = mem.exists(wr_addr) ? mem[wr_addr] : '0;
      for (int i = 0; i < 64; i++) if (wr_strb[i]) w[8*i +: 8] = wr_data[8*i +: 8];
      mem[wr_addr] = w;
    end
    pv    <= {pv[1:0], rd_valid};
    pd[0] <= mem.exists(rd_addr) ? mem[rd_addr] : '0;
    pd[1] <= pd[0];
    pd[2] <= pd[1];
  end
endmodule
