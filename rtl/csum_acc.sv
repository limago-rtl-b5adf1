// csum_acc: TCP/IP checksum unit for the 512-bit datapath (Rx and Tx
// checksum). It adds the 32 big-endian 16-bit words of one beat per clock,
// masked by tkeep, into a wide accumulator, and adds init (for instance the
// TCP pseudo-header sum) with the first beat of a packet. One cycle after
// the last beat, sum carries the 16-bit one's-complement sum with the
// end-around carries folded in; a packet is correct when sum is 16'hFFFF
// (its complement, the checksum, is zero) and a transmitter writes ~sum
// into the checksum field. The 32 words are summed with a plain adder tree
// that the synthesis tool maps to compressors; the document's carry-save
// 7:3 compressor arrangement is not reproduced gate by gate.
module csum_acc
  import limago_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  input  logic [DW-1:0] in_data,
  input  logic [KW-1:0] in_keep,
  input  logic          in_last,
  input  logic [31:0]   init,
  output logic          out_valid,
  output logic [15:0]   sum
);
  logic        sop;
  logic [31:0] acc, beat_sum, nxt;

  always_comb begin
    beat_sum = '0;
    for (int i = 0; i < KW/2; i++) begin
      beat_sum += {16'd0, (in_keep[2*i]   ? in_data[16*i +: 8]   : 8'd0),
                          (in_keep[2*i+1] ? in_data[16*i+8 +: 8] : 8'd0)};
    end
    nxt = {16'd0, fold16(sop ? init : acc)} + beat_sum;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sop       <= 1'b1;
      acc       <= '0;
      out_valid <= 1'b0;
      sum       <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        acc <= nxt;
        sop <= in_last;
        if (in_last) begin
          out_valid <= 1'b1;
          sum       <= fold16(nxt);
        end
      end
    end
  end
endmodule
