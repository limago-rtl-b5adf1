// tcp_opt_parser: TCP option parser of the Rx Engine, used to find the
// Window Scale option (kind 3, length 3) in SYN and SYN-ACK segments.
// TCP options have no fixed layout, so they are walked one option per
// clock cycle: kind 0 ends the list, kind 1 (no-operation) is one byte,
// every other option gives its length in its second byte. start takes up
// to 24 option bytes (opt[7:0] is the first) and their count; done pulses
// when the walk ends, with ws_valid and the advertised shift ws (capped at
// 14 as RFC 7323 requires). A malformed length ends the walk.
module tcp_opt_parser (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [191:0] opt,
  input  logic [5:0]   len,
  output logic         busy,
  output logic         done,
  output logic         ws_valid,
  output logic [3:0]   ws
);
  logic [191:0] b;
  logic [5:0]   idx, n;
  logic [7:0]   kind, olen, oval;

  always_comb begin
    kind = b[8*idx +: 8];
    olen = (idx + 6'd1 < n) ? b[8*(idx+6'd1) +: 8] : 8'd0;
    oval = (idx + 6'd2 < n) ? b[8*(idx+6'd2) +: 8] : 8'd0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      ws_valid <= 1'b0;
      ws       <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        b        <= opt;
        n        <= (len > 6'd24) ? 6'd24 : len;
        idx      <= '0;
        busy     <= 1'b1;
        ws_valid <= 1'b0;
        ws       <= '0;
      end else if (busy) begin
        if (idx >= n || kind == 8'd0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else if (kind == 8'd1) begin
          idx <= idx + 6'd1;
        end else if (olen < 8'd2 || {2'b0, idx} + olen > {2'b0, n}) begin
          busy <= 1'b0;                 // malformed
          done <= 1'b1;
        end else begin
          if (kind == 8'd3 && olen == 8'd3) begin
            ws_valid <= 1'b1;
            ws       <= (oval > 8'd14) ? 4'd14 : oval[3:0];
          end
          idx <= idx + olen[5:0];
        end
      end
    end
  end
endmodule
