// lager_ser_rx -- receiver of a bit-serial interprocessor link.
//
// Shifts in one bit per cycle while `sv` is high, LSB first. After WL bits
// the assembled word is copied to `rdata`, which holds it until the next
// word is complete, and `rvalid` pulses for one cycle. The processor reads
// `rdata` as an operand source. Matches lager_ser_tx; the format is this
// design's own.
module lager_ser_rx #(
  parameter int unsigned WL = 16
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          sd,
  input  logic          sv,
  output logic [WL-1:0] rdata,
  output logic          rvalid
);
  localparam int unsigned CW = $clog2(WL);

  logic [WL-1:0] sr;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      sr     <= '0;
      cnt    <= '0;
      rdata  <= '0;
      rvalid <= 1'b0;
    end else begin
      rvalid <= 1'b0;
      if (sv) begin
        sr <= {sd, sr[WL-1:1]};
        if (cnt == CW'(WL - 1)) begin
          cnt    <= '0;
          rdata  <= {sd, sr[WL-1:1]};
          rvalid <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
