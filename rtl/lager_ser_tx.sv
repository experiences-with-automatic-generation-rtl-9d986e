// lager_ser_tx -- transmitter of a bit-serial interprocessor link.
//
// Processors exchange words over single-bit paths. `load` takes a WL-bit
// word; during the next WL cycles the word leaves LSB first on `sd`, with
// `sv` high for every bit. A new `load` while busy restarts with the new
// word (transfers are scheduled by the microprograms, so this does not
// happen in a correct program). Bit-serial links are from the architecture
// description; the two-wire data/valid format is this design's own.
module lager_ser_tx #(
  parameter int unsigned WL = 16
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          load,
  input  logic [WL-1:0] wdata,
  output logic          sd,
  output logic          sv,
  output logic          busy
);
  localparam int unsigned CW = $clog2(WL + 1);

  logic [WL-1:0] sr;
  logic [CW-1:0] left;

  assign busy = (left != '0);
  assign sd   = sr[0];
  assign sv   = busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      sr   <= '0;
      left <= '0;
    end else if (load) begin
      sr   <= wdata;
      left <= CW'(WL);
    end else if (busy) begin
      sr   <= sr >> 1;
      left <= left - 1'b1;
    end
  end
endmodule
