// lager_booth -- second-order (radix-4) Booth decoder for the serial multiplier.
//
// Turns three multiplier bits {b(2i+1), b(2i), b(2i-1)} into the partial
// product d*m with d in {-2,-1,0,+1,+2}, so one multiply step retires two
// multiplier bits instead of one and a multiplication takes half the
// cycles. Purely combinational, output width W (the accumulator width).
// The option of a second-order Booth decoding module is from the
// architecture description; the recoding table is the standard one.
module lager_booth #(
  parameter int unsigned W = 18
) (
  input  logic [2:0]        bits,   // {b(2i+1), b(2i), b(2i-1)}
  input  logic signed [W-1:0] m,
  output logic signed [W-1:0] pp
);
  always_comb begin
    case (bits)
      3'b001, 3'b010: pp = m;
      3'b011:         pp = m <<< 1;
      3'b100:         pp = -(m <<< 1);
      3'b101, 3'b110: pp = -m;
      default:        pp = '0;
    endcase
  end
endmodule
