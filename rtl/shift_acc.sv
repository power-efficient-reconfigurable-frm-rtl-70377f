// shift_acc: shift accumulator of a distributed-arithmetic filter slice.
//
// Each enabled cycle adds the partial product pp, shifted left by `shift`
// bits (its bit weight), to the running sum. `first` starts a new sum, and
// `neg` subtracts instead of adding, for the sign bit plane of a two's
// complement input. Registered: acc shows the sum one cycle after the last
// enabled cycle. Reset clears the sum.
// The shift accumulator itself belongs to the filter's processing unit; the
// LSB-first order, the sign-plane subtraction and the plain '+' (the prefix
// adders sit in the partial product generator) are this design's choices.
module shift_acc #(
  parameter int unsigned IN_W  = 22,
  parameter int unsigned SH_W  = 1,
  parameter int unsigned ACC_W = IN_W + (1 << SH_W) + 1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic                    first,
  input  logic                    neg,
  input  logic [SH_W-1:0]         shift,
  input  logic signed [IN_W-1:0]  pp,
  output logic signed [ACC_W-1:0] acc
);

  logic signed [ACC_W-1:0] term, base;

  always_comb begin
    term = ACC_W'(pp) <<< shift;
    if (neg) term = -term;
    base = first ? '0 : acc;
  end

  always_ff @(posedge clk) begin
    if (rst)     acc <= '0;
    else if (en) acc <= base + term;
  end

endmodule
