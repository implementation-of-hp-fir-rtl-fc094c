// transposition: turns N parallel words into a stream of bit planes.
//
// Distributed arithmetic needs, in each cycle, bit k of every input word at
// once: a bit plane. This block holds one shift register per word. On a cycle
// with en and load high it takes the N words of din; on every other enabled
// cycle all registers shift right by one place, arithmetic (sign-extending).
// bits[i] is always the least-significant bit of register i, so the cycle
// after a load shows bit 0 of every word, the next cycle bit 1, and so on up
// to the sign bit W-1, W cycles after the load. Words are sent LSB first as
// the filter's description prescribes; a new load may coincide with the
// cycle that shows the sign bit of the previous words, since the output is
// taken from the registers before the edge. Reset is synchronous and clears
// the registers.
module transposition #(
  parameter int N = 18,
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic                load,
  input  logic signed [W-1:0] din [N],
  output logic        [N-1:0] bits
);

  logic signed [W-1:0] sreg [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) sreg[i] <= '0;
    end else if (en) begin
      for (int i = 0; i < N; i++) sreg[i] <= load ? din[i] : (sreg[i] >>> 1);
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) bits[i] = sreg[i][0];
  end

endmodule
