// delay_line: the tapped delay line of the FIR filter.
//
// A chain of TAPS registers of W bits. When shift_en is high the new sample
// din enters taps[0] and every older sample moves one place along, so after
// the shift taps[i] holds x(n-i). All taps are visible in parallel, which is
// what the pre-adder and the transposition stage need. shift_en is raised once
// per output sample (once every W_d bit cycles) by the filter's controller.
// Reset is synchronous and clears every tap to zero, so the filter starts from
// an all-zero history. The chain and its length follow the filter's
// description; the reset behaviour is this design's choice.
module delay_line #(
  parameter int TAPS = 18,
  parameter int W    = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                shift_en,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] taps [TAPS]
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < TAPS; i++) taps[i] <= '0;
    end else if (shift_en) begin
      taps[0] <= din;
      for (int i = 1; i < TAPS; i++) taps[i] <= taps[i-1];
    end
  end

endmodule
