// shift_accumulator: adds the LUT outputs and accumulates them bit-serially.
//
// With the inputs in two's complement and bit planes presented LSB first, the
// inner product is
//   y = sum_{k=0}^{WD-2} F_k * 2^k  -  F_{WD-1} * 2^{WD-1},
// F_k being the table value addressed by bit plane k (the sum of the NLUT
// partition outputs). This is evaluated in Horner form as in the classic
// shift-accumulator: each cycle the register is shifted right by one place
// and the new F is added at weight 2^(WD-1):
//   acc <= (acc >>> 1) + (+/-F_k << (WD-1)),   '-' only on the sign-bit cycle.
// A term entering at bit plane k is shifted right WD-1-k times, never more
// than the WD-1 zero bits it carries, so no bit is lost and the result is the
// exact integer inner product. The register is LUT_W + clog2(NLUT) + WD + 1
// bits wide, which holds every intermediate value; the finished result is
// taken as its low OUT_W bits (the filter's full-precision output width).
//
// Timing: first marks the cycle of bit plane 0 (the register starts from zero),
// last the cycle of the sign bit. On the last cycle the result is written to
// y, and y_valid is high during the following cycle. One result takes WD
// enabled cycles. Everything holds while en is low. Reset is synchronous.
// An assertion flags a result that does not fit OUT_W bits.
// The Horner recurrence and the sign-bit subtraction follow the filter's
// description; the register widths, the flags and the output register are
// this design's choices.
module shift_accumulator #(
  parameter int NLUT  = 3,
  parameter int LUT_W = 17,
  parameter int WD    = 16,
  parameter int OUT_W = 33
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic                    first,
  input  logic                    last,
  input  logic signed [LUT_W-1:0] lut_data [NLUT],
  output logic signed [OUT_W-1:0] y,
  output logic                    y_valid
);

  localparam int SUM_W = LUT_W + $clog2(NLUT);
  localparam int ACC_W = SUM_W + WD + 1;

  logic signed [SUM_W-1:0] f_sum;
  logic signed [ACC_W-1:0] acc, acc_base, addend, acc_next;

  // Adder over the partitioned LUTs: F_k.
  always_comb begin
    f_sum = '0;
    for (int i = 0; i < NLUT; i++) f_sum += SUM_W'(lut_data[i]);
  end

  always_comb begin
    if (first) acc_base = '0;
    else       acc_base = acc >>> 1;   // arithmetic: acc is signed
    addend   = ACC_W'(f_sum) <<< (WD - 1);
    acc_next = last ? (acc_base - addend) : (acc_base + addend);
  end

  // The result must fit OUT_W: with the filter's coefficients it always
  // does, and this catches a coefficient or width change that breaks that.
  always_ff @(posedge clk) begin
    if (!rst && en && last)
      assert (acc_next == ACC_W'(OUT_W'(acc_next)))
        else $error("shift_accumulator: result overflows %0d bits", OUT_W);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc     <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else if (en) begin
      acc     <= acc_next;
      y_valid <= last;
      if (last) y <= OUT_W'(acc_next);
    end else begin
      y_valid <= 1'b0;
    end
  end

endmodule
