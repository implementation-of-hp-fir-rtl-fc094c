// fir_hp_da: order-17 high-pass FIR filter built on distributed arithmetic.
//
// The filter computes y(n) = sum_{i=0}^{17} h(i) x(n-i) for 16-bit signed
// samples and the 16-bit coefficients of fir_hp_pkg, exactly, in 33 bits,
// without a single multiplier. The datapath is the chain
//   delay line -> pre-adder (optional) -> transposition -> 3 ROM LUTs
//   -> shift-accumulator
// The transposition stage presents one bit plane of the DA input words per
// clock, LSB first; the bit plane addresses three look-up tables holding the
// partial sums of the coefficients, and the shift-accumulator weights and adds
// the table outputs over W_d clocks. One output therefore takes W_d clocks,
// and the filter accepts one sample every W_d enabled clocks.
//
// Configurations (parameter PREADD):
//   0 (default): all 18 taps go to the tables, W_d = 16, and the 18-bit table
//     address is split into 3 LUTs of 6 address bits (64 words each).
//   1: the pre-adder folds the antisymmetric taps, x(n-i) - x(n-17+i) for
//     i = 0..8, so only 9 words of 17 bits remain: W_d = 17 and the 9-bit
//     address is split into 3 LUTs of 3 address bits. Same result.
//
// Interface: clk; clk_enable freezes every register while low; reset is
// synchronous and active high. A bit-phase counter sequences the datapath.
// in_strobe is high in the enabled cycle in which filter_in is sampled, once
// every W_d enabled cycles; the caller holds the sample there at that cycle.
// out_valid is high for one cycle when filter_out has just taken a new value,
// W_d + 2 enabled cycles after the cycle in which its newest input sample was
// sampled; filter_out holds its value until the next result.
//
// The block chain, the coefficients, the three-way table split, the 16-bit
// input, the 33-bit output and the names clk, clk_enable, reset, filter_in and
// filter_out follow the filter's description. The phase counter, the strobes,
// the reset behaviour and the PREADD option are this design's own.
module fir_hp_da
  import fir_hp_pkg::*;
#(
  parameter bit PREADD = 1'b0
) (
  input  logic    clk,
  input  logic    clk_enable,
  input  logic    reset,
  input  sample_t filter_in,
  output result_t filter_out,
  output logic    in_strobe,
  output logic    out_valid
);

  localparam int NDA    = PREADD ? TAPS / 2 : TAPS;   // words fed to DA
  localparam int WD     = PREADD ? IN_W + 1 : IN_W;   // bits per word
  localparam int ADDR_W = NDA / NLUT;                 // address bits per LUT

  if (NDA % NLUT != 0) begin : g_bad_split
    $error("fir_hp_da: DA inputs do not split evenly over the LUTs");
  end

  // ---------------------------------------------------------------- control
  // phase counts the enabled cycles of one sample period, 0 .. WD-1.
  // A sample enters the delay line at phase WD-1, the transposition loads at
  // phase 0, bit plane k is accumulated at phase k+1 (mod WD), and the sign
  // bit plane (k = WD-1) at phase 0 of the next period.
  // primed: a sample has entered the delay line since reset. running: the
  // transposition holds a frame loaded after that, so the frame that ends at
  // the next phase 0 is a real output (the frames before it are not shown).
  logic [$clog2(WD)-1:0] phase;
  logic                  primed;
  logic                  running;
  logic                  load, first_bit, last_bit;

  always_ff @(posedge clk) begin
    if (reset) begin
      phase   <= '0;
      primed  <= 1'b0;
      running <= 1'b0;
    end else if (clk_enable) begin
      phase <= (phase == ($clog2(WD))'(WD - 1)) ? '0 : phase + 1'b1;
      if (in_strobe) primed <= 1'b1;
      if (load && primed) running <= 1'b1;
    end
  end

  always_comb begin
    in_strobe = clk_enable && (phase == ($clog2(WD))'(WD - 1));
    load      = (phase == 0);
    first_bit = (phase == 1);
    last_bit  = (phase == 0) && running;
  end

  // ------------------------------------------------------------- delay line
  sample_t taps [TAPS];

  delay_line #(.TAPS(TAPS), .W(IN_W)) u_delay_line (
    .clk      (clk),
    .rst      (reset),
    .shift_en (in_strobe),
    .din      (filter_in),
    .taps     (taps)
  );

  // -------------------------------------------- pre-adder and transposition
  logic signed [WD-1:0] da_words [NDA];
  logic [NDA-1:0]       plane;

  if (PREADD) begin : g_preadd
    pre_adder #(.TAPS(TAPS), .W(IN_W), .ANTI(1'b1)) u_pre_adder (
      .taps   (taps),
      .folded (da_words)
    );
  end else begin : g_direct
    always_comb for (int i = 0; i < NDA; i++) da_words[i] = taps[i];
  end

  transposition #(.N(NDA), .W(WD)) u_transposition (
    .clk  (clk),
    .rst  (reset),
    .en   (clk_enable),
    .load (load),
    .din  (da_words),
    .bits (plane)
  );

  // ---------------------------------------------------------------- ROM LUTs
  logic signed [LUT_W-1:0] lut_data [NLUT];

  for (genvar g = 0; g < NLUT; g++) begin : g_lut
    rom_lut #(.ADDR_W(ADDR_W), .DATA_W(LUT_W), .BASE(g * ADDR_W)) u_rom_lut (
      .addr (plane[g*ADDR_W +: ADDR_W]),
      .data (lut_data[g])
    );
  end

  // -------------------------------------------------------- shift-accumulator
  shift_accumulator #(.NLUT(NLUT), .LUT_W(LUT_W), .WD(WD), .OUT_W(OUT_W)) u_shift_acc (
    .clk      (clk),
    .rst      (reset),
    .en       (clk_enable),
    .first    (first_bit),
    .last     (last_bit),
    .lut_data (lut_data),
    .y        (filter_out),
    .y_valid  (out_valid)
  );

endmodule
