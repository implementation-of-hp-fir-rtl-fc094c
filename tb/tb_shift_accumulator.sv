// tb_shift_accumulator: self-checking test of shift_accumulator at its
// default size (3 LUT inputs of 17 bits, 16 bit planes, 33-bit result).
// For each frame random table words F_0..F_15 are applied, one bit plane per
// enabled cycle, with first on plane 0 and last on plane 15, and random clock
// enable stalls. The result must equal
//   sum_{k<15} F_k 2^k - F_15 2^15
// computed by the testbench in 64-bit integers, y_valid must rise exactly
// once, in the cycle after the last plane, and each frame must take exactly
// 16 enabled cycles.
module tb_shift_accumulator;
  localparam int NLUT = 3, LUT_W = 17, WD = 16, OUT_W = 33;

  logic                    clk;
  initial clk = 1'b0;
  logic                    rst, en, first, last;
  logic signed [LUT_W-1:0] lut_data [NLUT];
  logic signed [OUT_W-1:0] y;
  logic                    y_valid;

  int checks = 0, failures = 0, stalls = 0, valids = 0;

  shift_accumulator dut (.clk, .rst, .en, .first, .last, .lut_data, .y, .y_valid);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && y_valid) valids++;

  initial begin
    longint want;
    rst = 1'b1; en = 1'b0; first = 1'b0; last = 1'b0;
    for (int i = 0; i < NLUT; i++) lut_data[i] = '0;
    @(posedge clk); #1;
    checks++;
    if (y !== '0 || y_valid !== 1'b0) failures++;
    rst = 1'b0;
    for (int frame = 0; frame < 500; frame++) begin
      int enabled;
      enabled = 0;
      want = 0;
      for (int k = 0; k < WD; k++) begin
        longint f;
        f = 0;
        @(negedge clk);
        en = ($urandom_range(0, 5) != 0);
        while (!en) begin
          first = 1'b0; last = 1'b0;
          stalls++;
          @(negedge clk);
          en = ($urandom_range(0, 5) != 0);
        end
        first = (k == 0);
        last  = (k == WD-1);
        for (int i = 0; i < NLUT; i++) begin
          case (frame % 5)
            0:       lut_data[i] = 17'sh0ffff;             // largest positive
            1:       lut_data[i] = 17'sh10000;             // most negative
            // random words small enough for the sum to fit the 33-bit result
            default: lut_data[i] = LUT_W'($signed(15'($urandom)));
          endcase
          f += longint'(lut_data[i]);
        end
        if (k == WD-1) want -= f <<< k;
        else           want += f <<< k;
        @(posedge clk);
        enabled++;
        #1;
        if (k < WD-1) begin
          checks++;
          if (y_valid) begin
            failures++;
            $display("frame %0d: y_valid early at plane %0d", frame, k);
          end
        end
      end
      checks += 3;
      if (!y_valid) begin
        failures++;
        $display("frame %0d: y_valid missing after the sign plane", frame);
      end
      if (longint'(y) != want) begin
        failures++;
        if (failures < 10) $display("frame %0d: y = %0d expected %0d", frame, y, want);
      end
      if (enabled != WD) failures++;
      @(negedge clk);
      en = 1'b0; first = 1'b0; last = 1'b0;
      @(posedge clk); #1;
      checks++;
      if (y_valid) failures++;   // one-cycle pulse
    end
    checks += 2;
    if (valids != 500) begin
      failures++;
      $display("%0d valid pulses for 500 frames", valids);
    end
    if (stalls == 0) failures++;
    $display("stalls %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
