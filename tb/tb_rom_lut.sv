// tb_rom_lut: exhaustive self-checking test of rom_lut. It builds the three
// 64-word tables of the default split (6 address bits, coefficient groups
// starting at 0, 6 and 12) and the three 8-word tables used with the pre-adder
// (3 address bits, groups at 0, 3 and 6), reads every address and compares the
// word with the sum of the selected coefficients. The coefficients are written
// out here again, independently of the design's package.
module tb_rom_lut;
  localparam logic signed [15:0] HREF [18] = '{
    16'sh03cd, 16'sh045e, 16'shfece, 16'shf8d2, 16'shfafd, 16'sh067d,
    16'sh101f, 16'sh055d, 16'shbb54, 16'sh44ac, 16'shfaa3, 16'shefe1,
    16'shf983, 16'sh0503, 16'sh072e, 16'sh0132, 16'shfba2, 16'shfc33
  };

  logic [5:0]         a6;
  logic [2:0]         a3;
  logic signed [16:0] d6 [3];
  logic signed [16:0] d3 [3];

  int checks = 0, failures = 0;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  rom_lut                                u6_0 (.addr(a6), .data(d6[0]));
  rom_lut #(.BASE(6))                    u6_1 (.addr(a6), .data(d6[1]));
  rom_lut #(.BASE(12))                   u6_2 (.addr(a6), .data(d6[2]));
  rom_lut #(.ADDR_W(3), .BASE(0))        u3_0 (.addr(a3), .data(d3[0]));
  rom_lut #(.ADDR_W(3), .BASE(3))        u3_1 (.addr(a3), .data(d3[1]));
  rom_lut #(.ADDR_W(3), .BASE(6))        u3_2 (.addr(a3), .data(d3[2]));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int largest;
    largest = 0;
    for (int a = 0; a < 64; a++) begin
      a6 = 6'(a);
      a3 = 3'(a);
      #1;
      for (int g = 0; g < 3; g++) begin
        int want6, want3;
        want6 = 0;
        want3 = 0;
        for (int j = 0; j < 6; j++) if (((a >> j) & 1) != 0) want6 += int'(HREF[6*g + j]);
        for (int j = 0; j < 3; j++) if (((a >> j) & 1) != 0) want3 += int'(HREF[3*g + j]);
        if (want6 > largest) largest = want6;
        checks++;
        if (int'(d6[g]) != want6) begin
          failures++;
          if (failures < 10) $display("6-bit LUT %0d addr %0d: %0d expected %0d", g, a, d6[g], want6);
        end
        if (a < 8) begin
          checks++;
          if (int'(d3[g]) != want3) begin
            failures++;
            if (failures < 10) $display("3-bit LUT %0d addr %0d: %0d expected %0d", g, a, d3[g], want3);
          end
        end
      end
      @(posedge clk);
    end
    $display("largest table entry %0d", largest);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
