// tb_pre_adder: self-checking test of pre_adder in both folding modes at the
// default size (18 taps of 16 bits): subtracting (antisymmetric, the default)
// and adding (symmetric). Random and full-scale tap values are applied and
// every folded output is compared with taps[i] -/+ taps[17-i] computed in
// integer arithmetic by the testbench.
module tb_pre_adder;
  localparam int TAPS = 18;
  localparam int W    = 16;

  logic signed [W-1:0] taps [TAPS];
  logic signed [W:0]   f_anti [TAPS/2];
  logic signed [W:0]   f_sym  [TAPS/2];

  int checks = 0, failures = 0;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  pre_adder                 dut_anti (.taps(taps), .folded(f_anti));
  pre_adder #(.ANTI(1'b0))  dut_sym  (.taps(taps), .folded(f_sym));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < TAPS; i++) begin
        case ($urandom_range(0, 7))
          0:       taps[i] = 16'sh7fff;
          1:       taps[i] = 16'sh8000;
          default: taps[i] = W'($urandom);
        endcase
      end
      #1;
      for (int i = 0; i < TAPS/2; i++) begin
        int a, b;
        a = int'(taps[i]);
        b = int'(taps[TAPS-1-i]);
        checks += 2;
        if (int'(f_anti[i]) != a - b) begin
          failures++;
          if (failures < 10) $display("anti %0d: %0d - %0d gave %0d", i, a, b, f_anti[i]);
        end
        if (int'(f_sym[i]) != a + b) begin
          failures++;
          if (failures < 10) $display("sym %0d: %0d + %0d gave %0d", i, a, b, f_sym[i]);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
