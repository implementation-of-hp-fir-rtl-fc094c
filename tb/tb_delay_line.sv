// tb_delay_line: self-checking test of delay_line at its default size
// (18 taps of 16 bits). Random samples are pushed with a random shift enable;
// a reference history array kept by the testbench is compared with every tap
// after every clock. Reset is checked to clear all taps.
module tb_delay_line;
  localparam int TAPS = 18;
  localparam int W    = 16;

  logic                clk;
  initial clk = 1'b0;
  logic                rst;
  logic                shift_en;
  logic signed [W-1:0] din;
  logic signed [W-1:0] taps [TAPS];

  int checks = 0, failures = 0;
  logic signed [W-1:0] model [TAPS];

  delay_line dut (.clk, .rst, .shift_en, .din, .taps);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    for (int i = 0; i < TAPS; i++) begin
      checks++;
      if (taps[i] !== model[i]) begin
        failures++;
        if (failures < 10) $display("%s: tap %0d = %0d, expected %0d", what, i, taps[i], model[i]);
      end
    end
  endtask

  initial begin
    rst = 1'b1; shift_en = 1'b1; din = 16'sh1234;
    for (int i = 0; i < TAPS; i++) model[i] = '0;
    @(posedge clk); @(posedge clk); #1;
    compare("reset");
    rst = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      shift_en = ($urandom_range(0, 3) != 0);
      din      = W'($urandom);
      if (n % 97 == 5)  din = 16'sh7fff;
      if (n % 101 == 7) din = 16'sh8000;
      @(posedge clk);
      if (shift_en) begin
        for (int i = TAPS-1; i > 0; i--) model[i] = model[i-1];
        model[0] = din;
      end
      #1 compare("run");
    end
    @(negedge clk); rst = 1'b1; @(posedge clk); #1; rst = 1'b0;
    for (int i = 0; i < TAPS; i++) model[i] = '0;
    compare("second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
