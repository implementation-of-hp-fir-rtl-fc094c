// tb_transposition: self-checking test of transposition at its default size
// (18 words of 16 bits). Random words are loaded; over the following enabled
// cycles the bit plane output must show bit 0, 1, ..., 15 of every word, one
// plane per enabled cycle, with random clock-enable stalls in between that must
// hold the plane. Reset must clear the planes.
module tb_transposition;
  localparam int N = 18;
  localparam int W = 16;

  logic                clk;
  initial clk = 1'b0;
  logic                rst, en, load;
  logic signed [W-1:0] din [N];
  logic [N-1:0]        bits;

  int checks = 0, failures = 0, stalls = 0;

  transposition dut (.clk, .rst, .en, .load, .din, .bits);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_plane(logic signed [W-1:0] words [N], int k);
    logic [N-1:0] want;
    for (int i = 0; i < N; i++) want[i] = words[i][k];
    checks++;
    if (bits !== want) begin
      failures++;
      if (failures < 10) $display("plane %0d: got %h expected %h", k, bits, want);
    end
  endtask

  initial begin
    logic signed [W-1:0] words [N];
    rst = 1'b1; en = 1'b1; load = 1'b0;
    for (int i = 0; i < N; i++) din[i] = W'($urandom);
    @(posedge clk); #1;
    checks++;
    if (bits !== '0) failures++;
    rst = 1'b0;
    for (int frame = 0; frame < 300; frame++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        words[i] = W'($urandom);
        if (frame % 7 == 0) words[i] = (i % 2 != 0) ? 16'sh8000 : 16'sh7fff;
      end
      din = words; load = 1'b1; en = 1'b1;
      @(posedge clk); #1;
      load = 1'b0;
      for (int k = 0; k < W; k++) begin
        expect_plane(words, k);
        // scramble the parallel input, it must not matter while not loading
        for (int i = 0; i < N; i++) din[i] = W'($urandom);
        @(negedge clk);
        en = ($urandom_range(0, 4) != 0);
        while (!en) begin
          stalls++;
          @(posedge clk); #1;
          expect_plane(words, k);
          @(negedge clk);
          en = ($urandom_range(0, 2) != 0);
        end
        if (k < W-1) begin
          @(posedge clk); #1;
        end
      end
    end
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("no stall was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
