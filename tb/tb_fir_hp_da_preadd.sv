// tb_fir_hp_da_preadd: end-to-end self-checking test of the DA high-pass
// filter with the pre-adder enabled (PREADD = 1): the antisymmetric taps are
// folded into 9 words of 17 bits, served by three 8-word LUTs, so each sample
// takes 17 clocks. The outputs must be the same as without the pre-adder.
//
// The stimulus is a sequence of sample runs:
//   - a unit impulse, whose response must be the 18 coefficients h(0)..h(17);
//   - a constant -1 input, whose steady-state output is 0 because the
//     antisymmetric coefficients sum to zero;
//   - a sine of amplitude 5 at 1.6 MHz sampled at 8 MHz (a fifth of the sample
//     rate) and the same sine at amplitude 20000;
//   - random samples, with full-scale +32767 and -32768 mixed in.
// clk_enable is dropped at random throughout, which must only stretch time.
// Every output is compared with a direct convolution computed here from the
// coefficient list (written out independently of the design), the filter
// must take a new sample exactly every W_d enabled cycles, and the latency
// from the enabled cycle that samples an input to the cycle in which
// out_valid shows its output must be W_d + 2 = 19 enabled cycles. The
// The last impulse-response value h(17) must leave 17 sample periods plus
// that latency after the impulse was sampled. The testbench also counts, and
// requires at least once: a stalled cycle, a
// stall inside a running frame, a negative input (exercising the sign-bit
// subtraction), both full-scale values, and the impulse response.
module tb_fir_hp_da_preadd;
  import fir_hp_pkg::*;

  localparam int WD      = 17;   // clocks per sample in this configuration
  localparam int LATENCY = WD + 2;
  localparam logic signed [15:0] HREF [18] = '{
    16'sh03cd, 16'sh045e, 16'shfece, 16'shf8d2, 16'shfafd, 16'sh067d,
    16'sh101f, 16'sh055d, 16'shbb54, 16'sh44ac, 16'shfaa3, 16'shefe1,
    16'shf983, 16'sh0503, 16'sh072e, 16'sh0132, 16'shfba2, 16'shfc33
  };

  logic    clk;
  initial clk = 1'b0;
  logic    clk_enable, reset;
  sample_t filter_in;
  result_t filter_out;
  logic    in_strobe, out_valid;

  fir_hp_da #(.PREADD(1'b1)) dut (.clk, .clk_enable, .reset, .filter_in, .filter_out, .in_strobe, .out_valid);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int stalls = 0, negatives = 0, pos_full = 0, neg_full = 0, impulse_ok = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sample_t stim [$];
  longint  exp_y [$];
  int      exp_t [$];
  int      exp_tag [$];    // 1: belongs to the impulse run, with its index in bits 8+
  longint  hist [18];

  task automatic add_run(int kind, int count);
    real pi = 3.14159265358979;
    for (int n = 0; n < count; n++) begin
      case (kind)
        0: stim.push_back((n == 0) ? 16'sd1 : 16'sd0);
        1: stim.push_back(-16'sd1);
        2: stim.push_back(16'($rtoi(5.0 * $sin(2.0 * pi * 0.2 * n) + ((5.0 * $sin(2.0 * pi * 0.2 * n)) >= 0 ? 0.5 : -0.5))));
        3: stim.push_back(16'($rtoi(20000.0 * $sin(2.0 * pi * 0.2 * n))));
        default:
          case ($urandom_range(0, 9))
            0:       stim.push_back(16'sh7fff);
            1:       stim.push_back(16'sh8000);
            default: stim.push_back(16'($urandom));
          endcase
      endcase
    end
  endtask

  initial begin
    int idx, ecnt, sample_no, in_frame_phase, last_strobe, t_impulse;
    longint y;
    for (int i = 0; i < 18; i++) hist[i] = 0;
    add_run(0, 24);   // impulse, then zeros to flush
    add_run(1, 40);   // constant -1
    add_run(2, 50);   // sine, amplitude 5
    add_run(3, 50);   // sine, amplitude 20000
    add_run(4, 400);  // random
    idx = 0; ecnt = 0; sample_no = 0; in_frame_phase = 0; last_strobe = -1; t_impulse = 0;

    reset = 1'b1; clk_enable = 1'b1; filter_in = '0;
    repeat (3) @(negedge clk);
    reset = 1'b0;

    while (idx < stim.size() || exp_y.size() != 0) begin
      @(negedge clk);
      // 1. a result shown in this cycle
      if (out_valid) begin
        checks += 2;
        if (exp_y.size() == 0) begin
          failures++;
          $display("unexpected output %0d", filter_out);
        end else begin
          longint want;
          int     t0, tag;
          want = exp_y.pop_front();
          t0   = exp_t.pop_front();
          tag  = exp_tag.pop_front();
          if (longint'(filter_out) != want) begin
            failures++;
            if (failures < 10) $display("output %0d: got %0d expected %0d", sample_no, filter_out, want);
          end else if (tag[0]) begin
            if (longint'(filter_out) == longint'(HREF[tag >> 8])) impulse_ok++;
            // the last coefficient leaves 17 sample periods after the first
            if ((tag >> 8) == 17) begin
              checks++;
              if (ecnt - t_impulse != 17 * WD + LATENCY) begin
                failures++;
                $display("h(17) after %0d enabled cycles, expected %0d", ecnt - t_impulse, 17 * WD + LATENCY);
              end
            end
          end
          if (ecnt - t0 != LATENCY) begin
            failures++;
            if (failures < 10) $display("output %0d: latency %0d enabled cycles, expected %0d", sample_no, ecnt - t0, LATENCY);
          end
          sample_no++;
        end
      end
      // 2. drive the next cycle
      clk_enable = ($urandom_range(0, 7) != 0);
      if (!clk_enable) begin
        stalls++;
        if (exp_y.size() != 0) in_frame_phase++;
      end
      filter_in = (idx < stim.size()) ? stim[idx] : '0;
      #1;
      // 3. the filter samples filter_in at the coming edge
      if (in_strobe && idx < stim.size()) begin
        for (int i = 17; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = longint'(filter_in);
        // one sample every WD enabled cycles
        if (last_strobe >= 0) begin
          checks++;
          if (ecnt - last_strobe != WD) begin
            failures++;
            if (failures < 10) $display("sample %0d: %0d enabled cycles after the previous one, expected %0d", idx, ecnt - last_strobe, WD);
          end
        end
        last_strobe = ecnt;
        if (filter_in < 0) negatives++;
        if (filter_in == 16'sh7fff) pos_full++;
        if (filter_in == 16'sh8000) neg_full++;
        y = 0;
        for (int i = 0; i < 18; i++) y += longint'(HREF[i]) * hist[i];
        exp_y.push_back(y);
        exp_t.push_back(ecnt);
        if (idx == 0) t_impulse = ecnt;
        exp_tag.push_back((idx < 18) ? (1 | (idx << 8)) : 0);
        idx++;
      end
      if (clk_enable) ecnt++;
    end

    // mechanisms that must have happened
    checks += 6;
    if (stalls == 0)         begin failures++; $display("no clock-enable stall"); end
    if (in_frame_phase == 0) begin failures++; $display("no stall inside a frame"); end
    if (negatives == 0)      begin failures++; $display("no negative input"); end
    if (pos_full == 0)       begin failures++; $display("no +full-scale input"); end
    if (neg_full == 0)       begin failures++; $display("no -full-scale input"); end
    if (impulse_ok != 18)    begin failures++; $display("impulse response matched %0d of 18 coefficients", impulse_ok); end
    $display("samples %0d outputs %0d stalls %0d (in frame %0d) negative %0d full-scale +%0d -%0d impulse %0d/18",
             idx, sample_no, stalls, in_frame_phase, negatives, pos_full, neg_full, impulse_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
