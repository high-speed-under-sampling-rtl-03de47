// Self-checking testbench of the streaming R2SDF FFT.
//
// Feeds three back-to-back frames of random real samples (plus a fourth to
// push the third out), computes each frame's DFT directly in double
// precision and compares every output bin, real and imaginary part, with a
// small tolerance for the fixed-point rounding. It also checks the bin
// numbering (each bin exactly once per frame), the out_last marker, and the
// latency: the first output must leave log2(N) clocks after the last sample
// of the first frame; and the rate: with a sample on every clock, an output
// leaves on every clock. A second run pattern with gaps in in_valid checks
// that the pipeline only advances on valid samples. A third run first
// feeds a stretch of unrelated samples, then pulses sync mid-frame: only
// the frames after the sync may come out, aligned to it.
module tb_fft_r2sdf;
  localparam int N    = 64;
  localparam int IN_W = 14;
  localparam int L    = $clog2(N);
  localparam int DW   = IN_W + L + 1;
  localparam int FRAMES = 4;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic sync = 0;
  logic signed [IN_W-1:0] in_data = '0;
  logic out_valid, out_last;
  logic signed [DW-1:0] out_re, out_im;
  logic [L-1:0] out_bin;

  int checks = 0, failures = 0;

  fft_r2sdf #(.N(N), .IN_W(IN_W), .TW_W(18)) dut (.*);

  always #5 clk = ~clk;

  int x [FRAMES*N];
  real ref_re [FRAMES][N];
  real ref_im [FRAMES][N];
  int  seen   [FRAMES][N];
  int  out_frame = 0, out_count = 0;
  longint cycle = 0, first_out_cycle = -1, last_in_cycle = -1;
  real max_err = 0.0;
  bit gaps = 0;
  bit armed = 0;   // outputs are checked only once the frames start

  always @(posedge clk) cycle <= cycle + 1;

  // Watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor
  always @(posedge clk) begin
    if (rst_n && armed && out_valid && out_frame < FRAMES - 1) begin
      real er, ei;
      if (first_out_cycle < 0) first_out_cycle = cycle;
      // throughput: with input every clock, the outputs follow every clock
      if (!gaps) begin
        checks++;
        if (cycle - first_out_cycle != longint'(out_frame * N + out_count)) begin
          failures++;
          $display("output %0d of frame %0d late: clock %0d after the first",
                   out_count, out_frame, cycle - first_out_cycle);
        end
      end
      er = real'(out_re) - ref_re[out_frame][out_bin];
      if (er < 0.0) er = -er;
      ei = real'(out_im) - ref_im[out_frame][out_bin];
      if (ei < 0.0) ei = -ei;
      if (er > max_err) max_err = er;
      if (ei > max_err) max_err = ei;
      checks++;
      if (er > 4.0 * L || ei > 4.0 * L) begin
        failures++;
        if (failures < 10)
          $display("frame %0d bin %0d: got %0d,%0d expected %f,%f",
                   out_frame, out_bin, out_re, out_im,
                   ref_re[out_frame][out_bin], ref_im[out_frame][out_bin]);
      end
      seen[out_frame][out_bin]++;
      out_count++;
      checks++;
      if (out_last != (out_count == N)) begin
        failures++;
        $display("out_last wrong at output %0d", out_count);
      end
      if (out_count == N) begin
        for (int k = 0; k < N; k++) begin
          checks++;
          if (seen[out_frame][k] != 1) begin
            failures++;
            $display("frame %0d bin %0d seen %0d times", out_frame, k, seen[out_frame][k]);
          end
        end
        out_count = 0;
        out_frame++;
      end
    end
  end

  task automatic run(bit with_gaps, bit with_sync);
    out_frame = 0; out_count = 0; first_out_cycle = -1;
    gaps = with_gaps;
    foreach (seen[f, k]) seen[f][k] = 0;
    for (int i = 0; i < FRAMES * N; i++)
      x[i] = int'($urandom_range(2 ** IN_W - 1)) - 2 ** (IN_W - 1);
    for (int f = 0; f < FRAMES; f++)
      for (int k = 0; k < N; k++) begin
        ref_re[f][k] = 0.0; ref_im[f][k] = 0.0;
        for (int n = 0; n < N; n++) begin
          ref_re[f][k] += real'(x[f*N+n]) * $cos(2.0 * PI * n * k / N);
          ref_im[f][k] -= real'(x[f*N+n]) * $sin(2.0 * PI * n * k / N);
        end
      end
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    if (with_sync) begin
      // unrelated samples, more than the pipeline depth, then sync with a
      // sample that must be dropped
      armed = 0;
      for (int i = 0; i < 2 * N + 13; i++) begin
        in_valid <= 1'b1;
        in_data  <= IN_W'($urandom);
        @(posedge clk);
      end
      sync <= 1'b1;
      in_data <= IN_W'($urandom);
      @(posedge clk);
      sync <= 1'b0;
      #1;  // past the sync edge: its stale output is not checked
    end
    armed = 1;
    for (int i = 0; i < FRAMES * N; i++) begin
      if (with_gaps) begin
        in_valid <= 1'b0;
        repeat ($urandom_range(2)) @(posedge clk);
      end
      in_valid <= 1'b1;
      in_data  <= IN_W'(x[i]);
      @(posedge clk);
      if (i == N - 1) last_in_cycle = cycle;  // edge that captured it
    end
    in_valid <= 1'b0;
    repeat (L + 5) @(posedge clk);
    checks++;
    if (out_frame != FRAMES - 1) begin
      failures++;
      $display("only %0d frames came out", out_frame);
    end
  endtask

  initial begin
    run(0, 0);
    // Latency: the first output follows the first frame's last sample by L clocks
    checks++;
    if (first_out_cycle - last_in_cycle != L) begin
      failures++;
      $display("latency %0d clocks, expected %0d", first_out_cycle - last_in_cycle, L);
    end
    run(1, 0);
    run(0, 1);
    $display("largest bin error %f LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
