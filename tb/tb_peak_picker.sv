// Self-checking testbench of the spectral peak picker.
//
// Streams frames of random complex bins, in a shuffled (bit-reversed) bin
// order like the FFT's, and checks the reported bin, power and frequency
// against a search done here. Frames cover: a peak inside the band, a
// larger value at DC and above N/2 that must be ignored, a peak at the
// band edges (bin 1 and bin N/2), negative parts, and ties (first seen
// wins). The result must pulse exactly one clock after the last bin.
// Before some frames, half a frame with a very strong bin is fed and then
// dropped with sync: it must not affect the result.
module tb_peak_picker;
  localparam int N  = 32;
  localparam int L  = $clog2(N);
  localparam int DW = 12;
  localparam int PWW = 2 * DW;
  localparam logic [31:0] FS = 32'd192_000_000;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_last = 0, sync = 0;
  logic signed [DW-1:0] in_re = '0, in_im = '0;
  logic [L-1:0] in_bin = '0;
  logic peak_valid;
  logic [L-1:0] peak_bin;
  logic [PWW-1:0] peak_pow;
  logic [31:0] fu_hz;

  int checks = 0, failures = 0;

  peak_picker #(.N(N), .DW(DW), .FREQ_W(32), .FS_HZ(FS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int re_v [N], im_v [N];

  function automatic int bitrev(int v);
    int r = 0;
    for (int b = 0; b < L; b++) r |= ((v >> b) & 1) << (L - 1 - b);
    return r;
  endfunction

  task automatic frame(int kind, bit pre_sync = 0);
    longint best_p, p;
    int best_k;
    if (pre_sync) begin
      for (int m = 0; m < N / 2; m++) begin
        in_valid <= 1; in_last <= 0; in_bin <= L'(bitrev(m));
        in_re <= DW'(1900); in_im <= DW'(1900);
        @(posedge clk);
      end
      in_valid <= 0; sync <= 1;
      @(posedge clk);
      sync <= 0;
    end
    for (int k = 0; k < N; k++) begin
      re_v[k] = int'($urandom_range(200)) - 100;
      im_v[k] = int'($urandom_range(200)) - 100;
    end
    case (kind)
      1: begin re_v[0] = 2000; re_v[N/2+3] = -2000; re_v[7] = -900; end
      2: begin im_v[1] = -1500; end
      3: begin re_v[N/2] = 1800; im_v[N/2] = 10; end
      4: begin re_v[5] = 1000; im_v[5] = 0; re_v[9] = 0; im_v[9] = -1000; end
      default: ;
    endcase
    // reference, visiting bins in the order the stream delivers them
    best_p = -1; best_k = 0;
    for (int m = 0; m < N; m++) begin
      int k = bitrev(m);
      p = longint'(re_v[k]) * re_v[k] + longint'(im_v[k]) * im_v[k];
      if (k >= 1 && k <= N / 2 && p > best_p) begin best_p = p; best_k = k; end
    end
    for (int m = 0; m < N; m++) begin
      int k = bitrev(m);
      in_valid <= 1; in_bin <= L'(k);
      in_re <= DW'(re_v[k]); in_im <= DW'(im_v[k]);
      in_last <= (m == N - 1);
      @(posedge clk);
      if (m != N - 1) begin
        checks++;
        if (peak_valid && m > 0) begin failures++; $display("spurious peak_valid"); end
      end
      if ($urandom_range(3) == 0 && m != N - 1) begin
        in_valid <= 0; in_last <= 0;
        @(posedge clk);
      end
    end
    // the edge that took the last bin has just passed: the result is out now
    #1;
    in_valid <= 0; in_last <= 0;
    checks += 4;
    if (!peak_valid) begin failures++; $display("no peak_valid one clock after last"); end
    if (int'(peak_bin) != best_k) begin
      failures++; $display("kind %0d: bin %0d expected %0d", kind, peak_bin, best_k);
    end
    if (longint'(peak_pow) != best_p) begin
      failures++; $display("kind %0d: power %0d expected %0d", kind, peak_pow, best_p);
    end
    if (longint'(fu_hz) != (longint'(best_k) * FS + longint'(N / 2)) / longint'(N)) begin
      failures++; $display("kind %0d: fu %0d expected %0d", kind, fu_hz, (longint'(best_k) * FS + longint'(N / 2)) / longint'(N));
    end
    @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 5; i++) frame(i);
    for (int i = 0; i < 20; i++) frame(0, i % 3 == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
