// End-to-end testbench of the under-sampling frequency meter, at reduced
// FFT length.
//
// Instance dut: the three channels at 184, 192 and 200 MHz with a 64-point
// FFT (bins of about 3 MHz, so every alias is within 1.6 MHz, under the
// 2 MHz the resolver tolerates for these rates). Three ADC models sample
// one tone; the clock stands for 200 MHz, so the slower channels deliver
// samples on 184/200 and 192/200 of the clocks. For a series of tones over
// 0..2 GHz the testbench checks every channel's f_u against the bin nearest
// the true alias, and every estimate against the true tone (within the
// widest bin). Pulsed input (tone gated off part of the time) is
// included.
//
// Instance dut_fast: 16-point FFTs, every channel sampled on every clock.
// Frames then complete faster than the resolver's search, so a complete
// set must wait for the resolver; every set must still be resolved.
//
// Mechanisms counted (each must occur): a frame_sync restart, FFT frame results per channel, a
// channel result replaced before the set was complete, resolver runs,
// candidates rejected as out of band, a complete set waiting for a busy
// resolver.
module tb_usfm_top;
  localparam int NCH = 3;
  localparam int NS  = 64;
  localparam logic [NCH-1:0][31:0] FS = {32'd200_000_000, 32'd192_000_000, 32'd184_000_000};
  localparam int L   = $clog2(NS);
  localparam int DW  = 14 + L + 1;

  logic clk = 0, rst_n = 0, frame_sync = 0, run = 0, gate = 1;
  logic [31:0] tone = 32'd968_000_000;
  logic [NCH-1:0] adc_valid;
  logic [NCH-1:0][13:0] adc_data;
  logic [NCH-1:0] fu_valid;
  logic [NCH-1:0][31:0] fu_hz;
  logic [NCH-1:0][L-1:0] peak_bin;
  logic [NCH-1:0][2*DW-1:0] peak_pow;
  logic f_valid;
  logic [31:0] f_hat_hz, spread_hz;

  int checks = 0, failures = 0;
  int n_frames [NCH];
  int n_sync = 0, n_replaced = 0, n_resolved = 0, n_rejected = 0, n_wait = 0, n_fast = 0;

  always #2.5 clk = ~clk;

  for (genvar i = 0; i < NCH; i++) begin : g_adc
    adc_model #(.FS_HZ(longint'(FS[i])), .CLK_HZ(200_000_000), .W(14)) u_adc (
      .clk, .rst_n, .run, .gate, .tone_hz(tone), .amp(6000), .noise(300),
      .valid(adc_valid[i]), .data(adc_data[i]));
  end

  usfm_top #(.N(NS)) dut (
    .clk, .rst_n, .frame_sync, .adc_valid, .adc_data, .fu_valid, .fu_hz, .peak_bin,
    .peak_pow, .f_valid, .f_hat_hz, .spread_hz);

  // ---- fast instance: every channel sampled each clock ----
  localparam int NF = 16;
  logic [NCH-1:0] fv_valid;
  logic [NCH-1:0][13:0] fv_data;
  logic [NCH-1:0] ff_valid;
  logic [NCH-1:0][31:0] ff_hz;
  logic [NCH-1:0][3:0] ff_bin;
  logic [NCH-1:0][2*(14+4+1)-1:0] ff_pow;
  logic fast_valid;
  logic [31:0] fast_hat, fast_spread;
  for (genvar i = 0; i < NCH; i++) begin : g_fadc
    adc_model #(.FS_HZ(200_000_000), .CLK_HZ(200_000_000), .W(14)) u_adc (
      .clk, .rst_n, .run, .gate(1'b1), .tone_hz(32'd30_000_000), .amp(5000), .noise(0),
      .valid(fv_valid[i]), .data(fv_data[i]));
  end
  usfm_top #(.N(NF)) dut_fast (
    .clk, .rst_n, .frame_sync(1'b0), .adc_valid(fv_valid), .adc_data(fv_data), .fu_valid(ff_valid),
    .fu_hz(ff_hz), .peak_bin(ff_bin), .peak_pow(ff_pow), .f_valid(fast_valid),
    .f_hat_hz(fast_hat), .spread_hz(fast_spread));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint alias_of(longint f, longint fs);
    longint r = f % fs;
    return (r > fs / 2) ? fs - r : r;
  endfunction

  // expected f_u: a bin next to the alias (noise and the leakage of the
  // mirror image can tip the peak to the farther of the two)
  function automatic bit fu_ok(int ch, longint f, longint got);
    longint a, step, d;
    a = alias_of(f, longint'(FS[ch]));
    step = longint'(FS[ch]) / NS;
    d = got - a;
    if (d < 0) d = -d;
    return d <= step;
  endfunction

  // a tone whose alias falls in the DC bin of some channel cannot be seen
  // there (bin 0 is not searched): such tones are not played
  function automatic bit visible(longint f);
    for (int ch = 0; ch < NCH; ch++)
      if (alias_of(f, longint'(FS[ch])) < 2 * (longint'(FS[ch]) / NS)) return 0;
    return 1;
  endfunction

  // every search must start on a new result from every channel: count the
  // results each channel delivered since the set was last frozen (a result
  // arriving right at the freeze stays fresh for the next set too)
  int since [NCH];
  logic [NCH-1:0] last_fv = '0;
  always @(posedge clk) if (rst_n) begin
    if (dut.res_start) begin
      for (int i = 0; i < NCH; i++) begin
        checks++;
        if (since[i] == 0) begin
          failures++;
          $display("search started without a new result from channel %0d", i);
        end
        since[i] = int'(last_fv[i]) + int'(fu_valid[i]);
      end
    end else
      for (int i = 0; i < NCH; i++) since[i] += int'(fu_valid[i]);
    last_fv <= fu_valid;
  end

  // mechanism monitors
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NCH; i++) begin
      if (fu_valid[i]) n_frames[i]++;
      if (fu_valid[i] && dut.fresh[i] && !(&dut.fresh)) n_replaced++;
    end
    if (dut.u_resolve.stage.valid && !dut.u_resolve.stage.in_band) n_rejected++;
    if ((&dut_fast.fresh) && dut_fast.res_busy) n_wait++;
    if (fast_valid) n_fast++;
    if (frame_sync) n_sync++;
  end

  // checks on results of the accurate instance, while a tone is steady
  bit steady = 0;
  longint half_bin = 200_000_000 / NS + 1;  // one bin: see fu_ok
  always @(posedge clk) if (rst_n && steady) begin
    for (int i = 0; i < NCH; i++)
      if (fu_valid[i]) begin
        checks++;
        if (!fu_ok(i, longint'(tone), longint'(fu_hz[i]))) begin
          failures++;
          $display("tone %0d ch %0d: f_u %0d, alias %0d", tone, i, fu_hz[i],
                   alias_of(longint'(tone), longint'(FS[i])));
        end
      end
    if (f_valid) begin
      longint e;
      e = longint'(f_hat_hz) - longint'(tone);
      if (e < 0) e = -e;
      n_resolved++;
      checks++;
      if (e > half_bin) begin
        failures++;
        $display("tone %0d: estimate %0d (spread %0d)", tone, f_hat_hz, spread_hz);
      end
    end
  end

  task automatic play(longint f, int frames_wait);
    steady = 0;
    tone = 32'(f);
    // let two frames of the new tone pass through every channel
    repeat (frames_wait * NS + 64) @(posedge clk);
    steady = 1;
    repeat (3 * NS) @(posedge clk);
    steady = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    run   <= 1;
    play(968_000_000, 3);
    play(601_000_000, 3);
    play(1_500_000_000, 3);
    play(10_000_000, 3);
    for (int k = 0; k < 30; k++) begin
      longint f;
      do f = longint'($urandom_range(1_990_000_000)) + 5_000_000; while (!visible(f));
      play(f, 3);
    end
    // pulsed input: on for 48 samples of every 64, framing restarted first
    frame_sync <= 1;
    @(posedge clk);
    frame_sync <= 0;
    fork
      begin
        repeat (20 * NS) begin
          gate <= 1; repeat (48) @(posedge clk);
          gate <= 0; repeat (16) @(posedge clk);
        end
      end
      play(1_234_000_000, 6);
    join
    gate <= 1;
    checks += 7;
    if (n_sync == 0) begin failures++; $display("frame_sync never applied"); end
    for (int i = 0; i < NCH; i++)
      if (n_frames[i] == 0) begin failures++; $display("channel %0d never finished a frame", i); end
    if (n_replaced == 0) begin failures++; $display("no channel result was ever replaced"); end
    if (n_resolved == 0) begin failures++; $display("no estimate checked"); end
    if (n_rejected == 0) begin failures++; $display("no out-of-band candidate seen"); end
    if (n_wait == 0) begin failures++; $display("resolver never kept a set waiting"); end
    if (n_fast < 10) begin failures++; $display("fast instance resolved only %0d sets", n_fast); end
    $display("syncs %0d frames %0d/%0d/%0d replaced %0d resolved %0d rejected %0d waits %0d fast %0d",
             n_sync, n_frames[0], n_frames[1], n_frames[2], n_replaced, n_resolved, n_rejected,
             n_wait, n_fast);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
