// Pulsed-signal run of the under-sampling frequency meter at its defaults.
//
// Radar-like input: one tone pulse every 100 us, with pulse widths from
// 0.5 us to 15 us, each pulse at its own carrier frequency between
// 0.1 and 1.9 GHz, in uniform noise of +/-1000 LSB (amplitude 3000 LSB).
// frame_sync is pulsed as each pulse begins, so the first frame of every
// channel starts with the pulse; the later frames of the period hold only
// noise and give arbitrary estimates. The testbench requires that the
// first estimate of every 100 us period, the one made from the frames that
// hold the pulse, lies within one bin (98 kHz) of the pulse's carrier, and
// prints how many estimates each period produced.
module tb_usfm_pulses;
  localparam int NCH = 3;
  localparam logic [NCH-1:0][31:0] FS = {32'd200_000_000, 32'd192_000_000, 32'd184_000_000};
  localparam int PRI = 20_000;                 // 100 us at 200 MHz
  localparam int NW  = 6;
  localparam int WIDTH [NW] = '{100, 200, 400, 1000, 2000, 3000};   // 0.5 .. 15 us

  logic clk = 0, rst_n = 0, frame_sync = 0, run = 0, gate = 0;
  logic [31:0] tone = 32'd968_000_000;
  logic [NCH-1:0] adc_valid;
  logic [NCH-1:0][13:0] adc_data;
  logic [NCH-1:0] fu_valid;
  logic [NCH-1:0][31:0] fu_hz;
  logic [NCH-1:0][10:0] peak_bin;
  logic [NCH-1:0][51:0] peak_pow;
  logic f_valid;
  logic [31:0] f_hat_hz, spread_hz;

  int checks = 0, failures = 0;

  always #2.5 clk = ~clk;

  for (genvar i = 0; i < NCH; i++) begin : g_adc
    adc_model #(.FS_HZ(longint'(FS[i])), .CLK_HZ(200_000_000), .W(14)) u_adc (
      .clk, .rst_n, .run, .gate, .tone_hz(tone), .amp(3000), .noise(1000),
      .valid(adc_valid[i]), .data(adc_data[i]));
  end

  usfm_top dut (
    .clk, .rst_n, .frame_sync, .adc_valid, .adc_data, .fu_valid, .fu_hz, .peak_bin,
    .peak_pow, .f_valid, .f_hat_hz, .spread_hz);

  initial begin
    repeat ((NW + 2) * PRI) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint alias_of(longint f, longint fs);
    longint r = f % fs;
    return (r > fs / 2) ? fs - r : r;
  endfunction

  function automatic bit visible(longint f);
    for (int ch = 0; ch < NCH; ch++)
      if (alias_of(f, longint'(FS[ch])) < 400_000) return 0;
    return 1;
  endfunction

  int n_est = 0;
  longint best_err = 0, first_err = 0;
  always @(posedge clk) if (rst_n && f_valid) begin
    longint e;
    e = longint'(f_hat_hz) - longint'(tone);
    if (e < 0) e = -e;
    if (n_est == 0) first_err = e;
    n_est++;
    if (e < best_err) best_err = e;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    run   <= 1;
    repeat (PRI / 2) @(posedge clk);        // noise only
    for (int w = 0; w < NW; w++) begin
      longint f;
      do f = 100_000_000 + longint'($urandom_range(1_800_000_000)); while (!visible(f));
      tone     <= 32'(f);
      n_est    = 0;
      best_err = 64'h7fff_ffff_ffff;
      // the pulse and the frames of all channels start together
      gate <= 1;
      frame_sync <= 1;
      @(posedge clk);
      frame_sync <= 0;
      repeat (WIDTH[w] - 1) @(posedge clk);
      gate <= 0;
      repeat (PRI - WIDTH[w]) @(posedge clk);
      checks++;
      $display("pulse %0d ns at %0d Hz: %0d estimates, first off by %0d Hz, best by %0d Hz",
               WIDTH[w] * 5, f, n_est, first_err, best_err);
      if (n_est == 0 || first_err > 200_000_000 / 2048) begin
        failures++;
        $display("  first estimate not within one bin");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
