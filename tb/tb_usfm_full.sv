// Full-size run of the under-sampling frequency meter: every parameter at
// its default (three channels at 184, 192 and 200 MHz, 2048-point FFTs,
// 0..2 GHz band).
//
// The clock stands for 200 MHz; three ADC models sample one real tone and
// deliver their samples as strobes. For each tone the testbench waits for
// two frames to pass, then checks every channel's f_u against the alias of
// the tone (within one bin, 90 to 98 kHz) and every estimate against the
// tone itself (within one bin of the fastest channel). The first tone is
// 968 MHz, which must not be taken for 600 MHz, the frequency it is
// easiest to confuse with at these rates. A pulsed tone (5 us on out of
// every 10 us) is included.
module tb_usfm_full;
  localparam int NCH = 3;
  localparam int NS  = 2048;
  localparam logic [NCH-1:0][31:0] FS = {32'd200_000_000, 32'd192_000_000, 32'd184_000_000};

  logic clk = 0, rst_n = 0, frame_sync = 0, run = 0, gate = 1;
  logic [31:0] tone = 32'd968_000_000;
  logic [NCH-1:0] adc_valid;
  logic [NCH-1:0][13:0] adc_data;
  logic [NCH-1:0] fu_valid;
  logic [NCH-1:0][31:0] fu_hz;
  logic [NCH-1:0][10:0] peak_bin;
  logic [NCH-1:0][51:0] peak_pow;
  logic f_valid;
  logic [31:0] f_hat_hz, spread_hz;

  int checks = 0, failures = 0, n_est = 0;

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint alias_of(longint f, longint fs);
    longint r = f % fs;
    return (r > fs / 2) ? fs - r : r;
  endfunction

  bit steady = 0;
  always @(posedge clk) if (rst_n && steady) begin
    for (int i = 0; i < NCH; i++)
      if (fu_valid[i]) begin
        longint d;
        d = longint'(fu_hz[i]) - alias_of(longint'(tone), longint'(FS[i]));
        if (d < 0) d = -d;
        checks++;
        if (d > longint'(FS[i]) / NS) begin
          failures++;
          $display("tone %0d ch %0d: f_u %0d", tone, i, fu_hz[i]);
        end
      end
    if (f_valid) begin
      longint e;
      e = longint'(f_hat_hz) - longint'(tone);
      if (e < 0) e = -e;
      checks++;
      n_est++;
      $display("tone %0d Hz: estimate %0d Hz, spread %0d Hz", tone, f_hat_hz, spread_hz);
      if (e > 200_000_000 / NS) begin
        failures++;
        $display("  estimate off by %0d Hz", e);
      end
    end
  end

  task automatic play(longint f);
    steady = 0;
    tone = 32'(f);
    repeat (2 * NS * 200 / 184 + 100) @(posedge clk);
    steady = 1;
    repeat (NS * 200 / 184 + 100) @(posedge clk);
    steady = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    run   <= 1;
    play(968_000_000);
    play(1_733_250_000);
    play(421_900_000);
    fork
      repeat (30) begin
        gate <= 1; repeat (1000) @(posedge clk);
        gate <= 0; repeat (1000) @(posedge clk);
      end
      play(1_250_500_000);
    join_any
    checks++;
    if (n_est < 4) begin failures++; $display("only %0d estimates", n_est); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
