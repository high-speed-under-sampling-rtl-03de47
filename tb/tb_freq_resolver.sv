// Self-checking testbench of the analog frequency resolver.
//
// Builds the aliased frequencies f_ui of a known analog frequency F for
// the three sampling rates 184, 192 and 200 MHz (F mod f_si, folded into
// 0..f_si/2), adds bounded measurement noise, and checks that the resolver
// returns F. Without noise the answer must be exact with zero spread;
// with noise of at most E Hz per channel it must lie within E of F, with
// a spread of at most 2E (E up to 1.9 MHz). Cases: the 968 MHz tone that the method must not
// confuse with 600 MHz, the band edges, and random tones over 0..2 GHz.
// Every search must finish exactly NCAND + 2 clocks after start.
module tb_freq_resolver;
  localparam int P = 3;
  localparam logic [P-1:0][31:0] FS = {32'd200_000_000, 32'd192_000_000, 32'd184_000_000};
  localparam longint FMAX = 2_000_000_000;
  localparam int NCAND = int'(2 * ((FMAX + 184_000_000 - 1) / 184_000_000 + 1));

  logic clk = 0, rst_n = 0, start = 0;
  logic [P-1:0][31:0] fu_hz = '0;
  logic busy, done;
  logic [31:0] f_hat_hz, spread_hz;

  int checks = 0, failures = 0;

  freq_resolver #(.P(P), .FREQ_W(32), .FS_HZ(FS), .F_MAX_HZ(32'(FMAX))) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint alias_of(longint f, longint fs);
    longint r = f % fs;
    return (r > fs / 2) ? fs - r : r;
  endfunction

  task automatic resolve(longint f, longint noise, bit poke = 0);
    int lat = 0;
    longint err;
    for (int i = 0; i < P; i++) begin
      longint fu = alias_of(f, longint'(FS[i]));
      if (noise > 0) fu += longint'($urandom_range(32'(2 * noise))) - noise;
      if (fu < 0) fu = 0;
      if (fu > longint'(FS[i]) / 2) fu = longint'(FS[i]) / 2;
      fu_hz[i] = 32'(fu);
    end
    start <= 1;
    @(posedge clk);
    start <= 0;
    // done is seen one edge after the edge that raised it
    do begin
      @(posedge clk); lat++;
      if (poke && lat == 5) start <= 1;
      else start <= 0;
    end while (!done && lat < 1000);
    lat--;
    err = longint'(f_hat_hz) - f;
    if (err < 0) err = -err;
    checks += 3;
    if (lat != NCAND + 2) begin
      failures++; $display("F=%0d: latency %0d expected %0d", f, lat, NCAND + 2);
    end
    if (noise == 0 ? (err != 0) : (err > noise)) begin
      failures++; $display("F=%0d noise %0d: got %0d", f, noise, f_hat_hz);
    end
    if (longint'(spread_hz) > 2 * noise) begin
      failures++; $display("F=%0d: spread %0d", f, spread_hz);
    end
    @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    resolve(968_000_000, 0);
    resolve(600_000_000, 0);
    resolve(968_000_000, 48_828);
    resolve(1_000_000, 0);
    resolve(1_999_000_000, 0);
    resolve(1_104_000_000, 0);   // 6 * 184 MHz: aliases to 0 in channel 0
    // a start pulse while busy is ignored: the search must not restart
    resolve(1_500_000_000, 0, 1);
    for (int n = 0; n < 200; n++)
      resolve(longint'($urandom_range(1_999_999_999)), 0);
    for (int n = 0; n < 200; n++)
      resolve(longint'($urandom_range(1_999_999_999)), 1_000_000);
    // close to the limit: errors up to 1.9 MHz, under a quarter of the
    // 8 MHz minimum distance between the alias patterns of these rates
    for (int n = 0; n < 300; n++)
      resolve(longint'($urandom_range(1_999_999_999)), 1_900_000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
