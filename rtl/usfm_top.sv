// Under-sampling frequency meter: P real-sampling channels and a resolver.
//
// The analog input (0..F_MAX) is sampled by P ADCs at different rates,
// all below the Nyquist rate of the input. Each channel takes a streaming
// N-point FFT of its samples and picks the strongest bin of each frame,
// which gives the channel's aliased frequency f_ui. Once every channel has
// delivered a fresh f_ui, the set is frozen and handed to the resolver,
// which searches for the one analog frequency consistent with all of them
// and reports it as f_hat_hz, with the spread of the matching alias images
// as a quality figure (small when the answer is trustworthy).
//
// Interface: one clock for the whole meter. Each channel has its own
// sample strobe adc_valid[i] with adc_data[i] (signed ADC_W bits); the
// ADCs and their clock-domain crossing are outside this module, so a
// channel sampled at f_si delivers f_si/f_clk valid samples per clock
// (the clock must be at least max f_si). Per-channel results come out on
// fu_valid/fu_hz/peak_bin/peak_pow; the analog estimate on f_valid,
// f_hat_hz and spread_hz.
//
// Timing: the FFT emits a frame while the next frame's samples arrive (it
// is pushed out by them, as with an ADC that runs continuously), and a
// channel's f_u follows one clock after the frame's last bin. The resolver
// starts one clock after the last channel's result and answers NCAND + 2
// clocks later. If a channel finishes another frame before the others
// have caught up, its newer result replaces the older one. If the resolver
// is still busy when a full set is ready, the set waits.
//
// Frame alignment: a one-clock frame_sync restarts the framing of every
// channel at once and discards results not yet handed to the resolver, so
// that the next frame of each channel begins at the same instant. This
// matters for pulsed input: free-running channels cut their frames at
// different instants (the frame lengths differ with the sampling rate), so
// a short pulse could land in different frames of different channels. Tie
// frame_sync low for free-running operation.
//
// Defaults follow the main configuration: three channels at 184, 192 and
// 200 MHz, 2048-point FFTs, 0..2 GHz band. Single clock, strobes, and the
// collect-and-freeze hand-over and frame_sync are this design's
// choices.
module usfm_top
  import usfm_pkg::*;
#(
  parameter int unsigned NCH   = usfm_pkg::P,
  parameter int unsigned N     = usfm_pkg::N_FFT,
  parameter int unsigned IN_W  = usfm_pkg::ADC_W,
  parameter int unsigned TWW   = usfm_pkg::TW_W,
  parameter int unsigned FW    = usfm_pkg::FREQ_W,
  parameter logic [NCH-1:0][FW-1:0] FS = usfm_pkg::FS_HZ,
  parameter logic [FW-1:0] FMAX = usfm_pkg::F_MAX_HZ,
  localparam int unsigned L    = $clog2(N),
  localparam int unsigned DW   = IN_W + L + 1,
  localparam int unsigned PWW  = 2 * DW
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           frame_sync,
  input  logic [NCH-1:0]                 adc_valid,
  input  logic [NCH-1:0][IN_W-1:0]       adc_data,
  output logic [NCH-1:0]                 fu_valid,
  output logic [NCH-1:0][FW-1:0]         fu_hz,
  output logic [NCH-1:0][L-1:0]          peak_bin,
  output logic [NCH-1:0][PWW-1:0]        peak_pow,
  output logic                           f_valid,
  output logic [FW-1:0]                  f_hat_hz,
  output logic [FW-1:0]                  spread_hz
);

  for (genvar i = 0; i < NCH; i++) begin : g_ch
    logic                 fv, flast;
    logic signed [DW-1:0] fre, fim;
    logic [L-1:0]         fbin;

    fft_r2sdf #(.N(N), .IN_W(IN_W), .TW_W(TWW)) u_fft (
      .clk      (clk),
      .rst_n    (rst_n),
      .sync     (frame_sync),
      .in_valid (adc_valid[i]),
      .in_data  (adc_data[i]),
      .out_valid(fv),
      .out_re   (fre),
      .out_im   (fim),
      .out_bin  (fbin),
      .out_last (flast)
    );

    peak_picker #(.N(N), .DW(DW), .FREQ_W(FW), .FS_HZ(FS[i])) u_peak (
      .clk       (clk),
      .rst_n     (rst_n),
      .sync      (frame_sync),
      .in_valid  (fv),
      .in_re     (fre),
      .in_im     (fim),
      .in_bin    (fbin),
      .in_last   (flast),
      .peak_valid(fu_valid[i]),
      .peak_bin  (peak_bin[i]),
      .peak_pow  (peak_pow[i]),
      .fu_hz     (fu_hz[i])
    );
  end

  // Collect one result per channel, then freeze the set for the resolver.
  logic [NCH-1:0]         fresh;
  logic [NCH-1:0][FW-1:0] fu_set;
  logic                   res_start, res_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fresh     <= '0;
      fu_set    <= '0;
      res_start <= 1'b0;
    end else begin
      res_start <= 1'b0;
      if (frame_sync) begin
        fresh <= '0;
      end else if (&fresh && !res_busy && !res_start) begin
        fu_set    <= fu_hz;
        res_start <= 1'b1;
        fresh     <= fu_valid;
      end else begin
        fresh <= fresh | fu_valid;
      end
    end
  end

  freq_resolver #(.P(NCH), .FREQ_W(FW), .FS_HZ(FS), .F_MAX_HZ(FMAX)) u_resolve (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (res_start),
    .fu_hz    (fu_set),
    .busy     (res_busy),
    .done     (f_valid),
    .f_hat_hz (f_hat_hz),
    .spread_hz(spread_hz)
  );

endmodule
