// Analog frequency resolver: recovers F from its P aliased frequencies.
//
// A real tone F sampled at f_si shows up at f_ui = |F - k*f_si| for some
// integer k, folded into 0..f_si/2. Given the measured f_u of every
// channel, the resolver tries every analog frequency that channel 0 allows
// in the band, F1 = k*f_s1 +/- f_u1 with 0 <= F1 < F_MAX. For each such
// candidate, every other channel i offers the two alias images
// F_i = k_i*f_si + f_ui and (k_i+1)*f_si - f_ui that bracket F1 (k_i*f_si
// is the largest multiple of f_si not above F1). Of the 2^(P-1) ways to
// pick one image per channel, the one with the smallest spread
// max(F_i) - min(F_i) is kept (F_1 = F1 included); the spread is the
// largest pairwise distance between the images, the quantity the search
// minimises. The candidate with the smallest spread wins (the first one
// on a tie) and the estimate is the mean of its P images, F = sum(F_i)/P.
//
// Timing: start (one clock, with fu_hz stable until done) launches the
// search. One candidate is tried per clock in the order k = 0, 1, ...,
// with +f_u1 before -f_u1 for each k; there are 2*(K1_MAX+1) candidates,
// K1_MAX = ceil(F_MAX/f_s1). done pulses NCAND + 2 clocks after start,
// with f_hat_hz (rounded down) and spread_hz, which stay until the next
// search. start is ignored while busy.
//
// The candidate sweep, the smallest-spread choice and the final mean follow the
// method described for the meter; scanning one candidate per clock,
// limiting each channel's choice of k_i, v_i to the two images that
// bracket F1, and the reciprocal multiply for the division by P are this
// design's choices.
module freq_resolver #(
  parameter int unsigned P      = 3,
  parameter int unsigned FREQ_W = 32,
  parameter logic [P-1:0][FREQ_W-1:0] FS_HZ = {32'd200_000_000, 32'd192_000_000, 32'd184_000_000},
  parameter logic [FREQ_W-1:0] F_MAX_HZ = 32'd2_000_000_000,
  localparam int unsigned K1_MAX = int'((64'(F_MAX_HZ) + 64'(FS_HZ[0]) - 1) / 64'(FS_HZ[0])),
  localparam int unsigned NCAND  = 2 * (K1_MAX + 1)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [P-1:0][FREQ_W-1:0]     fu_hz,
  output logic                         busy,
  output logic                         done,
  output logic [FREQ_W-1:0]            f_hat_hz,
  output logic [FREQ_W-1:0]            spread_hz
);

  // Signed working width: holds F_MAX + f_s and sums of P images.
  localparam int unsigned WW = FREQ_W + $clog2(P) + 2;
  typedef logic signed [WW-1:0] wfreq_t;

  localparam int unsigned CW = $clog2(NCAND + 1);

  typedef struct packed {
    logic   valid;     // a candidate is in this stage
    logic   in_band;   // 0 <= F1 < F_MAX
    logic   last;      // last candidate of the sweep
    wfreq_t spread;
    wfreq_t sum;
  } cand_t;

  logic [CW-1:0] idx;          // candidate number
  logic          sweeping;
  wfreq_t        base1;        // k * f_s1 for the current k

  // ---------------- candidate and its images (combinational) -------------
  wfreq_t f1;
  wfreq_t img_lo [P];
  wfreq_t img_hi [P];
  wfreq_t best_c_spread, best_c_sum;
  cand_t  cand;

  always_comb begin
    f1 = idx[0] ? base1 - wfreq_t'(fu_hz[0]) : base1 + wfreq_t'(fu_hz[0]);
    img_lo[0] = f1;
    img_hi[0] = f1;
    for (int i = 1; i < int'(P); i++) begin
      wfreq_t fs, fu, base;
      fs   = wfreq_t'(FS_HZ[i]);
      fu   = wfreq_t'(fu_hz[i]);
      base = '0;
      // largest multiple of f_si not above F1
      for (int j = 1; j <= int'(64'(F_MAX_HZ) / 64'(FS_HZ[i])) + 1; j++)
        if (wfreq_t'(j) * fs <= f1) base = wfreq_t'(j) * fs;
      img_lo[i] = base + fu;            // k_i*f_si + f_ui
      img_hi[i] = base + fs - fu;       // (k_i+1)*f_si - f_ui
    end
    // every choice of one of the two images per channel; keep the one
    // with the smallest spread (the lowest choice number on a tie)
    best_c_spread = '0;
    best_c_sum    = '0;
    for (int c = 0; c < (1 << (P - 1)); c++) begin
      wfreq_t mn, mx, sm, im;
      mn = f1;
      mx = f1;
      sm = f1;
      for (int i = 1; i < int'(P); i++) begin
        im = c[i-1] ? img_hi[i] : img_lo[i];
        if (im < mn) mn = im;
        if (im > mx) mx = im;
        sm = sm + im;
      end
      if (c == 0 || (mx - mn) < best_c_spread) begin
        best_c_spread = mx - mn;
        best_c_sum    = sm;
      end
    end
    cand.valid   = sweeping;
    cand.in_band = (f1 >= 0) && (f1 < wfreq_t'(F_MAX_HZ));
    cand.last    = (idx == CW'(NCAND - 1));
    cand.spread  = best_c_spread;
    cand.sum     = best_c_sum;
  end

  // ---------------- sweep, compare, divide -------------------------------
  cand_t  stage;
  logic   have_best;
  wfreq_t best_spread, best_sum;
  logic   div_go;

  localparam int unsigned SH = 2 * WW;
  localparam logic [SH:0] RECIP = ((SH+1)'(1) << SH) / (SH+1)'(P) + 1'b1;
  logic [WW+SH:0] prod;
  assign prod = (WW+SH+1)'(best_sum) * (WW+SH+1)'(RECIP);

  assign busy = sweeping || stage.valid || div_go;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx         <= '0;
      sweeping    <= 1'b0;
      base1       <= '0;
      stage       <= '0;
      have_best   <= 1'b0;
      best_spread <= '0;
      best_sum    <= '0;
      div_go      <= 1'b0;
      done        <= 1'b0;
      f_hat_hz    <= '0;
      spread_hz   <= '0;
    end else begin
      done   <= 1'b0;
      div_go <= 1'b0;
      // sweep
      if (start && !busy) begin
        sweeping  <= 1'b1;
        idx       <= '0;
        base1     <= '0;
        have_best <= 1'b0;
      end else if (sweeping) begin
        idx <= idx + 1'b1;
        if (idx[0]) base1 <= base1 + wfreq_t'(FS_HZ[0]);
        if (cand.last) sweeping <= 1'b0;
      end
      stage <= cand;
      // keep the candidate of smallest spread
      if (stage.valid && stage.in_band && (!have_best || stage.spread < best_spread)) begin
        have_best   <= 1'b1;
        best_spread <= stage.spread;
        best_sum    <= stage.sum;
      end
      if (stage.valid && stage.last) div_go <= 1'b1;
      // mean of the P images
      if (div_go) begin
        done      <= 1'b1;
        f_hat_hz  <= FREQ_W'(prod >> SH);
        spread_hz <= FREQ_W'(best_spread);
      end
    end
  end

endmodule
