// One stage of a radix-2 single-path delay-feedback (R2SDF) FFT,
// decimation in frequency.
//
// The stage pairs samples that are D apart (D = half the butterfly span).
// During the first D samples of every 2D-sample block the input is pushed
// into a D-deep delay line while the differences left there by the previous
// block come out, multiplied by the twiddle W_{2D}^t = exp(-j*2*pi*t/(2D)).
// During the second D samples the butterfly adds the delayed sample to the
// incoming one and sends the sum on, storing the difference in the delay
// line. The stage therefore delays the stream by D valid samples plus one
// register.
//
// Interface: in_valid/in_re/in_im, out_valid/out_re/out_im, all DW bits
// signed. sync (one clock) restarts the block count: the input of that
// clock and everything in flight are dropped, and the next valid input
// starts a new block, as after reset. The stage advances only on in_valid, so the input stream may have
// gaps. Outputs are registered: a valid input produces out_valid on the
// next clock, except for the first D inputs after reset, whose outputs
// would be the still-empty delay line. No scaling is applied: DW must hold
// the full FFT growth (the caller sizes it).
//
// The twiddle table is built when the design is loaded, from an integer
// evaluation of cos/sin, rounded to TW_W-bit signed with TW_W-2 fraction
// bits. Pipeline structure and data widths are choices of this design;
// the meter's method fixes only N and the 18-bit twiddle width.
module fft_r2sdf_stage #(
  parameter int unsigned D    = 1,    // delay line depth = half butterfly span
  parameter int unsigned DW   = 26,   // data width, signed
  parameter int unsigned TW_W = 18    // twiddle width, signed
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 sync,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  output logic                 out_valid,
  output logic signed [DW-1:0] out_re,
  output logic signed [DW-1:0] out_im
);

  localparam int unsigned AW   = (D > 1) ? $clog2(D) : 1;
  localparam int unsigned FRAC = TW_W - 2;

  // t counts valid inputs modulo 2D: phase = t[AW] (for D>1), index = t[AW-1:0]
  logic [AW:0] t;
  logic        phase;        // 0: fill/output differences, 1: butterfly
  logic [AW-1:0] idx;
  logic        primed;       // first block's fill phase is over

  if (D > 1) begin : g_cnt
    assign phase = t[AW];
    assign idx   = t[AW-1:0];
  end else begin : g_cnt1
    assign phase = t[0];
    assign idx   = '0;
  end

  // Delay line, addressed by the in-block index.
  logic signed [DW-1:0] dl_re [D];
  logic signed [DW-1:0] dl_im [D];
  logic signed [DW-1:0] dl_out_re, dl_out_im;
  assign dl_out_re = dl_re[idx];
  assign dl_out_im = dl_im[idx];

  // Twiddle ROM, W_{2D}^t = cos(pi*t/D) - j*sin(pi*t/D), filled when the
  // design is loaded. The values are computed in integer arithmetic (Q30,
  // Taylor series on an angle folded into 0..pi/4), then rounded to
  // TW_W-bit signed with FRAC fraction bits.
  localparam longint PI_Q30 = 64'd3373259426;          // round(pi * 2^30)

  // sin (want_sin) or cos of y, y in Q30 within 0..pi/4
  function automatic longint taylor_q30(longint y, bit want_sin);
    longint term, sum, y2;
    y2   = (y * y) >>> 30;
    term = want_sin ? y : (64'd1 << 30);
    sum  = term;
    for (longint k = want_sin ? 64'd2 : 64'd1; k < 16; k += 2) begin
      term = -((term * y2) >>> 30) / (k * (k + 1));
      sum  = sum + term;
    end
    return sum;
  endfunction

  // cos (want_sin = 0) or sin (want_sin = 1) of pi*i/D, 0 <= i < D,
  // rounded to TW_W bits with FRAC fraction bits
  function automatic logic signed [TW_W-1:0] twiddle(int i, bit want_sin);
    int     a;
    bit     neg, swap;
    longint val;
    a    = i;
    neg  = 1'b0;
    swap = 1'b0;
    if (2 * a > int'(D)) begin           // pi - x
      a   = int'(D) - a;
      neg = !want_sin;
    end
    if (4 * a > int'(D)) begin           // pi/2 - x
      a    = int'(D) / 2 - a;
      swap = 1'b1;
    end
    val = taylor_q30((PI_Q30 * longint'(a)) / longint'(D), want_sin ^ swap);
    val = (val + (64'd1 <<< (29 - FRAC))) >>> (30 - FRAC);
    return TW_W'(neg ? -val : val);
  endfunction

  logic signed [TW_W-1:0] tw_cos [D];
  logic signed [TW_W-1:0] tw_sin [D];
  initial begin
    for (int i = 0; i < int'(D); i++) begin
      tw_cos[i] = twiddle(i, 1'b0);
      tw_sin[i] = twiddle(i, 1'b1);
    end
  end

  // Butterfly
  logic signed [DW-1:0] sum_re, sum_im, dif_re, dif_im;
  assign sum_re = dl_out_re + in_re;
  assign sum_im = dl_out_im + in_im;
  assign dif_re = dl_out_re - in_re;
  assign dif_im = dl_out_im - in_im;

  // Twiddle multiply of the stored difference:
  // (a + jb)(c - js) = (ac + bs) + j(bc - as)
  localparam int unsigned PW = DW + TW_W + 1;
  logic signed [TW_W-1:0] c, s;
  logic signed [PW-1:0]   pr, pi;
  logic signed [DW-1:0]   rot_re, rot_im;
  assign c  = tw_cos[idx];
  assign s  = tw_sin[idx];
  assign pr = PW'(dl_out_re) * PW'(c) + PW'(dl_out_im) * PW'(s)
            + (PW'(1) <<< (FRAC - 1));
  assign pi = PW'(dl_out_im) * PW'(c) - PW'(dl_out_re) * PW'(s)
            + (PW'(1) <<< (FRAC - 1));
  assign rot_re = DW'(pr >>> FRAC);
  assign rot_im = DW'(pi >>> FRAC);

  always_ff @(posedge clk) begin
    if (in_valid) begin
      if (phase) begin
        dl_re[idx] <= dif_re;
        dl_im[idx] <= dif_im;
      end else begin
        dl_re[idx] <= in_re;
        dl_im[idx] <= in_im;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t         <= '0;
      primed    <= 1'b0;
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else if (sync) begin
      t         <= '0;
      primed    <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && (primed || phase);
      if (in_valid) begin
        t <= t + 1'b1;
        if (phase) primed <= 1'b1;
        if (phase) begin
          out_re <= sum_re;
          out_im <= sum_im;
        end else begin
          out_re <= rot_re;
          out_im <= rot_im;
        end
      end
    end
  end

endmodule
