// Spectral peak picker: strongest FFT bin of a frame, as a frequency.
//
// Follows one FFT channel. For every output bin it forms the power
// re^2 + im^2 and keeps the largest one among bins 1..N/2, the bins that
// are distinct for a real input (bin 0, the DC term, is skipped: an ADC
// offset would otherwise win). When the frame's last bin arrives it
// reports the winning bin, its power, and the under-sampled frequency
// f_u = bin * FS_HZ / N rounded to the nearest Hz. That frequency is exact
// to within half a bin, FS_HZ / (2N).
//
// Interface: the FFT output stream (in_valid, in_re, in_im, in_bin natural
// bin index in any order, in_last on the frame's last bin). Results:
// peak_valid pulses for one clock, one clock after in_last, with peak_bin,
// peak_pow and fu_hz held until the next frame's result. sync (one clock)
// discards the partial search of the current frame. Ties keep the
// first bin seen. Picking the peak of the power spectrum is the meter's
// method; skipping DC, the rounding of f_u and sync are this design's
// choices.
//
// fu_hz uses the meter's common FREQ_W-bit frequency word; since
// f_u < FS_HZ, its top bits are constant zero (three at the defaults).
module peak_picker #(
  parameter int unsigned N      = 2048,
  parameter int unsigned DW     = 26,
  parameter int unsigned FREQ_W = 32,
  parameter logic [FREQ_W-1:0] FS_HZ = 32'd200_000_000,
  localparam int unsigned L     = $clog2(N),
  localparam int unsigned PWW   = 2 * DW
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   sync,
  input  logic                   in_valid,
  input  logic signed [DW-1:0]   in_re,
  input  logic signed [DW-1:0]   in_im,
  input  logic [L-1:0]           in_bin,
  input  logic                   in_last,
  output logic                   peak_valid,
  output logic [L-1:0]           peak_bin,
  output logic [PWW-1:0]         peak_pow,
  output logic [FREQ_W-1:0]      fu_hz
);

  logic [PWW-1:0] pow;
  logic           in_range;
  logic [PWW-1:0] best_pow, next_pow;
  logic [L-1:0]   best_bin, next_bin;
  logic           have, next_have;

  // |X|^2 of a DW-bit signed pair fits 2*DW-1 bits; PWW leaves headroom.
  assign pow      = PWW'(in_re) * PWW'(in_re) + PWW'(in_im) * PWW'(in_im);
  assign in_range = (in_bin != '0) && ({1'b0, in_bin} <= (L+1)'(N / 2));

  always_comb begin
    next_pow  = best_pow;
    next_bin  = best_bin;
    next_have = have;
    if (in_valid && in_range && (!have || pow > best_pow)) begin
      next_pow  = pow;
      next_bin  = in_bin;
      next_have = 1'b1;
    end
  end

  // f_u = round(bin * FS / N)
  localparam int unsigned MW = FREQ_W + L;
  logic [MW-1:0] scaled;
  assign scaled = MW'(next_bin) * MW'(FS_HZ) + MW'(N / 2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_pow   <= '0;
      best_bin   <= '0;
      have       <= 1'b0;
      peak_valid <= 1'b0;
      peak_bin   <= '0;
      peak_pow   <= '0;
      fu_hz      <= '0;
    end else if (sync) begin
      peak_valid <= 1'b0;
      have       <= 1'b0;
      best_pow   <= '0;
      best_bin   <= '0;
    end else begin
      peak_valid <= 1'b0;
      if (in_valid && in_last) begin
        peak_valid <= 1'b1;
        peak_bin   <= next_bin;
        peak_pow   <= next_pow;
        fu_hz      <= FREQ_W'(scaled >> L);
        have       <= 1'b0;
        best_pow   <= '0;
        best_bin   <= '0;
      end else begin
        best_pow <= next_pow;
        best_bin <= next_bin;
        have     <= next_have;
      end
    end
  end

endmodule
