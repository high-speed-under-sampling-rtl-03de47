// Streaming N-point FFT of a real input stream (radix-2, single-path delay
// feedback, decimation in frequency).
//
// One FFT channel of the meter: it takes the samples of one ADC, one per
// valid clock, and produces the N-point DFT X[k] = sum x[n] exp(-j2*pi*nk/N)
// of every consecutive block of N samples. log2(N) R2SDF stages are chained;
// stage s pairs samples N/2^(s+1) apart. The results leave in bit-reversed
// order, so out_bin gives the natural bin index of each output, and out_last
// marks the last output of a frame.
//
// Timing: one sample per clock when in_valid is held high. The first output
// (bin 0) of a frame leaves log2(N) clocks after the frame's last sample
// (one register per stage) and the N outputs follow at the input rate.
// Outputs appear only while samples keep arriving: frame k is pushed out by
// the samples of frame k+1, as with an ADC that runs continuously.
//
// Frame alignment: after reset, frames start with the first valid sample.
// A one-clock sync pulse restarts the framing: the sample of that clock and
// the frames still in flight are dropped, and the next valid sample is
// sample 0 of a new frame. Several channels given the same sync thus start
// their frames at the same instant.
//
// Arithmetic: no scaling; the data width grows to IN_W + log2(N) + 1 bits
// in every stage so that no overflow is possible. Twiddles are TW_W bits.
// The meter's method fixes N = 2048 and calls for a pipelined streaming FFT
// (a vendor core in the original FPGA build); the R2SDF structure is this
// design's own.
module fft_r2sdf #(
  parameter int unsigned N    = 2048,
  parameter int unsigned IN_W = 14,
  parameter int unsigned TW_W = 18,
  localparam int unsigned L   = $clog2(N),
  localparam int unsigned DW  = IN_W + L + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   sync,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_data,
  output logic                   out_valid,
  output logic signed [DW-1:0]   out_re,
  output logic signed [DW-1:0]   out_im,
  output logic [L-1:0]           out_bin,
  output logic                   out_last
);

  logic                 v  [L+1];
  logic signed [DW-1:0] re [L+1];
  logic signed [DW-1:0] im [L+1];

  assign v[0]  = in_valid;
  assign re[0] = DW'(in_data);
  assign im[0] = '0;

  for (genvar s = 0; s < L; s++) begin : g_stage
    fft_r2sdf_stage #(.D(N >> (s + 1)), .DW(DW), .TW_W(TW_W)) u_stage (
      .clk      (clk),
      .rst_n    (rst_n),
      .sync     (sync),
      .in_valid (v[s]),
      .in_re    (re[s]),
      .in_im    (im[s]),
      .out_valid(v[s+1]),
      .out_re   (re[s+1]),
      .out_im   (im[s+1])
    );
  end

  // Output position within the frame; its bit reversal is the bin index.
  logic [L-1:0] pos;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    pos <= '0;
    else if (sync) pos <= '0;
    else if (v[L]) pos <= pos + 1'b1;
  end

  always_comb begin
    for (int b = 0; b < int'(L); b++) out_bin[b] = pos[L-1-b];
  end

  assign out_valid = v[L];
  assign out_re    = re[L];
  assign out_im    = im[L];
  assign out_last  = v[L] && (pos == L'(N - 1));

endmodule
