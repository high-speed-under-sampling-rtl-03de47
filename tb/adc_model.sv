// Behavioural model of one under-sampling ADC (not synthesizable).
//
// Samples a real tone amp*cos(2*pi*tone_hz*t) at FS_HZ and delivers the
// samples as strobes in the CLK_HZ clock domain of the meter: a phase
// accumulator raises valid on FS_HZ/CLK_HZ of the clocks. The sample
// instant is n/FS_HZ, so each output is the exact sampled value, rounded,
// plus uniform noise of +/-noise LSB, clipped to W bits. While gate is low
// the input is silent (only noise), which models the gaps between pulses.
// The phase of the tone is kept exact by reducing tone_hz*n modulo FS_HZ
// in integers.
module adc_model #(
  parameter longint FS_HZ  = 200_000_000,
  parameter longint CLK_HZ = 200_000_000,
  parameter int     W      = 14
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                run,
  input  logic                gate,
  input  logic [31:0]         tone_hz,
  input  int                  amp,
  input  int                  noise,
  output logic                valid,
  output logic signed [W-1:0] data
);
  localparam real PI = 3.14159265358979323846;
  longint acc = 0;
  longint n = 0;

  always @(posedge clk) begin
    if (!rst_n || !run) begin
      valid <= 1'b0;
      data  <= '0;
    end else begin
      acc = acc + FS_HZ;
      if (acc >= CLK_HZ) begin
        longint r;
        real    v;
        int     s;
        acc = acc - CLK_HZ;
        r = (longint'(tone_hz) * n) % FS_HZ;
        v = gate ? real'(amp) * $cos(2.0 * PI * real'(r) / real'(FS_HZ)) : 0.0;
        s = $rtoi(v + ((v < 0.0) ? -0.5 : 0.5));
        if (noise > 0) s = s + int'($urandom_range(32'(2 * noise))) - noise;
        if (s >  2 ** (W - 1) - 1) s =  2 ** (W - 1) - 1;
        if (s < -(2 ** (W - 1)))   s = -(2 ** (W - 1));
        n     = n + 1;
        valid <= 1'b1;
        data  <= W'(s);
      end else begin
        valid <= 1'b0;
      end
    end
  end
endmodule
