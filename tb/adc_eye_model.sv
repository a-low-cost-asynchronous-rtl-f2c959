// adc_eye_model: behavioural stand-in for the channel, sample and hold and
// 8-bit ADC, used only by testbenches.
//
// After each rising edge of samp_clk it presents the code of sample
// number `index` (the sample the memory controller will store at the next
// edge): random NRZ data (levels 56 and 200) seen at bit phase
// p = frac(index * lam_true + ph0), through a channel whose response
// spills half of each neighbour bit into the bit edges:
//   v = L(cur) + (L(prev) - L(cur)) * h(p) + (L(next) - L(cur)) * h(1 - p),
//   h(x) = 0.25 * (1 + cos(2 * pi * x)) for x < 0.5, else 0.
// This gives a rounded eye: crossings at p = 0, widest opening at
// p = 0.5, flat-topped near its centre as a band-limited channel gives. Uniform noise of +-noise codes is added. With noise_only set
// the code is random and no eye exists.
`timescale 1ns/1ps
module adc_eye_model (
  input  logic        samp_clk,
  input  logic [11:0] index,
  input  real         lam_true,
  input  real         ph0,
  input  int          noise,
  input  logic        noise_only,
  output logic [7:0]  adc_data
);
  function automatic real h(real x);
    return (x < 0.5) ? 0.25 * (1.0 + $cos(2.0 * 3.14159265358979 * x)) : 0.0;
  endfunction

  function automatic logic [7:0] code(real p, bit prev, bit cur, bit nxt, int nz);
    real a = prev ? 200.0 : 56.0, b = cur ? 200.0 : 56.0, c = nxt ? 200.0 : 56.0, v;
    v = b + (a - b) * h(p) + (c - b) * h(1.0 - p);
    v += real'(nz);
    if (v < 0.0) v = 0.0;
    if (v > 255.0) v = 255.0;
    return 8'(int'(v));
  endfunction

  initial adc_data = 8'd128;

  always @(posedge samp_clk) begin
    real p;
    #0.1;
    p = real'(index) * lam_true + ph0;
    p = p - $floor(p);
    if (noise_only) adc_data = 8'($urandom);
    else adc_data = code(p, $urandom_range(0, 1) == 1, $urandom_range(0, 1) == 1,
                         $urandom_range(0, 1) == 1,
                         int'($urandom_range(0, 2 * noise)) - noise);
  end
endmodule
