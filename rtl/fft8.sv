// fft8: 8-point complex FFT / IFFT with 16-bit samples.
//
// The 8-point (radix-8) transform is evaluated as three radix-2
// decimation-in-frequency stages, each ending in a register:
//   stage 1: butterflies on (n, n+4), difference times W8^n
//   stage 2: butterflies on (n, n+2) in each half, difference times W8^(2n)
//   stage 3: butterflies on (n, n+1)
// Stage 3 yields the bins in bit-reversed order; the output port is wired
// back into natural order. W8 = exp(-j*2*pi/8) for the FFT (INVERSE = 0) and
// its conjugate for the IFFT (INVERSE = 1). Multiplying by -j or +j is a swap
// and a negation; the odd twiddles (+-1 +-j)/sqrt(2) use one constant,
// 11585 = round(2^14/sqrt(2)), with rounding to nearest.
//
// Scaling: the IFFT divides by 8 (rounded to nearest), so an IFFT followed
// by an FFT returns its input within a few LSBs; the FFT is unscaled.
// Internal words are DATA_W+5 bits so no stage can overflow; the outputs
// saturate to 16 bits.
//
// The 8-point size and 16-bit samples follow the design description; the
// stage structure, twiddle precision and scaling are this implementation's.
//
// Interface: in_data / out_data hold the 8 complex samples in natural order
// (index 0 = sample or bin 0). Timing: fully pipelined, one transform per
// clock; out_valid and out_data follow in_valid by 3 clocks.
module fft8
  import ofdm_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic  clock,
  input  logic  arst_n,
  input  logic  in_valid,
  input  cplx_t in_data  [8],
  output logic  out_valid,
  output cplx_t out_data [8]
);

  localparam int IW = DATA_W + 5;
  localparam int MUL_W = IW + 16;
  localparam logic signed [15:0] INV_SQRT2_Q14 = 16'sd11585;

  typedef logic signed [IW-1:0] wsample_t;
  typedef struct packed {
    wsample_t re;
    wsample_t im;
  } wcplx_t;

  // v / sqrt(2), rounded to nearest
  function automatic wsample_t scale_r2(input wsample_t v);
    logic signed [MUL_W-1:0] p;
    p = MUL_W'(v) * MUL_W'(INV_SQRT2_Q14) + MUL_W'(1 << 13);
    return wsample_t'(p >>> 14);
  endfunction

  // v * W8^k for k = 0..3; W8 conjugated for the inverse transform
  function automatic wcplx_t twiddle(input wcplx_t v, input int k);
    wcplx_t r;
    unique case (k)
      0: r = v;
      1: if (!INVERSE) begin  // (1 - j)/sqrt(2)
           r.re = scale_r2(v.re + v.im);
           r.im = scale_r2(v.im - v.re);
         end else begin       // (1 + j)/sqrt(2)
           r.re = scale_r2(v.re - v.im);
           r.im = scale_r2(v.re + v.im);
         end
      2: if (!INVERSE) begin  // -j
           r.re = v.im;
           r.im = -v.re;
         end else begin       // +j
           r.re = -v.im;
           r.im = v.re;
         end
      default:
         if (!INVERSE) begin  // (-1 - j)/sqrt(2)
           r.re = scale_r2(v.im - v.re);
           r.im = scale_r2(-(v.re + v.im));
         end else begin       // (-1 + j)/sqrt(2)
           r.re = scale_r2(-(v.re + v.im));
           r.im = scale_r2(v.re - v.im);
         end
    endcase
    return r;
  endfunction

  function automatic wcplx_t cadd(input wcplx_t a, input wcplx_t b);
    return '{re: a.re + b.re, im: a.im + b.im};
  endfunction

  function automatic wcplx_t csub(input wcplx_t a, input wcplx_t b);
    return '{re: a.re - b.re, im: a.im - b.im};
  endfunction

  function automatic sample_t saturate(input wsample_t v);
    localparam wsample_t MAXV = wsample_t'((1 <<< (DATA_W - 1)) - 1);
    localparam wsample_t MINV = wsample_t'(-(1 <<< (DATA_W - 1)));
    if (v > MAXV) return sample_t'(MAXV);
    if (v < MINV) return sample_t'(MINV);
    return sample_t'(v);
  endfunction

  function automatic sample_t out_scale(input wsample_t v);
    if (INVERSE) return saturate((v + wsample_t'(4)) >>> 3);
    return saturate(v);
  endfunction

  function automatic int bitrev3(input int i);
    return ((i & 1) << 2) | (i & 2) | ((i >> 2) & 1);
  endfunction

  wcplx_t s0 [8];
  wcplx_t s1_d [8], s2_d [8], s3_d [8];
  wcplx_t s1_q [8], s2_q [8], s3_q [8];
  logic   v1_q, v2_q, v3_q;

  always_comb begin
    for (int n = 0; n < 8; n++) begin
      s0[n].re = wsample_t'(in_data[n].re);
      s0[n].im = wsample_t'(in_data[n].im);
    end
    // stage 1: span 4
    for (int n = 0; n < 4; n++) begin
      s1_d[n]     = cadd(s0[n], s0[n + 4]);
      s1_d[n + 4] = twiddle(csub(s0[n], s0[n + 4]), n);
    end
    // stage 2: span 2 inside each half
    for (int g = 0; g < 8; g += 4) begin
      for (int n = 0; n < 2; n++) begin
        s2_d[g + n]     = cadd(s1_q[g + n], s1_q[g + n + 2]);
        s2_d[g + n + 2] = twiddle(csub(s1_q[g + n], s1_q[g + n + 2]), 2 * n);
      end
    end
    // stage 3: span 1
    for (int g = 0; g < 8; g += 2) begin
      s3_d[g]     = cadd(s2_q[g], s2_q[g + 1]);
      s3_d[g + 1] = csub(s2_q[g], s2_q[g + 1]);
    end
  end

  always_ff @(posedge clock or negedge arst_n) begin
    if (!arst_n) begin
      v1_q <= 1'b0;
      v2_q <= 1'b0;
      v3_q <= 1'b0;
      for (int n = 0; n < 8; n++) begin
        s1_q[n] <= '0;
        s2_q[n] <= '0;
        s3_q[n] <= '0;
      end
    end else begin
      v1_q <= in_valid;
      v2_q <= v1_q;
      v3_q <= v2_q;
      if (in_valid) s1_q <= s1_d;
      if (v1_q)     s2_q <= s2_d;
      if (v2_q)     s3_q <= s3_d;
    end
  end

  assign out_valid = v3_q;

  always_comb begin
    for (int m = 0; m < 8; m++) begin
      out_data[bitrev3(m)].re = out_scale(s3_q[m].re);
      out_data[bitrev3(m)].im = out_scale(s3_q[m].im);
    end
  end

endmodule
