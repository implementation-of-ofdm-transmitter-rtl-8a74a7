// tx_ifft: the transmitter's IFFT, built from two 8-point IFFT cores.
//
// One core transforms the in-phase bin vector and the other the quadrature
// bin vector, each fed as a real sequence. Because the transform is linear,
// the complex time-domain symbol is x = A + j*B, where A and B are the two
// cores' outputs: x.re = A.re - B.im and x.im = A.im + B.re. The use of two
// IFFT modules, one per component, follows the design description; how
// their outputs are joined is this implementation's choice.
//
// Timing: out_valid and out_data follow in_valid by 4 clocks (3 in the
// cores, 1 in the registered combiner); one symbol per clock is accepted.
module tx_ifft
  import ofdm_pkg::*;
(
  input  logic    clock,
  input  logic    arst_n,
  input  logic    in_valid,
  input  sample_t in_i [8],
  input  sample_t in_q [8],
  output logic    out_valid,
  output cplx_t   out_data [8]
);

  cplx_t a_in [8], b_in [8];
  cplx_t a_out [8], b_out [8];
  logic  a_valid, b_valid;

  always_comb begin
    for (int k = 0; k < 8; k++) begin
      a_in[k] = '{re: in_i[k], im: '0};
      b_in[k] = '{re: in_q[k], im: '0};
    end
  end

  fft8 #(.INVERSE(1'b1)) u_ifft_re (
    .clock, .arst_n, .in_valid, .in_data(a_in), .out_valid(a_valid), .out_data(a_out)
  );

  fft8 #(.INVERSE(1'b1)) u_ifft_im (
    .clock, .arst_n, .in_valid, .in_data(b_in), .out_valid(b_valid), .out_data(b_out)
  );

  function automatic sample_t sat17(input logic signed [DATA_W:0] v);
    if (v > (DATA_W + 1)'((1 <<< (DATA_W - 1)) - 1)) return sample_t'((1 <<< (DATA_W - 1)) - 1);
    if (v < -(DATA_W + 1)'(1 <<< (DATA_W - 1)))      return sample_t'(-(1 <<< (DATA_W - 1)));
    return sample_t'(v);
  endfunction

  always_ff @(posedge clock or negedge arst_n) begin
    if (!arst_n) begin
      out_valid <= 1'b0;
      for (int n = 0; n < 8; n++) out_data[n] <= '0;
    end else begin
      out_valid <= a_valid & b_valid;
      if (a_valid) begin
        for (int n = 0; n < 8; n++) begin
          out_data[n].re <= sat17((DATA_W + 1)'(a_out[n].re) - (DATA_W + 1)'(b_out[n].im));
          out_data[n].im <= sat17((DATA_W + 1)'(a_out[n].im) + (DATA_W + 1)'(b_out[n].re));
        end
      end
    end
  end

endmodule
