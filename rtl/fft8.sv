// 8-point FFT on IEEE-754 single-precision complex samples.
//
// X(k) = sum_{n=0}^{7} x(n) * W8^(n*k), W8 = exp(-j*2*pi/8), computed by a
// radix-2 decimation-in-time Cooley-Tukey network: three stages of four
// butterflies (twelve in all). The inputs enter the first stage in
// bit-reversed order and the outputs leave the last stage in natural order.
// In stage s (s = 0, 1, 2) butterflies pair samples span = 2^s apart and
// the butterfly at offset j inside its group uses twiddle W8^(j * 4/2^s).
// Every butterfly multiplies with the Karatsuba / Urdhva-Tiryagbhyam
// floating-point multiplier, including the trivial twiddles 1 and -j, so
// the design holds 48 such multipliers.
//
// The 8-point size, single precision and the multiplier follow the
// documented design; the DIT ordering, full multipliers on trivial
// twiddles, round toward zero and a fully combinational network with no
// registers are this design's choices. No scaling is applied: X(k) is the
// unnormalized DFT.
//
// Interface: x[n] are the time samples, X[k] the frequency samples
// (fft_pkg::cplx_t). Purely combinational; results are valid one
// combinational delay after the inputs change.
module fft8
  import fft_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  cplx_t x [N],
  output cplx_t X [N]
);

  localparam int unsigned STAGES = $clog2(N);

  // The twiddle table in fft_pkg holds the eighth roots of unity only.
  if (N != 8) begin : g_size_check
    $error("fft8 supports N = 8 only");
  end

  function automatic int unsigned bitrev(input int unsigned i);
    int unsigned r;
    r = 0;
    for (int k = 0; k < STAGES; k++)
      if ((i & (1 << k)) != 0) r |= 1 << (STAGES - 1 - k);
    return r;
  endfunction

  // Each stage has its own input and output arrays, so no variable is
  // both read and written by the same stage.
  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam int unsigned SPAN = 1 << s;
    cplx_t vin  [N];
    cplx_t vout [N];

    for (genvar n = 0; n < N; n++) begin : g_link
      if (s == 0) begin : g_first
        assign vin[n] = x[bitrev(n)];
      end else begin : g_next
        assign vin[n] = g_stage[s-1].vout[n];
      end
    end

    for (genvar q = 0; q < N / 2; q++) begin : g_bf
      localparam int unsigned J   = q % SPAN;
      localparam int unsigned TOP = (q / SPAN) * 2 * SPAN + J;
      localparam int unsigned BOT = TOP + SPAN;
      localparam int unsigned K   = J * (N / (2 * SPAN));
      butterfly u_bf (
        .a (vin[TOP]),
        .b (vin[BOT]),
        .w (twiddle8(K)),
        .x (vout[TOP]),
        .y (vout[BOT])
      );
    end
  end

  for (genvar k = 0; k < N; k++) begin : g_out
    assign X[k] = g_stage[STAGES-1].vout[k];
  end

endmodule
