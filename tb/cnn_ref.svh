// Reference model of the accelerator's inference for testbenches: 3x3
// convolution with one pixel of zero padding over C channels, bias added as
// (bias << sh), arithmetic shift right by sh, saturation to 16 bits, ReLU,
// 2x2 stride-2 max-pool. Memory layouts as documented in cnn_engine.
function automatic void cnn_ref(input int n, input int c, input int f, input int sh,
                                input shortint ifm[1024], input shortint w[1024],
                                output shortint ofm[1024]);
  int h = n / 2;
  for (int i = 0; i < 1024; i++) ofm[i] = 0;
  for (int ff = 0; ff < f; ff++) begin
    int base = 4 + ff * (9 * c + 1);
    for (int py = 0; py < h; py++)
      for (int px = 0; px < h; px++) begin
        int mx = 0;
        for (int q = 0; q < 4; q++) begin
          int y = 2 * py + q / 2, x = 2 * px + q % 2;
          longint s = 0, r;
          for (int cc = 0; cc < c; cc++)
            for (int ky = 0; ky < 3; ky++)
              for (int kx = 0; kx < 3; kx++) begin
                int iy = y + ky - 1, ix = x + kx - 1;
                if (iy >= 0 && ix >= 0 && iy < n && ix < n)
                  s += longint'(ifm[cc * n * n + iy * n + ix]) * longint'(w[base + cc * 9 + ky * 3 + kx]);
              end
          s += longint'(w[base + 9 * c]) <<< sh;
          r = s >>> sh;
          if (r > 32767) r = 32767;
          if (r < -32768) r = -32768;
          if (r < 0) r = 0;
          if (int'(r) > mx) mx = int'(r);
        end
        ofm[ff * h * h + py * h + px] = shortint'(mx);
      end
  end
endfunction
