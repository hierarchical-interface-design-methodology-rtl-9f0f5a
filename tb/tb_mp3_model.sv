// tb_mp3_model: bit-exact reference of the codec hardware for the
// end-to-end testbench, written from the transform equations with
// real-valued cosines and the number format of tb_ref_pkg. It keeps the
// per-channel state that the hardware keeps (filter-bank histories, the
// previous granule of subband samples, IMDCT overlap, synthesis V vector).
package tb_mp3_model;
  import tb_ref_pkg::*;

  longint win_c [512];        // analysis window as loaded
  longint win_d [512];        // synthesis window as loaded
  longint hist  [2][512];
  longint prevs [2][32][18];  // previous granule of subband samples
  longint ov    [2][576];
  longint v     [2][1024];

  longint m_in  [576];        // input of encode()/decode()
  longint m_out [576];        // output of encode()/decode()

  localparam real AC [8] = '{-0.6, -0.535, -0.33, -0.185, -0.095, -0.041, -0.0142, -0.0037};

  function automatic void reset();
    for (int c = 0; c < 2; c++) begin
      for (int i = 0; i < 512; i++) hist[c][i] = 0;
      for (int i = 0; i < 576; i++) begin ov[c][i] = 0; prevs[c][i/18][i%18] = 0; end
      for (int i = 0; i < 1024; i++) v[c][i] = 0;
    end
  endfunction

  function automatic longint sat(longint x);
    if (x > 8388607) return 8388607;
    if (x < -8388608) return -8388608;
    return x;
  endfunction

  // encoder: 576 PCM samples -> 576 alias-reduced MDCT lines
  function automatic void encode(int ch);   // m_in: PCM, m_out: lines
    longint cur [32][18];
    for (int t = 0; t < 18; t++) begin
      longint y [64];
      for (int i = 511; i >= 32; i--) hist[ch][i] = hist[ch][i-32];
      for (int s = 0; s < 32; s++) hist[ch][31-s] = m_in[t*32+s];
      for (int k = 0; k < 64; k++) begin
        longint a = 0;
        for (int j = 0; j < 8; j++) a += win_c[k+64*j] * hist[ch][k+64*j];
        y[k] = rs(a);
      end
      for (int i = 0; i < 32; i++) begin
        longint a = 0;
        for (int k = 0; k < 64; k++) a += y[k] * q($cos(real'((2*i+1)*(k-16)) * RPI / 64.0));
        cur[i][t] = rs(a);
      end
    end
    for (int s = 0; s < 32; s++) begin
      longint z [36];
      for (int n = 0; n < 36; n++)
        z[n] = rs(((n < 18) ? prevs[ch][s][n] : cur[s][n-18]) * q($sin(RPI / 36.0 * (real'(n) + 0.5))));
      for (int k = 0; k < 18; k++) begin
        longint a = 0;
        for (int n = 0; n < 36; n++) a += z[n] * q($cos(RPI / 72.0 * real'((2*n+19)*(2*k+1))));
        m_out[s*18+k] = rs(a);
      end
      for (int n = 0; n < 18; n++) prevs[ch][s][n] = cur[s][n];
    end
    for (int s = 1; s < 32; s++)
      for (int i = 0; i < 8; i++) begin
        longint a, b, cs, ca;
        cs = q(1.0 / $sqrt(1.0 + AC[i]*AC[i]));
        ca = q(AC[i] / $sqrt(1.0 + AC[i]*AC[i]));
        a = m_out[18*s-1-i]; b = m_out[18*s+i];
        m_out[18*s-1-i] = rs(a*cs + b*ca);
        m_out[18*s+i]   = rs(b*cs - a*ca);
      end
  endfunction

  function automatic real wlong(int bt, int i);
    if (bt == 1) begin
      if (i >= 18 && i < 24) return 1.0;
      if (i >= 24 && i < 30) return $sin(RPI / 12.0 * (real'(i) - 18.0 + 0.5));
      if (i >= 30) return 0.0;
    end
    if (bt == 3) begin
      if (i < 6) return 0.0;
      if (i < 12) return $sin(RPI / 12.0 * (real'(i) - 6.0 + 0.5));
      if (i < 18) return 1.0;
    end
    return $sin(RPI / 36.0 * (real'(i) + 0.5));
  endfunction

  // decoder: 576 lines -> 576 PCM samples
  function automatic void decode(int ch, int maxb, int bt, int mix);   // m_in: lines, m_out: PCM
    longint sbs [32][18];
    for (int s = 0; s < 32; s++) begin
      longint z [36];
      bit sh = (bt == 2) && !(mix && s < 2);
      for (int i = 0; i < 36; i++) z[i] = 0;
      if (s <= maxb && !sh) begin
        for (int i = 0; i < 36; i++) begin
          longint a = 0;
          for (int k = 0; k < 18; k++) a += m_in[s*18+k] * q($cos(RPI / 72.0 * real'((2*i+19)*(2*k+1))));
          z[i] = rs(rs(a) * q(wlong((bt == 2) ? 0 : bt, i)));
        end
      end else if (s <= maxb) begin
        for (int w = 0; w < 3; w++)
          for (int i = 0; i < 12; i++) begin
            longint a = 0;
            for (int k = 0; k < 6; k++) a += m_in[s*18+3*k+w] * q($cos(RPI / 24.0 * real'((2*i+7)*(2*k+1))));
            z[6+6*w+i] = sat(z[6+6*w+i] + rs(rs(a) * q($sin(RPI / 12.0 * (real'(i) + 0.5)))));
          end
      end
      for (int i = 0; i < 18; i++) begin
        longint y = sat(z[i] + ov[ch][s*18+i]);
        if ((s % 2 == 1) && (i % 2 == 1)) y = sat(-y);
        sbs[s][i] = y;
        ov[ch][s*18+i] = z[i+18];
      end
    end
    for (int t = 0; t < 18; t++) begin
      for (int i = 1023; i >= 64; i--) v[ch][i] = v[ch][i-64];
      for (int i = 0; i < 64; i++) begin
        longint a = 0;
        for (int k = 0; k < 32; k++) a += sbs[k][t] * q($cos(real'((16+i)*(2*k+1)) * RPI / 64.0));
        v[ch][i] = rs(a);
      end
      for (int j = 0; j < 32; j++) begin
        longint a = 0;
        for (int m = 0; m < 8; m++) begin
          a += win_d[j+64*m]    * v[ch][128*m+j];
          a += win_d[j+64*m+32] * v[ch][128*m+96+j];
        end
        m_out[t*32+j] = rs(a);
      end
    end
  endfunction

endpackage
