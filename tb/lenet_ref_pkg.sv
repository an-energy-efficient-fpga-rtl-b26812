// lenet_ref_pkg: bit-exact behavioural reference of the accelerator's
// arithmetic, used by the testbenches. It works on whole arrays with 64-bit
// integers, independently of the RTL's streaming structure: direct nested
// loops for convolution, pooling and the dot products. Requantisation is
// floor division by 128 (weights have 7 fraction bits), saturation to
// 16 bits and, where asked, ReLU. It also counts how often ReLU zeroed a
// value and how often saturation clipped one.
package lenet_ref_pkg;

  int unsigned n_relu = 0;
  int unsigned n_sat  = 0;

  function automatic shortint rq(longint acc, bit relu);
    longint rem, q;
    rem = acc % 128;
    if (rem < 0) rem += 128;
    q = (acc - rem) / 128;
    if (q > 32767)  begin q = 32767;  n_sat++; end
    if (q < -32768) begin q = -32768; n_sat++; end
    if (relu && q < 0) begin q = 0; n_relu++; end
    return shortint'(q);
  endfunction

  // image [32*32] -> f1 [3*14*14]
  function automatic void conv1(ref shortint img[1024], ref byte w[75], ref int b[3],
                                ref shortint f1[588]);
    shortint c [28][28];
    for (int m = 0; m < 3; m++) begin
      for (int y = 0; y < 28; y++)
        for (int x = 0; x < 28; x++) begin
          longint s = longint'(b[m]);
          for (int i = 0; i < 5; i++)
            for (int j = 0; j < 5; j++)
              s += longint'(img[(y+i)*32 + x+j]) * longint'(w[m*25 + i*5 + j]);
          c[y][x] = rq(s, 1);
        end
      for (int y = 0; y < 14; y++)
        for (int x = 0; x < 14; x++) begin
          shortint mx = c[2*y][2*x];
          if (c[2*y][2*x+1]   > mx) mx = c[2*y][2*x+1];
          if (c[2*y+1][2*x]   > mx) mx = c[2*y+1][2*x];
          if (c[2*y+1][2*x+1] > mx) mx = c[2*y+1][2*x+1];
          f1[m*196 + y*14 + x] = mx;
        end
    end
  endfunction

  // f1 [3*14*14] -> f2 [12*5*5]
  function automatic void conv2(ref shortint f1[588], ref byte w[900], ref int b[12],
                                ref shortint f2[300]);
    shortint c [10][10];
    for (int m = 0; m < 12; m++) begin
      for (int y = 0; y < 10; y++)
        for (int x = 0; x < 10; x++) begin
          longint s = longint'(b[m]);
          for (int ch = 0; ch < 3; ch++)
            for (int i = 0; i < 5; i++)
              for (int j = 0; j < 5; j++)
                s += longint'(f1[ch*196 + (y+i)*14 + x+j])
                   * longint'(w[(m*3 + ch)*25 + i*5 + j]);
          c[y][x] = rq(s, 1);
        end
      for (int y = 0; y < 5; y++)
        for (int x = 0; x < 5; x++) begin
          shortint mx = c[2*y][2*x];
          if (c[2*y][2*x+1]   > mx) mx = c[2*y][2*x+1];
          if (c[2*y+1][2*x]   > mx) mx = c[2*y+1][2*x];
          if (c[2*y+1][2*x+1] > mx) mx = c[2*y+1][2*x+1];
          f2[m*25 + y*5 + x] = mx;
        end
    end
  endfunction

  // f2 [300] -> hid [48]; weight of node n, input i at w[n*300 + i]
  function automatic void hidden(ref shortint f2[300], ref byte w[14400], ref int b[48],
                                 ref shortint hid[48]);
    for (int n = 0; n < 48; n++) begin
      longint s = longint'(b[n]);
      for (int i = 0; i < 300; i++) s += longint'(f2[i]) * longint'(w[n*300 + i]);
      hid[n] = rq(s, 1);
    end
  endfunction

  // hid [48] -> score [10]; weight of node n, input i at w[n*48 + i]
  function automatic int outlayer(ref shortint hid[48], ref byte w[480], ref int b[10],
                                  ref int score[10]);
    int best = 0;
    for (int n = 0; n < 10; n++) begin
      longint s = longint'(b[n]);
      for (int i = 0; i < 48; i++) s += longint'(hid[i]) * longint'(w[n*48 + i]);
      score[n] = int'(s);
    end
    for (int n = 1; n < 10; n++) if (score[n] > score[best]) best = n;
    return best;
  endfunction

endpackage
