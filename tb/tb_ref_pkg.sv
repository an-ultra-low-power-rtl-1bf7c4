// tb_ref_pkg: reference image source and golden arithmetic for the
// testbenches, written directly from the definitions of the mean square error
// and the two differential coefficients, independent of the RTL.
//
// rpix is a reference (previous) frame defined for every integer coordinate:
// two triangle waves plus a small hashed texture. cpix is the current frame,
// the reference moved by (MVX, MVY) with a little noise, so a true motion
// vector exists. Layer 2 and 3 images (lyr = 1, 2) are taken as every 2nd
// and every 4th pixel of each row and column; lpix gives them.
package tb_ref_pkg;

  localparam int MVX = 5;
  localparam int MVY = -3;

  function automatic int tri_wave(input int v, input int p);
    int m;
    m = v % p;
    if (m < 0) m += p;
    return (m < p/2) ? m : p - m;
  endfunction

  function automatic int hash2(input int x, input int y);
    int unsigned h;
    h = 32'(x) * 32'h9E3779B1 ^ 32'(y) * 32'h85EBCA77;
    h = h ^ (h >> 15);
    return int'(h & 32'h3);
  endfunction

  function automatic int rpix(input int x, input int y);
    return 2 * tri_wave(x, 128) + 2 * tri_wave(y + 20, 96) + hash2(x, y);
  endfunction

  function automatic int cpix(input int x, input int y);
    return rpix(x + MVX, y + MVY) + (hash2(y, x) >> 1);
  endfunction

  // pixel of layer lyr+1 of the current (cur) or reference frame
  function automatic int lpix(input bit cur, input int lyr, input int x, input int y);
    return cur ? cpix(x << lyr, y << lyr) : rpix(x << lyr, y << lyr);
  endfunction

  // Eq. (1): E = sum (T - S)^2 over the N x N block (N = 16 >> lyr) at layer
  // coordinates (mx, my) for vector v
  function automatic longint ref_mse(input int mx, input int my, input int vx, input int vy,
                                     input int lyr = 0);
    longint e = 0;
    for (int j = 0; j < (16 >> lyr); j++)
      for (int i = 0; i < (16 >> lyr); i++) begin
        int d = lpix(1, lyr, mx + i, my + j) - lpix(0, lyr, mx + i + vx, my + j + vy);
        e += longint'(d * d);
      end
    return e;
  endfunction

  // Eq. (2) for axis 0, Eq. (3) for axis 1
  function automatic longint ref_diff(input int mx, input int my, input int vx, input int vy,
                                      input int axis, input int lyr = 0);
    longint e = 0;
    for (int j = 0; j < (16 >> lyr); j++)
      for (int i = 0; i < (16 >> lyr); i++) begin
        int x = mx + i + vx, y = my + j + vy;
        int d = lpix(1, lyr, mx + i, my + j) - lpix(0, lyr, x, y);
        int g = (axis == 0) ? lpix(0, lyr, x + 1, y) - lpix(0, lyr, x - 1, y)
                            : lpix(0, lyr, x, y + 1) - lpix(0, lyr, x, y - 1);
        e += longint'(d * g);
      end
    return e;
  endfunction

  // 64-bit MemoryBus word: 8 pixels of row y from column 8*wx of layer
  // lyr+1, leftmost in bits 7:0
  function automatic logic [63:0] bus_word(input bit cur, input int wx, input int y,
                                           input int lyr = 0);
    logic [63:0] w;
    for (int p = 0; p < 8; p++)
      w[8*p +: 8] = 8'(lpix(cur, lyr, 8 * wx + p, y));
    return w;
  endfunction

endpackage
