// Reference model of Zhang-Suen thinning for the testbenches, written in
// compass terms (N, NE, E, ... around the centre) and independent of the
// RTL package. The image is a flat array, index row*cols+col, 1 = black,
// and pixels outside the image count as white.
package zs_ref_pkg;

  typedef bit img_t[];

  // Neighbours in compass order N, NE, E, SE, S, SW, W, NW.
  function automatic void neighbours(input bit nb[9], output bit n[8]);
    // nb: 3x3 block, nb[r*3+c], r=0 top, c=0 left, centre nb[4]
    n[0] = nb[1]; n[1] = nb[2]; n[2] = nb[5]; n[3] = nb[8];
    n[4] = nb[7]; n[5] = nb[6]; n[6] = nb[3]; n[7] = nb[0];
  endfunction

  // Erase decision for sub-iteration `step` (1 or 2) of a 3x3 block.
  function automatic bit erase(input bit nb[9], input int step);
    bit n[8];
    int cnt, trans;
    bit north, east, south, west;
    neighbours(nb, n);
    cnt = 0; trans = 0;
    for (int i = 0; i < 8; i++) begin
      cnt += n[i];
      if (n[i] == 0 && n[(i + 1) % 8] == 1) trans++;   // 0->1 count equals 1->0 count
    end
    north = n[0]; east = n[2]; south = n[4]; west = n[6];
    if (!nb[4] || cnt < 2 || cnt > 6 || trans != 1) return 0;
    if (step == 1) return !(north && west && south) && !(north && east && west);
    else           return !(south && east && west) && !(south && east && north);
  endfunction

  function automatic bit px(const ref img_t img, input int rows, cols, r, c);
    if (r < 0 || r >= rows || c < 0 || c >= cols) return 0;
    return img[r*cols + c];
  endfunction

  // One sub-iteration on the whole image; returns the number erased.
  function automatic int pass(ref img_t img, input int rows, cols, step);
    img_t src;
    bit nb[9];
    int erased;
    src = img;
    erased = 0;
    for (int r = 0; r < rows; r++)
      for (int c = 0; c < cols; c++) begin
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++)
            nb[(dr+1)*3 + (dc+1)] = px(src, rows, cols, r+dr, c+dc);
        if (erase(nb, step)) begin
          img[r*cols + c] = 0;
          erased++;
        end
      end
    return erased;
  endfunction

  // Full thinning; returns iterations run, erased counts by reference.
  function automatic int thin(ref img_t img, input int rows, cols, max_iter,
                              output int e1, output int e2, output bit conv);
    int it, a, b;
    e1 = 0; e2 = 0; conv = 0; it = 0;
    while (it < max_iter) begin
      a = pass(img, rows, cols, 1);
      b = pass(img, rows, cols, 2);
      e1 += a; e2 += b; it++;
      if (a + b == 0) begin conv = 1; break; end
    end
    return it;
  endfunction

  // Finger-like test pattern: curved ridges about 4-6 pixels wide inside
  // an elliptical contact area.
  function automatic bit finger(input int rows, cols, r, c);
    int dy, dx, d2, q;
    dy = r - rows/2; dx = c - cols/2;
    if ((dy*dy)*(cols*cols) + (dx*dx)*(rows*rows) > (rows*rows*cols*cols)/4 * 9 / 10) return 0;
    d2 = dy*dy + 2*dx*dx + 3*dx*dy / 4;
    // ring index grows like a square root: period about 9 pixels
    q = 0;
    while ((q+1)*(q+1) <= d2) q++;
    return (q % 9) < 5;
  endfunction

endpackage
