// morph_ref_pkg: reference binary morphology on a W x H image stored row by
// row in a bit array, for the dilation and denoising testbenches. Pixels
// outside the frame take no part in a dilation (they count as 0), so an
// erosion, written as NOT dilation(NOT image), sees them as 1. SE bit
// 3*r+c pairs with the neighbour at row offset r-1 and column offset c-1.
package morph_ref_pkg;
  typedef bit img_t[];

  function automatic img_t dil(img_t a, int w, int h, bit [8:0] se);
    img_t o = new[w*h];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        bit v = 0;
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++) begin
            int yy = y + r - 1, xx = x + c - 1;
            if (yy >= 0 && yy < h && xx >= 0 && xx < w && se[3*r+c] && a[yy*w+xx]) v = 1;
          end
        o[y*w+x] = v;
      end
    return o;
  endfunction

  function automatic img_t inv(img_t a);
    img_t o = new[a.size()];
    foreach (a[i]) o[i] = !a[i];
    return o;
  endfunction

  function automatic img_t ero(img_t a, int w, int h, bit [8:0] se);
    return inv(dil(inv(a), w, h, se));
  endfunction

  // mode = {sel2, sel1}: 0 erosion, 1 dilation, 2 opening, 3 closing
  function automatic img_t morph(img_t a, int w, int h, bit [8:0] se, int mode);
    case (mode)
      0: return ero(a, w, h, se);
      1: return dil(a, w, h, se);
      2: return dil(ero(a, w, h, se), w, h, se);
      default: return ero(dil(a, w, h, se), w, h, se);
    endcase
  endfunction
endpackage
