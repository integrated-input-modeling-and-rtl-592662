// Reference arithmetic for the motion-detection testbenches, written
// independently of the RTL: grey level with real-valued weights rounded to
// the nearest integer, thresholded absolute difference, and the four-neighbour
// erosion of a whole image held in a dynamic array (row-major, W x H).
package tb_imgref_pkg;

  function automatic int ref_grey(int r, int g, int b);
    real y;
    y = 0.299 * r + 0.587 * g + 0.114 * b;
    return int'($floor(y + 0.5));
  endfunction

  function automatic int ref_diff(int a, int b, int thr);
    int d;
    d = (a > b) ? a - b : b - a;
    return (d < thr) ? 0 : d;
  endfunction

  typedef int img_t[];

  function automatic img_t ref_erode(img_t im, int w, int h);
    img_t o;
    o = new[w * h];
    foreach (im[i]) o[i] = im[i];
    for (int r = 1; r < h - 1; r++)
      for (int c = 1; c < w - 1; c++)
        if (im[r * w + c] != 0) begin
          int m;
          m = im[(r - 1) * w + c];
          if (im[(r + 1) * w + c] < m) m = im[(r + 1) * w + c];
          if (im[r * w + c - 1] < m) m = im[r * w + c - 1];
          if (im[r * w + c + 1] < m) m = im[r * w + c + 1];
          o[r * w + c] = m;
        end
    return o;
  endfunction

endpackage
