// Reference model shared by the line-level testbenches: the row position of
// a line and the weight/inside tests, written with plain integers.
function automatic int ref_x(int xt, int xb, int r, int h);
  longint inv, off;
  inv = (65536 + h / 2) / h;
  off = longint'(xb - xt) * inv * r;
  // floor((off + 32768) / 65536) for negative numbers too
  return xt + int'((off + 32768) >>> 16);
endfunction
