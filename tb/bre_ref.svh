// Reference model of the blocking-effect remover used by the testbenches.
// It works on a whole frame with plain arithmetic (multiplications and
// divisions rather than shifts) and pixel coordinates rather than banks.
// Requires localparams W (line width), H (frame height) and the type
// frame_t (byte unsigned [H][W]) in scope.

// edge replication at the picture border
function automatic int ref_px(const ref frame_t img, input int y, input int x);
  int yy, xx;
  yy = (y < 0) ? 0 : (y >= H) ? H - 1 : y;
  xx = (x < 0) ? 0 : (x >= W) ? W - 1 : x;
  return int'(img[yy][xx]);
endfunction

// relative-step test with tau = 1/4: (b-a)/((a+b)/2) > 1/4
function automatic int ref_step(input int a, input int b);
  if (a + b == 0) return 0;
  if (real'(b - a) * 8.0 > real'(a + b)) return 1;
  if (real'(b - a) * 8.0 < -real'(a + b)) return -1;
  return 0;
endfunction

// edge class of the 8x8 block at block row by, block column bx:
// 0 monotone, 1 0-degree, 2 45-degree, 3 90-degree, 4 135-degree
function automatic int ref_class(const ref frame_t img, input int by, input int bx);
  int k, l, ak, al;
  k = 0; l = 0;
  for (int j = 0; j < 8; j++)
    for (int i = 0; i < 7; i++)
      k += ref_step(int'(img[by*8+j][bx*8+i]), int'(img[by*8+j][bx*8+i+1]));
  for (int j = 0; j < 7; j++)
    for (int i = 0; i < 8; i++)
      l += ref_step(int'(img[by*8+j][bx*8+i]), int'(img[by*8+j+1][bx*8+i]));
  ak = (k < 0) ? -k : k;
  al = (l < 0) ? -l : l;
  if (ak < 6 && al < 6) return 0;
  if (ak < 6) return 1;
  if (al < 6) return 3;
  return ((k > 0) == (l > 0)) ? 2 : 4;
endfunction

// filtered value of the pixel at (y, x) for edge class cls
function automatic int ref_filter(const ref frame_t img, input int y, input int x, input int cls);
  int wgt [3][3];
  int acc;
  for (int a = 0; a < 3; a++) for (int b = 0; b < 3; b++) wgt[a][b] = 0;
  wgt[1][1] = 512;
  case (cls)
    1: begin wgt[1][0] = 256; wgt[1][2] = 256; end
    3: begin wgt[0][1] = 256; wgt[2][1] = 256; end
    2: begin wgt[0][2] = 256; wgt[2][0] = 256; end
    4: begin wgt[0][0] = 256; wgt[2][2] = 256; end
    default: for (int a = 0; a < 3; a++) for (int b = 0; b < 3; b++) if (a != 1 || b != 1) wgt[a][b] = 64;
  endcase
  acc = 0;
  for (int a = 0; a < 3; a++)
    for (int b = 0; b < 3; b++)
      acc += wgt[a][b] * ref_px(img, y + a - 1, x + b - 1);
  return acc / 1024;
endfunction

// expected output pixel
function automatic int ref_out(const ref frame_t img, input int y, input int x);
  int cy, cx;
  cy = y % 8; cx = x % 8;
  if (cy == 0 || cy == 7 || cx == 0 || cx == 7)
    return ref_filter(img, y, x, ref_class(img, y / 8, x / 8));
  return int'(img[y][x]);
endfunction

// test picture: every block gets one of several patterns (flat, vertical,
// horizontal and diagonal steps, noise) so that all edge classes appear
function automatic void make_frame(ref frame_t img, input int seed);
  int kind;
  int lo, hi;
  for (int by = 0; by < H / 8; by++)
    for (int bx = 0; bx < W / 8; bx++) begin
      kind = (by * 7 + bx * 3 + seed) % 6;
      lo = 30 + int'($urandom_range(0, 40));
      hi = 150 + int'($urandom_range(0, 90));
      for (int j = 0; j < 8; j++)
        for (int i = 0; i < 8; i++) begin
          int v;
          case (kind)
            0: v = lo + int'($urandom_range(0, 3));                 // flat
            1: v = (i >= 4) ? hi : lo;                              // vertical step
            2: v = (j >= 4) ? hi : lo;                              // horizontal step
            3: v = (i + j >= 8) ? hi : lo;                          // diagonal
            4: v = (i >= j) ? hi : lo;                              // anti-diagonal
            default: v = int'($urandom_range(0, 255));              // noise
          endcase
          img[by*8+j][bx*8+i] = byte'(v);
        end
    end
endfunction
