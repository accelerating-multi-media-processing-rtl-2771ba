// tb_mm_pkg: operation streams of small image-processing kernels, shared by
// the workload testbenches.
//
// make_image fills a 32x32 8-bit image with low local entropy: flat 4x4
// patches, each at one of `levels` grey levels (k*(240/levels) + 20), with
// level k = (3*(x/8) + 5*(y/8) + (x/4)*(y/4)) mod levels, plus sparse +1
// noise; a nonzero `noise` adds to every pixel a random value in
// 0..noise, which raises the image's entropy. image_entropy and
// window_entropy give -sum(p_k * log2 p_k) over the grey-level histogram
// of the whole image and, averaged, of its 8x8 windows.
// make_ops turns it into the multiplications and divisions of three
// kernels, in program order:
//   edge:    3x3 Sobel-type weighted sums: integer multiplies pixel*weight
//            and fp multiplies pixel*(weight/4.0)
//   enhance: local 3x3 mean and contrast: fp multiplies pixel*pixel, fp
//            divides sum/9.0 and pixel/mean
//   polar:   ratio of vertical to horizontal neighbour differences
package tb_mm_pkg;

  localparam int N = 32;

  typedef struct {
    int          u;      // 0 = integer multiply, 1 = fp multiply, 2 = fp divide
    logic [63:0] a, b;
  } mm_op_t;

  typedef int image_t [N][N];

  function automatic image_t make_image(input int levels = 6, input int noise = 0);
    image_t img;
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) begin
        img[y][x] = (240 / levels) * (((x / 8) * 3 + (y / 8) * 5 + (x / 4) * (y / 4)) % levels) + 20;
        if ($urandom % 16 == 0) img[y][x] += 1;
        if (noise > 0) img[y][x] += int'($urandom % (noise + 1));
        if (img[y][x] > 255) img[y][x] = 255;
      end
    return img;
  endfunction

  // entropy in bits of the pixels in rows y0..y0+h-1, columns x0..x0+w-1
  function automatic real region_entropy(input image_t img, input int y0, input int x0,
                                         input int h, input int w);
    int  hist [256];
    real e, p;
    foreach (hist[k]) hist[k] = 0;
    for (int y = y0; y < y0 + h; y++)
      for (int x = x0; x < x0 + w; x++) hist[img[y][x]]++;
    e = 0.0;
    foreach (hist[k])
      if (hist[k] > 0) begin
        p = real'(hist[k]) / real'(h * w);
        e -= p * $ln(p) / $ln(2.0);
      end
    return e;
  endfunction

  function automatic real image_entropy(input image_t img);
    return region_entropy(img, 0, 0, N, N);
  endfunction

  function automatic real window_entropy(input image_t img);
    real sum = 0.0;
    for (int y = 0; y < N; y += 8)
      for (int x = 0; x < N; x += 8) sum += region_entropy(img, y, x, 8, 8);
    return sum / real'((N / 8) * (N / 8));
  endfunction

  function automatic void make_ops(input image_t img, ref mm_op_t ops [$]);
    int wx [3][3] = '{'{-1, 0, 1}, '{-2, 0, 2}, '{-1, 0, 1}};
    ops.delete();
    for (int y = 1; y < N - 1; y++)
      for (int x = 1; x < N - 1; x++)
        for (int j = -1; j <= 1; j++)
          for (int i = -1; i <= 1; i++) begin
            ops.push_back('{0, 64'(img[y+j][x+i]), 64'(longint'(wx[j+1][i+1]))});
            ops.push_back('{1, $realtobits(real'(img[y+j][x+i])),
                              $realtobits(real'(wx[i+1][j+1]) / 4.0)});
          end
    for (int y = 1; y < N - 1; y++)
      for (int x = 1; x < N - 1; x++) begin
        int sum;
        sum = 0;
        for (int j = -1; j <= 1; j++)
          for (int i = -1; i <= 1; i++) begin
            sum += img[y+j][x+i];
            ops.push_back('{1, $realtobits(real'(img[y+j][x+i])),
                              $realtobits(real'(img[y+j][x+i]))});
          end
        ops.push_back('{2, $realtobits(real'(sum)), $realtobits(9.0)});
        ops.push_back('{2, $realtobits(real'(img[y][x])), $realtobits(real'(sum) / 9.0)});
      end
    for (int y = 0; y < N - 1; y++)
      for (int x = 0; x < N - 1; x++)
        ops.push_back('{2, $realtobits(real'(img[y+1][x] - img[y][x])),
                          $realtobits(real'(img[y][x+1] - img[y][x] + 1))});
  endfunction

endpackage
