// sobel_ref_pkg: reference model and test images for the Sobel testbenches.
//
// ref_gx/ref_gy compute the Sobel gradients of a 3x3 window given row-major as nine
// integers (index 4 is the centre), written directly from the kernels
//     Gx = [-1 0 1; -2 0 2; -1 0 1]    Gy = [-1 -2 -1; 0 0 0; 1 2 1]
// independently of the RTL. test_pixel generates the test images procedurally so no
// image files are needed: kind 0 is uniform noise, kind 1 smooth shading with a bright
// rectangle and a dark disc, kind 2 a digit-like stroke pattern (seed selects the
// digit 0..9) on a noisy background.
package sobel_ref_pkg;
  function automatic int ref_gx(input int p[9]);
    return -p[0] + p[2] - 2*p[3] + 2*p[5] - p[6] + p[8];
  endfunction

  function automatic int ref_gy(input int p[9]);
    return -p[0] - 2*p[1] - p[2] + p[6] + 2*p[7] + p[8];
  endfunction

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  function automatic int ref_mag(input int p[9]);
    return iabs(ref_gx(p)) + iabs(ref_gy(p));
  endfunction

  function automatic int ref_edge(input int p[9], input int thr);
    return ref_mag(p) > thr ? 255 : 0;
  endfunction

  // Small deterministic hash, so the images do not depend on the simulator's RNG.
  function automatic int unsigned hash3(input int unsigned a, b, c);
    int unsigned h;
    h = a * 32'h9E3779B1 ^ b * 32'h85EBCA77 ^ c * 32'hC2B2AE3D;
    h ^= h >> 15; h *= 32'h2C1B3C6D; h ^= h >> 12; h *= 32'h297A2D39; h ^= h >> 15;
    return h;
  endfunction

  function automatic int test_pixel(input int kind, input int seed, input int r, input int c,
                                    input int w, input int h);
    int v, dr, dc, cr, cc, rad;
    case (kind)
      0: return int'(hash3(seed, r, c) & 32'hFF);
      1: begin
        v = (r * 160) / h + (c * 60) / w;                 // shading
        if (r > h/5 && r < h/2 && c > w/6 && c < w/2) v = 240;   // bright rectangle
        cr = (2*h)/3; cc = (2*w)/3; rad = (w < h ? w : h) / 6 + 1;
        dr = r - cr; dc = c - cc;
        if (dr*dr + dc*dc < rad*rad) v = 20;              // dark disc
        v += int'(hash3(seed, r, c) % 7) - 3;
        return v < 0 ? 0 : (v > 255 ? 255 : v);
      end
      default: begin
        // digit-like strokes on a 5x7 grid scaled to the image
        int gr, gc, bits;
        int font[10] = '{32'h0EE8C63A, 32'h04C4210E, 32'h0E88899F, 32'h1F11062E,
                         32'h0232A7C2, 32'h1F87843E, 32'h0743D16E, 32'h1F111084,
                         32'h0E8B9A2E, 32'h0E8BC22C};
        gr = (r * 7) / h; gc = (c * 5) / w;
        bits = font[seed % 10];
        v = 30 + int'(hash3(seed, r, c) % 16);
        if (((bits >> (gr*5 + gc)) & 1) != 0) v = 200 + int'(hash3(seed, c, r) % 40);
        return v;
      end
    endcase
  endfunction
endpackage
