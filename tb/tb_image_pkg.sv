// Synthetic stained blood-smear picture for the segmentation testbenches.
//
// Each pixel's H, S, V (10-bit fractions) is a pure function of its row and
// column, so every testbench can regenerate the same picture without a data
// file. The picture has the three kinds of region a smear shows:
//   - one large blast nucleus (an ellipse) with blue-violet hue codes
//     666..799 (0.65..0.78), inside the kept band (608, 832);
//   - several red cells (discs) with pink hue codes 952..1013, above the band;
//   - pale background with hue codes 82..164, below the band.
// On top of that about one pixel in 97 carries one of the codes 608, 609,
// 831, 832, so the strict ends of the band are exercised.
package tb_image_pkg;

  function automatic int unsigned mix(int unsigned r, int unsigned c, int unsigned salt);
    int unsigned x;
    x = (r * 32'd40503) ^ (c * 32'd2654435761) ^ (salt * 32'd97);
    x = x ^ (x >> 15);
    x = x * 32'h2c1b3c6d;
    x = x ^ (x >> 12);
    return x;
  endfunction

  // Inside the nucleus ellipse centred at (0.5 h, 0.47 w).
  function automatic bit in_nucleus(int r, int c, int rows, int cols);
    int dr, dc, ar, ac;
    dr = r - rows / 2;
    dc = c - (cols * 47) / 100;
    ar = (rows * 27) / 100 + 1;
    ac = (cols * 23) / 100 + 1;
    return (dr * dr * ac * ac + dc * dc * ar * ar) <= (ar * ar * ac * ac);
  endfunction

  function automatic bit in_red_cell(int r, int c, int rows, int cols);
    int cr[5] = '{12, 85, 15, 88, 50};   // centres in percent of the size
    int cc[5] = '{15, 12, 85, 88, 95};
    int rad, dr, dc;
    rad = (rows < cols ? rows : cols) / 7 + 1;
    for (int i = 0; i < 5; i++) begin
      dr = r - (rows * cr[i]) / 100;
      dc = c - (cols * cc[i]) / 100;
      if (dr * dr + dc * dc <= rad * rad) return 1'b1;
    end
    return 1'b0;
  endfunction

  function automatic logic [9:0] gen_h(int r, int c, int rows, int cols);
    int unsigned m;
    m = mix(r, c, 1);
    if ((r * 7 + c * 13) % 97 == 0) begin
      case (m % 4)
        0: return 10'd608;
        1: return 10'd609;
        2: return 10'd831;
        default: return 10'd832;
      endcase
    end
    if (in_nucleus(r, c, rows, cols)) return 10'(666 + m % 134);
    if (in_red_cell(r, c, rows, cols)) return 10'(952 + m % 62);
    return 10'(82 + m % 83);
  endfunction

  function automatic logic [9:0] gen_s(int r, int c);
    return 10'(mix(r, c, 2) % 1024);
  endfunction

  // Value never all ones, so a white output pixel is told from a kept one.
  function automatic logic [9:0] gen_v(int r, int c);
    return 10'(mix(r, c, 3) % 1023);
  endfunction

endpackage
