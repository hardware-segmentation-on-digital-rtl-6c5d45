// Hue-band segmentation core for stained blood-smear images.
//
// The picture arrives as a raster stream of HSV pixels, one per accepted
// sample, each channel a 10-bit fraction (see hw_seg_pkg). A blast
// (leukaemic white cell) is told from the background by its hue alone: a
// pixel whose hue lies strictly between A1 = 0.59375 and A2 = 0.8125 (the
// blue-violet of a stained nucleus) is kept with its own colour; every
// other pixel is replaced by white. The hue test is done by two
// hue_threshold_stage instances in series (keep if H > A1, then keep if
// H < A2); apply_seg then forces saturation to 0 and value to full scale
// wherever the band-passed hue came out 0.
//
// Ports follow the synthesized wrapper of the document: gateway_in,
// gateway_in1, gateway_in2 carry H, S, V in; gateway_out, gateway_out1,
// gateway_out2 carry H, S, V out. ce is the sample enable: every register
// advances only on a clock edge with ce high, and one pixel is taken per
// such edge. rst (synchronous, active high) is this design's addition and
// clears the pipeline to "background".
//
// Timing, chosen by ALIGN:
//   ALIGN = 0 (default) is the circuit as the document draws it, 22
//     flip-flops. H is looped straight from gateway_in to gateway_out and S,
//     V go through apply_seg without delay, so outputs e and f combine the
//     pixel now at the inputs with a hue mask computed from earlier pixels:
//     after k accepted samples the mask applied to pixel k is
//       band_k = lt(y[k-1]) ? y[k] : 0,  y[j] = gt(H[j-1]) ? H[j] : 0,
//     i.e. it trails the pixel by roughly two positions along the row. For
//     images of smooth regions the result is the segmented picture moved by
//     about two pixels at region edges.
//   ALIGN = 1 is this design's exact variant: each stage judges every pixel
//     on its own hue and H, S, V pass through 2-sample delay lines, so all
//     three outputs belong to the same pixel, registered, with a latency of
//     exactly 2 accepted samples. It adds 3 x 2 x 10 flip-flops.
module hw_seg
  import hw_seg_pkg::pix_t, hw_seg_pkg::hsv_t, hw_seg_pkg::A1_CODE, hw_seg_pkg::A2_CODE,
         hw_seg_pkg::CMP_GT, hw_seg_pkg::CMP_LT;
#(
  parameter pix_t A1    = A1_CODE,   // lower hue threshold (exclusive)
  parameter pix_t A2    = A2_CODE,   // upper hue threshold (exclusive)
  parameter bit   ALIGN = 1'b0
) (
  input  logic clk,
  input  logic rst,
  input  logic ce,
  input  pix_t gateway_in,    // H
  input  pix_t gateway_in1,   // S
  input  pix_t gateway_in2,   // V
  output pix_t gateway_out,   // H
  output pix_t gateway_out1,  // S, white where background
  output pix_t gateway_out2   // V, white where background
);

  localparam int unsigned LAT = 2;   // accepted samples through the two stages

  pix_t h_lo;     // after the A1 stage (Mux)
  pix_t h_band;   // after the A2 stage (Mux1)
  pix_t h_side, s_side, v_side;

  hue_threshold_stage #(
    .CMP(CMP_GT), .THRESH(A1), .ALIGN(ALIGN)
  ) u_stage_a1 (
    .clk, .rst, .ce, .din(gateway_in), .dout(h_lo)
  );

  hue_threshold_stage #(
    .CMP(CMP_LT), .THRESH(A2), .ALIGN(ALIGN)
  ) u_stage_a2 (
    .clk, .rst, .ce, .din(h_lo), .dout(h_band)
  );

  if (ALIGN) begin : g_align
    // Delay lines that bring H, S and V level with the hue mask.
    hsv_t line_q [LAT];

    always_ff @(posedge clk) begin
      if (rst) begin
        for (int i = 0; i < LAT; i++) line_q[i] <= '0;
      end else if (ce) begin
        line_q[0] <= '{h: gateway_in, s: gateway_in1, v: gateway_in2};
        for (int i = 1; i < LAT; i++) line_q[i] <= line_q[i-1];
      end
    end

    assign h_side = line_q[LAT-1].h;
    assign s_side = line_q[LAT-1].s;
    assign v_side = line_q[LAT-1].v;
  end else begin : g_direct
    assign h_side = gateway_in;
    assign s_side = gateway_in1;
    assign v_side = gateway_in2;
  end

  apply_seg u_apply_seg (
    .a(h_band), .b(s_side), .c(v_side), .e(gateway_out1), .f(gateway_out2)
  );

  assign gateway_out = h_side;

endmodule
