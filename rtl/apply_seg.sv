// Merge of the hue mask with the saturation and value channels.
//
// Input a is the output of the two-level hue threshold: a band-passed hue,
// or 0 for a pixel outside the band. Inputs b and c are the pixel's
// saturation and value. A pixel whose a is non-zero is a blast pixel and
// keeps its saturation and value (e = b, f = c). A pixel whose a is 0 is
// background and is painted white: saturation 0 and the largest value code
// (e = 0, f = all ones). With the hue passed through unchanged next to e and
// f, the reconstructed picture shows the blasts in their own colours on a
// white ground.
//
// Purely combinational, no clock. The document names this block and its
// ports (a, b, c in; e, f out) and shows a white background in the result;
// the rule above is this design's reading of it. Using "a is non-zero" as
// the mask is exact because the lower threshold A1 is above 0, so no kept
// hue can be 0.
module apply_seg
  import hw_seg_pkg::pix_t, hw_seg_pkg::PIX_MAX;
(
  input  pix_t a,   // thresholded hue (0 = background)
  input  pix_t b,   // saturation
  input  pix_t c,   // value
  output pix_t e,   // saturation out
  output pix_t f    // value out
);

  logic blast;

  assign blast = (a != '0);
  assign e     = blast ? b : '0;
  assign f     = blast ? c : PIX_MAX;

endmodule
