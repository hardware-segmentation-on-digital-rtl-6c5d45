// Shared types and constants of the hue-band segmentation core.
//
// Every pixel channel (H, S, V) crosses the chip boundary as a 10-bit
// unsigned fixed-point fraction: bit 9 weighs 1/2, bit 0 weighs 1/1024, so the
// code c stands for c/1024 and the range is [0, 1023/1024]. The 10-bit port
// width is the document's (bus ranges 9:0 on the ports of the synthesized
// wrapper, and 61 I/O pads = 6 x 10 data pins + clock); placing the binary
// point above bit 9 is this design's choice, made because the hue, saturation
// and value coming out of the colour-space conversion all lie in [0, 1].
//
// The two hue thresholds are the document's numbers, A1 = 0.59375 (19/32)
// and A2 = 0.8125 (13/16); both are exact in this format.
package hw_seg_pkg;

  localparam int unsigned PIX_W = 10;          // bits per channel

  typedef logic [PIX_W-1:0] pix_t;

  // Thresholds as fixed-point codes: round(value * 2**PIX_W), binary point above the MSB.
  localparam pix_t A1_CODE = pix_t'(608);      // 0.59375 * 1024
  localparam pix_t A2_CODE = pix_t'(832);      // 0.8125  * 1024

  // Largest code: the nearest this format comes to 1.0 (full brightness).
  localparam pix_t PIX_MAX = '1;

  // Comparison done by a threshold stage (the "Relational" block).
  typedef enum logic {
    CMP_GT = 1'b0,   // keep the pixel when a > b  (lower threshold, A1)
    CMP_LT = 1'b1    // keep the pixel when a < b  (upper threshold, A2)
  } cmp_e;

  // One HSV pixel.
  typedef struct packed {
    pix_t h;
    pix_t s;
    pix_t v;
  } hsv_t;

endpackage
