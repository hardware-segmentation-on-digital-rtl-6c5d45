// One level of the multilevel hue threshold: a Delay register, a registered
// Relational comparator against a constant, and a 2:1 Mux whose other input
// is the constant 0.
//
// The stage passes a hue sample through unchanged when it lies on the kept
// side of the threshold and replaces it with 0 otherwise. Two stages in a
// row (CMP_GT against A1, then CMP_LT against A2) keep only hues inside the
// open band (A1, A2); every other pixel leaves as 0, which downstream logic
// reads as "background".
//
// Interface: one sample enters on din in each cycle where ce is high; the
// registers hold while ce is low. dout is driven straight from the two
// registers (no logic between the Mux and the output other than the Mux).
// rst clears both registers synchronously, which makes dout 0.
//
// Timing: latency one accepted sample. The parameter ALIGN picks what the
// comparator looks at:
//   ALIGN = 0  the comparator reads the Delay register's output, as the
//              stage is drawn in the document. Its own one-cycle latency then
//              makes the select lag the data by one sample: the sample on
//              dout is kept or zeroed by the verdict on the sample before it.
//   ALIGN = 1  the comparator reads din, so the verdict and the sample
//              arrive at the Mux together and each pixel is judged on its own
//              hue. This is this design's own variant; it uses the same
//              registers (PIX_W + 1 flip-flops).
// The threshold value, the comparison sense, the zero constant and the
// register/Mux arrangement follow the document; the reset and ALIGN = 1 are
// this design's additions.
module hue_threshold_stage
  import hw_seg_pkg::pix_t, hw_seg_pkg::cmp_e, hw_seg_pkg::CMP_GT, hw_seg_pkg::CMP_LT,
         hw_seg_pkg::A1_CODE;
#(
  parameter cmp_e CMP    = CMP_GT,
  parameter pix_t THRESH = A1_CODE,
  parameter bit   ALIGN  = 1'b0
) (
  input  logic clk,
  input  logic rst,
  input  logic ce,
  input  pix_t din,
  output pix_t dout
);

  pix_t data_q;   // Delay block
  logic keep_q;   // Relational block's output register
  pix_t cmp_a;    // comparator operand "a"
  logic keep_d;

  assign cmp_a = ALIGN ? din : data_q;

  always_comb begin
    unique case (CMP)
      CMP_GT:  keep_d = (cmp_a > THRESH);
      CMP_LT:  keep_d = (cmp_a < THRESH);
      default: keep_d = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      data_q <= '0;
      keep_q <= 1'b0;
    end else if (ce) begin
      data_q <= din;
      keep_q <= keep_d;
    end
  end

  // Mux: sel = 1 selects the delayed sample (d1), sel = 0 the constant 0 (d0).
  assign dout = keep_q ? data_q : '0;

endmodule
