// End-to-end testbench of hw_seg at its default parameters: one whole
// 256 x 256 picture, as in the document's image set.
//
// The picture (tb_image_pkg) is streamed in raster order, one pixel per
// accepted sample, with the sample enable ce dropped at random on about one
// cycle in five. In every cycle, stalled or not, the three outputs are
// compared with a model of the circuit as drawn (ALIGN = 0), worked out from
// the pixel list alone. With k samples accepted so far and pixel k on the
// inputs:
//   y(m)  = (m >= 2 && H[m-2] > A1) ? H[m-1] : 0          (first stage, y(0) = 0)
//   z(k)  = k == 0 ? 0 : (y(k-2) < A2 ? y(k-1) : 0)        (second stage, y(-1) = 0)
//   out   = { H[k], z(k) != 0 ? S[k] : 0, z(k) != 0 ? V[k] : 1023 }
// The accepted outputs are gathered into an output picture, as the host
// would, and compared with the ideal per-pixel segmentation only to report
// how many pixels the drawn timing moves.
//
// Every mechanism is counted and must occur: pixels kept, pixels rejected by
// the A1 stage, pixels rejected by the A2 stage, hues exactly on a
// threshold, and stalled cycles.
module tb_hw_seg;
  import hw_seg_pkg::*;
  import tb_image_pkg::*;

  localparam int ROWS = 256;
  localparam int COLS = 256;
  localparam int N    = ROWS * COLS;
  localparam logic [9:0] T1 = 10'd608;   // 0.59375
  localparam logic [9:0] T2 = 10'd832;   // 0.8125

  logic clk = 1'b0;
  logic rst, ce;
  pix_t h_in, s_in, v_in, h_out, s_out, v_out;

  logic [9:0] H[N], S[N], V[N];
  logic [9:0] y[N+1], z[N+1];
  logic [9:0] img_s[N], img_v[N];

  int checks = 0, failures = 0;
  int n_kept = 0, n_rej_a1 = 0, n_rej_a2 = 0, n_on_threshold = 0, n_stall = 0;
  int n_moved = 0;
  longint cycles = 0;

  hw_seg dut (
    .clk, .rst, .ce,
    .gateway_in(h_in), .gateway_in1(s_in), .gateway_in2(v_in),
    .gateway_out(h_out), .gateway_out1(s_out), .gateway_out2(v_out)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  function automatic logic [9:0] y_at(int m);
    return (m < 0) ? 10'd0 : y[m];
  endfunction

  initial begin
    repeat (3 * N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    logic [9:0] exp_s, exp_v;
    bit ideal;

    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        H[r*COLS+c] = gen_h(r, c, ROWS, COLS);
        S[r*COLS+c] = gen_s(r, c);
        V[r*COLS+c] = gen_v(r, c);
      end
    for (int m = 0; m <= N; m++)
      y[m] = (m >= 2 && H[m-2] > T1) ? H[m-1] : 10'd0;
    for (int m = 0; m <= N; m++)
      z[m] = (m == 0) ? 10'd0 : ((y_at(m-2) < T2) ? y[m-1] : 10'd0);

    rst = 1'b1; ce = 1'b0; h_in = '0; s_in = '0; v_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;

    k = 0;
    while (k < N) begin
      h_in = H[k]; s_in = S[k]; v_in = V[k];
      ce   = ($urandom_range(0, 4) != 0);
      #1;
      exp_s = (z[k] != 0) ? S[k] : 10'd0;
      exp_v = (z[k] != 0) ? V[k] : 10'd1023;
      checks++;
      if (h_out !== H[k] || s_out !== exp_s || v_out !== exp_v) begin
        failures++;
        if (failures < 20)
          $display("FAIL pixel %0d: out H/S/V = %0d/%0d/%0d, expected %0d/%0d/%0d",
                   k, h_out, s_out, v_out, H[k], exp_s, exp_v);
      end
      @(posedge clk);
      if (ce) begin
        img_s[k] = s_out;
        img_v[k] = v_out;
        if (z[k] != 0) n_kept++;
        else if (k >= 1 && y[k-1] == 0) n_rej_a1++;
        else n_rej_a2++;
        if (H[k] == T1 || H[k] == T2) n_on_threshold++;
        k++;
      end else begin
        n_stall++;
      end
      @(negedge clk);
    end

    // The gathered picture against the ideal per-pixel segmentation.
    for (int p = 0; p < N; p++) begin
      ideal = (H[p] > T1) && (H[p] < T2);
      if ((img_v[p] == 10'd1023 && img_s[p] == 10'd0) == ideal) n_moved++;
    end

    checks++;
    if (n_kept == 0)         begin failures++; $display("FAIL no pixel kept"); end
    checks++;
    if (n_rej_a1 == 0)       begin failures++; $display("FAIL A1 stage never rejected"); end
    checks++;
    if (n_rej_a2 == 0)       begin failures++; $display("FAIL A2 stage never rejected"); end
    checks++;
    if (n_on_threshold == 0) begin failures++; $display("FAIL no hue on a threshold"); end
    checks++;
    if (n_stall == 0)        begin failures++; $display("FAIL ce never low"); end
    checks++;
    if (cycles < longint'(N) + longint'(n_stall)) begin
      failures++; $display("FAIL %0d cycles for %0d samples and %0d stalls", cycles, N, n_stall);
    end

    $display("%0d x %0d picture in %0d cycles: kept %0d, rejected by A1 %0d, by A2 %0d, on a threshold %0d, stalls %0d",
             ROWS, COLS, cycles, n_kept, n_rej_a1, n_rej_a2, n_on_threshold, n_stall);
    $display("pixels whose verdict differs from the ideal per-pixel segmentation: %0d", n_moved);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
