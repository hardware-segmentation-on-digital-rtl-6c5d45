// End-to-end testbench of hw_seg in its exact variant (ALIGN = 1) on one
// whole 257 x 257 picture (66,049 samples, the frame size of the reference
// run of the published model; its image set is otherwise 256 x 256).
//
// In this variant all three outputs are registered and belong to the same
// pixel, two accepted samples after it went in. The testbench streams the
// picture with a random sample enable, then one flush sample, and after
// every accepted sample k >= 2 compares the outputs with the ideal verdict on
// pixel k-2: kept when 608 < H < 832 (S and V unchanged), white otherwise
// (S = 0, V = 1023), H always unchanged. While ce is low the outputs must
// not move. It also resets the core in mid-picture once and checks that the
// outputs return to white and that streaming then resumes with the same
// two-sample latency. Kept, rejected-below, rejected-above, on-threshold and
// stalled cases are counted and must all occur.
module tb_hw_seg_aligned;
  import hw_seg_pkg::*;
  import tb_image_pkg::*;

  localparam int ROWS = 257;
  localparam int COLS = 257;
  localparam int N    = ROWS * COLS;
  localparam int LAT  = 2;
  localparam logic [9:0] T1 = 10'd608;
  localparam logic [9:0] T2 = 10'd832;

  logic clk = 1'b0;
  logic rst, ce;
  pix_t h_in, s_in, v_in, h_out, s_out, v_out;

  int checks = 0, failures = 0;
  int n_kept = 0, n_below = 0, n_above = 0, n_on_threshold = 0, n_stall = 0, n_reset = 0;

  hw_seg #(.ALIGN(1'b1)) dut (
    .clk, .rst, .ce,
    .gateway_in(h_in), .gateway_in1(s_in), .gateway_in2(v_in),
    .gateway_out(h_out), .gateway_out1(s_out), .gateway_out2(v_out)
  );

  always #5 clk = ~clk;

  task automatic expect_out(string tag, logic [9:0] eh, logic [9:0] es, logic [9:0] ev);
    checks++;
    if (h_out !== eh || s_out !== es || v_out !== ev) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: out H/S/V = %0d/%0d/%0d, expected %0d/%0d/%0d",
                 tag, h_out, s_out, v_out, eh, es, ev);
    end
  endtask

  task automatic expect_pixel(int p);
    logic [9:0] h, s, v;
    int r, c;
    bit keep;
    r = p / COLS; c = p % COLS;
    h = gen_h(r, c, ROWS, COLS); s = gen_s(r, c); v = gen_v(r, c);
    keep = (h > T1) && (h < T2);
    expect_out($sformatf("pixel %0d", p), h, keep ? s : 10'd0, keep ? v : 10'd1023);
  endtask

  // Runs pixels first..last, then LAT - 1 flush samples, through the core.
  // After k accepted samples the outputs hold pixel first + k - LAT.
  task automatic stream(int first, int last);
    int k;          // samples accepted in this run
    int total;
    int r, c;
    total = last - first + LAT;
    k = 0;
    while (k < total) begin
      @(negedge clk);
      if (first + k <= last) begin
        r = (first + k) / COLS; c = (first + k) % COLS;
        h_in = gen_h(r, c, ROWS, COLS); s_in = gen_s(r, c); v_in = gen_v(r, c);
      end else begin
        h_in = 10'($urandom); s_in = 10'($urandom); v_in = 10'($urandom);
      end
      ce = ($urandom_range(0, 4) != 0);
      @(posedge clk);
      #1;
      if (ce) begin
        k++;
        if (k >= LAT) begin
          expect_pixel(first + k - LAT);
          if (h_out > T1 && h_out < T2) n_kept++;
          else if (h_out <= T1) n_below++;
          else n_above++;
          if (h_out == T1 || h_out == T2) n_on_threshold++;
        end
      end else begin
        n_stall++;
        if (k >= LAT) expect_pixel(first + k - LAT);
      end
    end
  endtask

  initial begin
    repeat (4 * N + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; ce = 1'b0; h_in = '0; s_in = '0; v_in = '0;
    repeat (3) @(posedge clk);
    #1 expect_out("after reset", 10'd0, 10'd0, 10'd1023);
    @(negedge clk);
    rst = 1'b0;

    // First part of the picture, then a reset in mid-stream.
    stream(0, N / 3 - 1);
    @(negedge clk);
    rst = 1'b1; ce = 1'b1;
    @(posedge clk);
    #1 expect_out("mid-picture reset", 10'd0, 10'd0, 10'd1023);
    n_reset++;
    @(negedge clk);
    rst = 1'b0;
    stream(N / 3, N - 1);

    checks++;
    if (n_kept == 0 || n_below == 0 || n_above == 0 || n_on_threshold == 0 ||
        n_stall == 0 || n_reset == 0) begin
      failures++;
      $display("FAIL a case was never exercised");
    end
    $display("kept %0d, below A1 %0d, above A2 %0d, on a threshold %0d, stalls %0d, resets %0d",
             n_kept, n_below, n_above, n_on_threshold, n_stall, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
