// Self-checking testbench for hue_threshold_stage.
//
// Four instances are run side by side on one random hue stream with a random
// sample enable: the lower stage (keep if > 608) and the upper stage (keep if
// < 832), each in the drawn timing (ALIGN = 0) and in the aligned timing
// (ALIGN = 1). The expected output is worked out from the list of accepted
// samples x[0..k-1] (x[-1] = 0, the reset content of the delay register):
//   ALIGN = 0: dout = keep(x[k-2]) ? x[k-1] : 0
//   ALIGN = 1: dout = keep(x[k-1]) ? x[k-1] : 0
// and 0 directly after reset. This checks the latency of one accepted sample
// and that nothing moves while ce is low. The stream includes the threshold
// codes themselves and their neighbours, since the comparisons are strict.
module tb_hue_threshold_stage;
  import hw_seg_pkg::*;

  localparam int N_SAMPLES = 4000;
  localparam logic [9:0] T_LO = 10'd608;
  localparam logic [9:0] T_HI = 10'd832;

  logic clk = 1'b0;
  logic rst, ce;
  pix_t din;
  pix_t q_gt0, q_gt1, q_lt0, q_lt1;

  int checks = 0, failures = 0;
  int n_stall = 0, n_kept_gt = 0, n_rej_gt = 0, n_kept_lt = 0, n_rej_lt = 0;
  logic [9:0] hist[$];

  hue_threshold_stage #(.CMP(CMP_GT), .THRESH(T_LO), .ALIGN(1'b0)) u_gt0 (.clk, .rst, .ce, .din, .dout(q_gt0));
  hue_threshold_stage #(.CMP(CMP_GT), .THRESH(T_LO), .ALIGN(1'b1)) u_gt1 (.clk, .rst, .ce, .din, .dout(q_gt1));
  hue_threshold_stage #(.CMP(CMP_LT), .THRESH(T_HI), .ALIGN(1'b0)) u_lt0 (.clk, .rst, .ce, .din, .dout(q_lt0));
  hue_threshold_stage #(.CMP(CMP_LT), .THRESH(T_HI), .ALIGN(1'b1)) u_lt1 (.clk, .rst, .ce, .din, .dout(q_lt1));

  always #5 clk = ~clk;

  function automatic logic [9:0] at(int idx);
    return (idx < 0) ? 10'd0 : hist[idx];
  endfunction

  task automatic check_one(string tag, pix_t got, logic [9:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s after %0d samples: dout=%0d expected %0d", tag, hist.size(), got, exp);
    end
  endtask

  task automatic check_all();
    int k;
    logic [9:0] e_gt0, e_gt1, e_lt0, e_lt1;
    k = hist.size();
    if (k == 0) begin
      e_gt0 = 0; e_gt1 = 0; e_lt0 = 0; e_lt1 = 0;
    end else begin
      e_gt0 = (at(k-2) > T_LO) ? at(k-1) : 10'd0;
      e_lt0 = (at(k-2) < T_HI) ? at(k-1) : 10'd0;
      e_gt1 = (at(k-1) > T_LO) ? at(k-1) : 10'd0;
      e_lt1 = (at(k-1) < T_HI) ? at(k-1) : 10'd0;
      if (at(k-1) > T_LO) n_kept_gt++; else n_rej_gt++;
      if (at(k-1) < T_HI) n_kept_lt++; else n_rej_lt++;
    end
    check_one("gt/drawn",   q_gt0, e_gt0);
    check_one("gt/aligned", q_gt1, e_gt1);
    check_one("lt/drawn",   q_lt0, e_lt0);
    check_one("lt/aligned", q_lt1, e_lt1);
  endtask

  function automatic logic [9:0] pick_hue();
    case ($urandom_range(0, 7))
      0: return T_LO;
      1: return T_LO + 10'd1;
      2: return T_HI;
      3: return T_HI - 10'd1;
      default: return 10'($urandom);
    endcase
  endfunction

  initial begin
    repeat (20 * N_SAMPLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; ce = 1'b0; din = 10'd900;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    #1 check_all();
    while (hist.size() < N_SAMPLES) begin
      @(negedge clk);
      ce  = ($urandom_range(0, 3) != 0);
      din = pick_hue();
      @(posedge clk);
      if (ce) hist.push_back(din); else n_stall++;
      #1 check_all();
    end
    // Reset in the middle of a stream returns every stage to 0.
    @(negedge clk); rst = 1'b1; ce = 1'b1; din = 10'd700;
    @(posedge clk); #1;
    hist.delete();
    check_all();
    rst = 1'b0;
    if (n_stall == 0 || n_kept_gt == 0 || n_rej_gt == 0 || n_kept_lt == 0 || n_rej_lt == 0) begin
      failures++;
      $display("FAIL a case was never exercised");
    end
    $display("stalls %0d, gt kept/rejected %0d/%0d, lt kept/rejected %0d/%0d",
             n_stall, n_kept_gt, n_rej_gt, n_kept_lt, n_rej_lt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
