// Self-checking testbench for apply_seg, the merge of the hue mask with S and V.
//
// Drives boundary codes and random codes on a, b, c and compares e, f with
// the expected rule: a non-zero hue keeps saturation and value, a zero hue
// gives white (saturation 0, value 1023). The block is combinational, so
// every check is made one time step after the inputs change.
module tb_apply_seg;
  import hw_seg_pkg::*;

  pix_t a, b, c, e, f;
  int checks = 0, failures = 0;
  int n_blast = 0, n_background = 0;

  apply_seg dut (.a, .b, .c, .e, .f);

  task automatic apply_and_check(pix_t ta, pix_t tb_, pix_t tc);
    logic [9:0] exp_e, exp_f;
    a = ta; b = tb_; c = tc;
    #1;
    if (ta == 10'd0) begin
      exp_e = 10'd0;   exp_f = 10'd1023;   n_background++;
    end else begin
      exp_e = tb_;     exp_f = tc;         n_blast++;
    end
    checks++;
    if (e !== exp_e || f !== exp_f) begin
      failures++;
      $display("FAIL a=%0d b=%0d c=%0d: e=%0d f=%0d, expected e=%0d f=%0d",
               ta, tb_, tc, e, f, exp_e, exp_f);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply_and_check(10'd0,    10'd0,    10'd0);
    apply_and_check(10'd0,    10'd1023, 10'd1023);
    apply_and_check(10'd0,    10'd345,  10'd12);
    apply_and_check(10'd1,    10'd345,  10'd12);
    apply_and_check(10'd1023, 10'd0,    10'd0);
    apply_and_check(10'd700,  10'd1023, 10'd1);
    for (int i = 0; i < 2000; i++) begin
      // Half of the samples with a = 0 so both branches get plenty of cases.
      apply_and_check((i % 2 == 0) ? 10'd0 : 10'($urandom_range(1, 1023)),
                      10'($urandom), 10'($urandom));
    end
    if (n_blast == 0 || n_background == 0) begin
      failures++;
      $display("FAIL a branch was never exercised");
    end
    $display("blast pixels %0d, background pixels %0d", n_blast, n_background);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
