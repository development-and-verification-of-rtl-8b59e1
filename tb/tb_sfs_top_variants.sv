// tb_sfs_top_variants: the serial fault simulator in other configurations,
// each checked against the reference model:
//   * 3 faults per copy (4 copies), bit-flip: must reproduce the published
//     dictionary with a multi-fault FISA select;
//   * 5 faults per copy (copies of 5, 5 and 2 faults), stuck-at-0;
//   * all 12 faults in one copy, stuck-at-1: plain serial fault simulation,
//     one fault active at a time in a single faulty circuit.
module tb_sfs_top_variants;
  import sfs_pkg::*;

  logic clk = 0, rst_n = 0;
  int   c [3], f [3], later [3];
  logic fin [3];

  sfs_top_runner #(.K(3),  .MODEL(FM_BIT_FLIP))   r0 (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .n_later_faults(later[0]), .finished(fin[0]));
  sfs_top_runner #(.K(5),  .MODEL(FM_STUCK_AT_0)) r1 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .n_later_faults(later[1]), .finished(fin[1]));
  sfs_top_runner #(.K(12), .MODEL(FM_STUCK_AT_1)) r2 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .n_later_faults(later[2]), .finished(fin[2]));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end

  initial begin
    int checks, failures;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (fin[0] && fin[1] && fin[2]);
    checks   = c[0] + c[1] + c[2] + 3;
    failures = f[0] + f[1] + f[2];
    for (int i = 0; i < 3; i++)
      if (later[i] == 0) begin
        failures++;
        $display("FAIL runner %0d never activated a copy's later fault", i);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
