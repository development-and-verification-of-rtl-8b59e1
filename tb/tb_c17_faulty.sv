// tb_c17_faulty: checks instrumented c17 copies over all 32 test vectors.
//  * 36 single-fault copies (12 sites x bit-flip / stuck-at-0 / stuck-at-1):
//    with select = 0 each must equal the golden truth table; with select = 1
//    each must equal the reference model with that pin faulted, and for
//    bit-flip the mismatch pattern must equal the published dictionary row.
//  * a copy holding sites f6..f8 (bit-flip, 2-bit select): code k activates
//    the k-th of them, code 0 none.
//  * a copy holding all twelve sites (stuck-at-1, 4-bit select): codes 1..12
//    activate f1..f12, codes 0 and 13..15 none.
module tb_c17_faulty;
  import sfs_pkg::*;
  import sfs_ref_pkg::*;

  int checks = 0, failures = 0;

  tv_t        tv;
  logic [0:0] sel1;
  logic [1:0] sel3;
  logic [3:0] sel12;
  resp_t      r_bf [12];
  resp_t      r_s0 [12];
  resp_t      r_s1 [12];
  resp_t      r_grp, r_all;

  for (genvar s = 0; s < 12; s++) begin : g_single
    c17_faulty #(.FAULT_SITES(site_mask_t'(1) << s), .FAULT_MODEL(FM_BIT_FLIP))
      u_bf (.select(sel1), .tv(tv), .resp(r_bf[s]));
    c17_faulty #(.FAULT_SITES(site_mask_t'(1) << s), .FAULT_MODEL(FM_STUCK_AT_0))
      u_s0 (.select(sel1), .tv(tv), .resp(r_s0[s]));
    c17_faulty #(.FAULT_SITES(site_mask_t'(1) << s), .FAULT_MODEL(FM_STUCK_AT_1))
      u_s1 (.select(sel1), .tv(tv), .resp(r_s1[s]));
  end

  c17_faulty #(.FAULT_SITES(12'h0E0), .FAULT_MODEL(FM_BIT_FLIP))
    u_grp (.select(sel3), .tv(tv), .resp(r_grp));
  c17_faulty #(.FAULT_SITES(12'hFFF), .FAULT_MODEL(FM_STUCK_AT_1))
    u_all (.select(sel12), .tv(tv), .resp(r_all));

  task automatic check(input string what, input resp_t got, input resp_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s tv=%0d sel1=%0d sel3=%0d sel12=%0d: got %b expected %b",
               what, tv, sel1, sel3, sel12, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      tv = tv_t'(v);
      // all faults off
      sel1 = 1'b0; sel3 = 2'd0; sel12 = 4'd0; #1;
      for (int s = 0; s < 12; s++) begin
        check("bf off", r_bf[s], golden(tv));
        check("s0 off", r_s0[s], golden(tv));
        check("s1 off", r_s1[s], golden(tv));
      end
      check("grp off", r_grp, golden(tv));
      check("all off", r_all, golden(tv));
      // single-fault copies on
      sel1 = 1'b1; #1;
      for (int s = 0; s < 12; s++) begin
        check("bf on", r_bf[s], ref_resp(tv, s, 0));
        check("s0 on", r_s0[s], ref_resp(tv, s, 1));
        check("s1 on", r_s1[s], ref_resp(tv, s, 2));
        checks++;
        if ((r_bf[s] != golden(tv)) !== BITFLIP_DICT[s][v]) begin
          failures++;
          $display("FAIL dictionary f%0d tv=%0d", s + 1, v);
        end
      end
      // grouped copy: sites 5, 6, 7
      for (int k = 1; k < 4; k++) begin
        sel3 = 2'(k); #1;
        check("grp on", r_grp, ref_resp(tv, 4 + k, 0));
      end
      // all-sites copy
      for (int k = 1; k < 16; k++) begin
        sel12 = 4'(k); #1;
        check("all", r_all, (k <= 12) ? ref_resp(tv, k - 1, 2) : golden(tv));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
