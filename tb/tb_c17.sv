// tb_c17: exhaustive check of the golden c17 circuit against its truth table
// and against the reference model. 64 checks, no clock.
module tb_c17;
  import sfs_pkg::*;
  import sfs_ref_pkg::*;

  int checks = 0, failures = 0;
  tv_t   tv;
  resp_t resp;

  c17 dut (.tv(tv), .resp(resp));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      tv = tv_t'(v);
      #1;
      checks++;
      if (resp !== golden(tv)) begin
        failures++;
        $display("FAIL tv=%0d resp=%b expected %b", v, resp, golden(tv));
      end
      checks++;
      if (resp !== ref_resp(tv, -1, 0)) begin
        failures++;
        $display("FAIL tv=%0d resp=%b reference %b", v, resp, ref_resp(tv, -1, 0));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
