// tb_fisa_unit: exhaustive check of the FISA demultiplexer for 1, 3 and 6
// faults: every select code with fis = 1 and fis = 0. Code 0 and codes above
// N_FAULTS must give no enable, code k exactly f[k-1] = fis.
module tb_fisa_unit;
  int checks = 0, failures = 0;

  logic       fis;
  logic [0:0] sel1;  logic [0:0] f1;
  logic [1:0] sel3;  logic [2:0] f3;
  logic [2:0] sel6;  logic [5:0] f6;

  fisa_unit #(.N_FAULTS(1)) u1 (.fis(fis), .select(sel1), .f(f1));
  fisa_unit #(.N_FAULTS(3)) u3 (.fis(fis), .select(sel3), .f(f3));
  fisa_unit #(.N_FAULTS(6)) u6 (.fis(fis), .select(sel6), .f(f6));

  function automatic logic [7:0] expect_f(input int code, input int n, input logic en);
    logic [7:0] r = '0;
    if (code >= 1 && code <= n) r[code-1] = en;
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      fis = logic'(e);
      for (int code = 0; code < 8; code++) begin
        sel1 = 1'(code); sel3 = 2'(code); sel6 = 3'(code);
        #1;
        if (code < 2) begin
          checks++;
          if (f1 !== 1'(expect_f(code, 1, fis))) begin
            failures++; $display("FAIL N=1 sel=%0d fis=%b f=%b", code, fis, f1);
          end
        end
        if (code < 4) begin
          checks++;
          if (f3 !== 3'(expect_f(code, 3, fis))) begin
            failures++; $display("FAIL N=3 sel=%0d fis=%b f=%b", code, fis, f3);
          end
        end
        checks++;
        if (f6 !== 6'(expect_f(code, 6, fis))) begin
          failures++; $display("FAIL N=6 sel=%0d fis=%b f=%b", code, fis, f6);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
