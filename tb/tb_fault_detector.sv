// tb_fault_detector: random streams of (valid, select, cmp) into two fault
// detectors, one fault per copy (12 copies) and five faults per copy (3
// copies holding 5, 5 and 2 faults). A reference model in the testbench
// predicts the memory write (mem_we, wmask, wdata), the sticky detected
// flags, F_D, the coverage percentage and the leak flag; clear is exercised.
module tb_fault_detector;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0;

  logic        valid_a, valid_b;
  logic [0:0]  sel_a;
  logic [2:0]  sel_b;
  logic [11:0] cmp_a;
  logic [2:0]  cmp_b;
  logic        we_a, we_b, leak_a, leak_b;
  logic [11:0] wm_a, wd_a, det_a, wm_b, wd_b, det_b;
  logic [3:0]  fd_a, fd_b;
  logic [6:0]  fc_a, fc_b;

  fault_detector #(.FAULTS_PER_COPY(1)) u_a (
    .clk, .rst_n, .clear, .valid(valid_a), .select(sel_a), .cmp(cmp_a),
    .mem_we(we_a), .wmask(wm_a), .wdata(wd_a), .detected(det_a),
    .fd_count(fd_a), .fc_percent(fc_a), .leak_err(leak_a));
  fault_detector #(.FAULTS_PER_COPY(5)) u_b (
    .clk, .rst_n, .clear, .valid(valid_b), .select(sel_b), .cmp(cmp_b),
    .mem_we(we_b), .wmask(wm_b), .wdata(wd_b), .detected(det_b),
    .fd_count(fd_b), .fc_percent(fc_b), .leak_err(leak_b));

  always #5 clk = ~clk;

  // reference: which faults a (select, cmp) pair reports on
  function automatic void model(input int k, input logic v, input int sel, input logic [11:0] cmp,
                                output logic [11:0] m, output logic [11:0] d);
    m = '0; d = '0;
    if (v && sel >= 1 && sel <= k)
      for (int c = 0; c * k < 12; c++)
        if (c * k + sel - 1 < 12) begin
          m[c * k + sel - 1] = 1'b1;
          d[c * k + sel - 1] = cmp[c];
        end
  endfunction

  logic [11:0] em_a, ed_a, em_b, ed_b, edet_a = 0, edet_b = 0;
  logic        eleak_a = 0, eleak_b = 0;

  task automatic ck(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    valid_a = 0; valid_b = 0; sel_a = 0; sel_b = 0; cmp_a = 0; cmp_b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      clear   = (i % 700 == 699);
      valid_a = ($urandom % 4) != 0;
      valid_b = ($urandom % 4) != 0;
      sel_a   = 1'($urandom);
      sel_b   = 3'($urandom % 7);
      // comparators fire rarely; while select is 0 almost never
      cmp_a   = 12'($urandom) & 12'($urandom) & 12'($urandom);
      cmp_b   = 3'($urandom) & 3'($urandom);
      if (sel_a == 0 && ($urandom % 50) != 0) cmp_a = 0;
      if (sel_b == 0 && ($urandom % 50) != 0) cmp_b = 0;
      #1;
      model(1, valid_a, int'(sel_a), cmp_a, em_a, ed_a);
      model(5, valid_b, int'(sel_b), 12'(cmp_b), em_b, ed_b);
      ck("a write", we_a == (valid_a && sel_a != 0) && wm_a == em_a && wd_a == ed_a);
      ck("b write", we_b == (valid_b && sel_b != 0) && wm_b == em_b && wd_b == ed_b);
      @(posedge clk);
      if (clear) begin
        edet_a = 0; edet_b = 0; eleak_a = 0; eleak_b = 0;
      end else begin
        edet_a |= em_a & ed_a;
        edet_b |= em_b & ed_b;
        if (valid_a && sel_a == 0 && cmp_a != 0) eleak_a = 1;
        if (valid_b && sel_b == 0 && cmp_b != 0) eleak_b = 1;
      end
      #1;
      ck("a detected", det_a == edet_a && leak_a == eleak_a);
      ck("b detected", det_b == edet_b && leak_b == eleak_b);
      ck("a count", fd_a == 4'($countones(edet_a)) && fc_a == 7'($countones(edet_a) * 100 / 12));
      ck("b count", fd_b == 4'($countones(edet_b)) && fc_b == 7'($countones(edet_b) * 100 / 12));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
