// tb_tv_sequencer: checks the vector/select sequence of two sequencers,
// (32 vectors, 1 fault per copy) and (5 vectors, 3 faults per copy), cycle by
// cycle: after start, vector v with select p appears in cycle v*(P+1)+p, and
// done rises after exactly N*(P+1) valid cycles. Each is run twice to check
// restart from done; start while busy must be ignored.
module tb_tv_sequencer;
  import sfs_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start_a = 0, start_b = 0;

  tv_t        tv_a, tv_b;
  logic [0:0] sel_a;
  logic [1:0] sel_b;
  logic       valid_a, busy_a, done_a, valid_b, busy_b, done_b;

  tv_sequencer #(.N_VECTORS(32), .N_PHASES(1)) u_a (
    .clk, .rst_n, .start(start_a), .tv(tv_a), .select(sel_a),
    .valid(valid_a), .busy(busy_a), .done(done_a));
  tv_sequencer #(.N_VECTORS(5), .N_PHASES(3)) u_b (
    .clk, .rst_n, .start(start_b), .tv(tv_b), .select(sel_b),
    .valid(valid_b), .busy(busy_b), .done(done_b));

  always #5 clk = ~clk;

  task automatic ck(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    ck("idle after reset a", !valid_a && !busy_a && !done_a);
    ck("idle after reset b", !valid_b && !busy_b && !done_b);
    for (int run = 0; run < 2; run++) begin
      // sequencer a
      start_a <= 1; @(posedge clk); start_a <= 0;
      for (int v = 0; v < 32; v++)
        for (int p = 0; p <= 1; p++) begin
          @(negedge clk);
          ck("a valid", valid_a && busy_a && !done_a);
          ck("a tv/select", tv_a == tv_t'(v) && sel_a == 1'(p));
          if (v == 3 && p == 0) start_a <= 1;   // ignored while busy
          if (v == 3 && p == 1) start_a <= 0;
        end
      @(negedge clk);
      ck("a done after 64 cycles", done_a && !valid_a && !busy_a);
      // sequencer b
      start_b <= 1; @(posedge clk); start_b <= 0;
      for (int v = 0; v < 5; v++)
        for (int p = 0; p <= 3; p++) begin
          @(negedge clk);
          ck("b valid", valid_b && busy_b);
          ck("b tv/select", tv_b == tv_t'(v) && sel_b == 2'(p));
        end
      @(negedge clk);
      ck("b done after 20 cycles", done_b && !valid_b);
      repeat (3) @(negedge clk);
      ck("done holds", done_a && done_b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
