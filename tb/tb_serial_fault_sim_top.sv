// tb_serial_fault_sim_top: end-to-end run of the serial fault simulator at
// its default configuration (12 copies, one bit-flip fault each, 32 vectors).
//
// Every cycle of a run it checks the live comparator outputs: all zero in
// fault-off cycles (select = 0), and equal to the published dictionary bits
// of the current vector in fault-on cycles. After done it checks the run
// length (64 cycles), the detected flags, F_D = 12, coverage 100 %, the leak
// flag, and reads back all 32 words of the stored fault dictionary. The run
// is made twice to check that a new start clears the previous result.
// Mechanism counters: fault-off cycles, fault-on cycles, comparator
// detections, dictionary reads, restarts; each must occur.
module tb_serial_fault_sim_top;
  import sfs_pkg::*;
  import sfs_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_off = 0, n_on = 0, n_detect = 0, n_reads = 0, n_restart = 0;

  logic        clk = 0, rst_n = 0, start = 0;
  logic        busy, done, leak_err;
  tv_t         tv;
  logic [0:0]  select;
  logic [11:0] cmp, detected, dict_rd_data;
  logic [3:0]  fd_count;
  logic [6:0]  fc_percent;
  logic [4:0]  dict_rd_addr = 0;
  logic [11:0] words [32];   // dictionary as read back from the memory

  serial_fault_sim_top dut (.*);

  always #5 clk = ~clk;

  task automatic ck(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] exp_cmp;
    int cycles;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    ck("idle after reset", !busy && !done);
    for (int run = 0; run < 2; run++) begin
      if (run > 0) n_restart++;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      ck("results cleared by start", detected == 0 && fd_count == 0 && fc_percent == 0);
      cycles = 0;
      while (!done) begin
        ck("busy during run", busy);
        for (int f = 0; f < 12; f++) exp_cmp[f] = BITFLIP_DICT[f][tv];
        if (select == 1'b0) begin
          n_off++;
          ck("no mismatch with faults off", cmp == 12'd0);
        end else begin
          n_on++;
          n_detect += $countones(cmp);
          ck("comparators match dictionary", cmp == exp_cmp);
          if (cmp != exp_cmp)
            $display("  tv=%0d cmp=%b expected %b", tv, cmp, exp_cmp);
        end
        ck("vector/select order", tv == tv_t'(cycles / 2) && select == 1'(cycles % 2));
        cycles++;
        @(negedge clk);
      end
      ck("run length 32 vectors x 2 cycles", cycles == 64);
      ck("all faults detected", detected == 12'hFFF);
      ck("F_D = 12", fd_count == 4'd12);
      ck("FC = 100 %", fc_percent == 7'd100);
      ck("no leak", !leak_err);
      for (int v = 0; v < 32; v++) begin
        logic [11:0] exp_word;
        for (int f = 0; f < 12; f++) exp_word[f] = BITFLIP_DICT[f][v];
        dict_rd_addr = 5'(v);
        @(negedge clk);
        n_reads++;
        words[v] = dict_rd_data;
        ck("dictionary word", dict_rd_data == exp_word);
        if (dict_rd_data != exp_word)
          $display("  word %0d = %b expected %b", v, dict_rd_data, exp_word);
      end
      $display("run %0d: %0d cycles, F_D=%0d, FC=%0d%%", run, cycles, fd_count, fc_percent);
    end
    // print the fault dictionary: for each fault, the vectors that detect it
    for (int f = 0; f < 12; f++) begin
      automatic string line = "";
      for (int v = 0; v < 32; v++)
        if (words[v][f]) line = {line, (line == "") ? "" : ",", $sformatf("%0d", v)};
      $display("f%0d\t%s\t%s", f + 1, (line == "") ? "-" : line, detected[f] ? "X" : "-");
    end
    $display("F_T = 12\tTotal TV = 32\tFC = %0d%%", fc_percent);
    $display("mechanisms: fault-off cycles=%0d fault-on cycles=%0d detections=%0d dictionary reads=%0d restarts=%0d",
             n_off, n_on, n_detect, n_reads, n_restart);
    ck("fault-off phase happened", n_off > 0);
    ck("fault-on phase happened", n_on > 0);
    ck("detections happened", n_detect > 0);
    ck("dictionary read back", n_reads > 0);
    ck("restart happened", n_restart > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
