// sfs_top_runner: testbench helper. Runs one serial_fault_sim_top with the
// given faults-per-copy and fault model through a full run and checks it
// against the reference model: every fault-on cycle's comparator outputs,
// the run length N_VECTORS*(K+1), the detected flags, F_D, coverage and the
// full stored dictionary. Reports its check and failure counts and raises
// finished when done. It also counts the fault-on cycles in which a copy
// holding several faults had a fault other than its first one active.
module sfs_top_runner
  import sfs_pkg::*;
  import sfs_ref_pkg::*;
#(
  parameter int unsigned  K     = 1,
  parameter fault_model_e MODEL = FM_BIT_FLIP
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   n_later_faults,
  output logic finished
);
  localparam int unsigned NC = (12 + K - 1) / K;
  localparam int unsigned SW = sel_width(K);

  logic          start = 0, busy, done, leak_err;
  tv_t           tv;
  logic [SW-1:0] select;
  logic [NC-1:0] cmp;
  logic [11:0]   detected, dict_rd_data;
  logic [3:0]    fd_count;
  logic [6:0]    fc_percent;
  logic [4:0]    dict_rd_addr = 0;

  serial_fault_sim_top #(.FAULTS_PER_COPY(K), .FAULT_MODEL(MODEL)) dut (.*);

  // reference dictionary for this fault model
  logic [31:0] dict [12];
  logic [11:0] exp_det;

  task automatic ck(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL K=%0d model=%0d: %s at %0t", K, MODEL, what, $time);
    end
  endtask

  initial begin
    int cycles, nd;
    checks = 0; failures = 0; n_later_faults = 0; finished = 0;
    exp_det = '0;
    for (int f = 0; f < 12; f++)
      for (int v = 0; v < 32; v++) begin
        dict[f][v] = ref_resp(5'(v), f, int'(MODEL)) != golden(5'(v));
        if (dict[f][v]) exp_det[f] = 1'b1;
      end
    nd = $countones(exp_det);
    wait (rst_n);
    repeat (2) @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (!done) begin
      if (select == '0) begin
        ck("no mismatch with faults off", cmp == '0);
      end else begin
        for (int c = 0; c < int'(NC); c++) begin
          automatic int f = c * int'(K) + int'(select) - 1;
          if (f < 12) ck("comparator", cmp[c] == dict[f][tv]);
        end
        if (select > 1) n_later_faults++;
      end
      cycles++;
      @(negedge clk);
    end
    ck("run length", cycles == 32 * (int'(K) + 1));
    ck("detected flags", detected == exp_det);
    ck("F_D", fd_count == 4'(nd));
    ck("FC", fc_percent == 7'(nd * 100 / 12));
    ck("no leak", !leak_err);
    for (int v = 0; v < 32; v++) begin
      logic [11:0] w;
      for (int f = 0; f < 12; f++) w[f] = dict[f][v];
      dict_rd_addr = 5'(v);
      @(negedge clk);
      ck("dictionary word", dict_rd_data == w);
    end
    $display("K=%0d model=%0d: %0d copies, %0d cycles, F_D=%0d, FC=%0d%%",
             K, MODEL, NC, cycles, fd_count, fc_percent);
    finished = 1;
  end
endmodule
