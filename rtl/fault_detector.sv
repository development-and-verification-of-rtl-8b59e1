// fault_detector: fault detection logic of the serial fault simulator.
//
// Faults are spread over NUM_COPIES faulty copies in contiguous groups of
// FAULTS_PER_COPY: fault f sits in copy f / FAULTS_PER_COPY and is activated
// by select code (f % FAULTS_PER_COPY) + 1. In a cycle with valid high and
// select = p > 0 the comparator output of copy c therefore reports on fault
// c*FAULTS_PER_COPY + p - 1. This block
//   * forms the response-memory write for that cycle: wmask marks the faults
//     active now, wdata their comparator results (mem_we = valid && p > 0);
//   * keeps a sticky detected flag per fault (a fault is detected once any
//     vector made its copy differ from the golden circuit);
//   * counts the detected faults, F_D, and gives the fault coverage
//     FC = F_D * 100 / F_T, rounded down (F_T = N_FAULTS_TOTAL);
//   * raises leak_err if any comparator fires while select = 0, i.e. while
//     every copy should behave exactly like the golden circuit.
// The source computes the dictionary and FC in an offline script from the
// stored responses; doing it in hardware, and the leak check, are this
// design's choices. Fault coverage follows the source's definition.
//
// Interface: clear (synchronous, restarts the flags), valid, select, cmp in;
// mem_we/wmask/wdata, detected, fd_count, fc_percent, leak_err out. detected
// and leak_err update one clock after the cycle that caused them.
module fault_detector
  import sfs_pkg::*;
#(
  parameter int unsigned N_FAULTS_TOTAL  = 12,
  parameter int unsigned FAULTS_PER_COPY = 1,
  parameter int unsigned NUM_COPIES      = (N_FAULTS_TOTAL + FAULTS_PER_COPY - 1) / FAULTS_PER_COPY,
  parameter int unsigned SEL_W           = sel_width(FAULTS_PER_COPY),
  parameter int unsigned CNT_W           = $clog2(N_FAULTS_TOTAL + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  input  logic                      valid,
  input  logic [SEL_W-1:0]          select,
  input  logic [NUM_COPIES-1:0]     cmp,
  output logic                      mem_we,
  output logic [N_FAULTS_TOTAL-1:0] wmask,
  output logic [N_FAULTS_TOTAL-1:0] wdata,
  output logic [N_FAULTS_TOTAL-1:0] detected,
  output logic [CNT_W-1:0]          fd_count,
  output logic [6:0]                fc_percent,
  output logic                      leak_err
);

  // Map copy comparators onto the faults active in this cycle.
  always_comb begin
    wmask = '0;
    wdata = '0;
    if (valid) begin
      for (int unsigned f = 0; f < N_FAULTS_TOTAL; f++) begin
        if (int'(select) == int'(f % FAULTS_PER_COPY) + 1) begin
          wmask[f] = 1'b1;
          wdata[f] = cmp[f / FAULTS_PER_COPY];
        end
      end
    end
  end

  assign mem_we = valid && (select != '0);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      detected <= '0;
      leak_err <= 1'b0;
    end else if (valid) begin
      detected <= detected | (wmask & wdata);
      if (select == '0 && cmp != '0) leak_err <= 1'b1;
    end
  end

  always_comb begin
    fd_count = '0;
    for (int unsigned i = 0; i < N_FAULTS_TOTAL; i++)
      fd_count += CNT_W'(detected[i]);
  end

  assign fc_percent = 7'((32'(fd_count) * 100) / N_FAULTS_TOTAL);

endmodule
