// serial_fault_sim_top: serial fault simulation of the c17 benchmark in
// hardware.
//
// Serial fault simulation asks, for every modelled fault and every test
// vector, whether the vector makes the faulty circuit's outputs differ from
// the fault-free circuit's. Instead of re-running one simulation per fault,
// the circuit is instantiated once fault-free (golden) and NUM_COPIES times
// with faults built in; all copies see the same test vector, and one
// comparator per copy reports a mismatch with the golden response.
//
//   tv_sequencer --tv--> c17 (golden) -----------------+
//        |        \----> c17_faulty copy 0 .. N-1 --> response_comparator[c]
//        +--select-----> (FISA select of every copy)        | cmp[c]
//                                                           v
//                  fault_dict_mem <--we/wmask/wdata-- fault_detector
//                                                   -> detected, F_D, FC
//
// Fault list: the twelve gate input pins of c17 (f1..f12, see sfs_pkg), all
// with fault model FAULT_MODEL. With FAULTS_PER_COPY = 1 (default, as in
// the published experiment) there are twelve copies, each holding one fault
// behind a one-bit select, and every vector is applied for two cycles:
// select = 0 (faults off; any mismatch raises leak_err) and select = 1
// (faults on; the comparators give one dictionary word). A larger
// FAULTS_PER_COPY packs contiguous groups of faults into fewer copies and
// applies each vector for FAULTS_PER_COPY+1 cycles.
//
// Timing: start (while not busy) begins a run; it lasts
// N_VECTORS*(FAULTS_PER_COPY+1) cycles (64 by default), after which done is
// high and detected, fd_count and fc_percent hold the final result. The
// dictionary is read through dict_rd_addr (a test vector number); dict_rd_data
// follows one clock later with one bit per fault, set where that vector
// detects that fault.
module serial_fault_sim_top
  import sfs_pkg::*;
#(
  parameter int unsigned  FAULTS_PER_COPY = 1,
  parameter fault_model_e FAULT_MODEL     = FM_BIT_FLIP,
  parameter int unsigned  N_VECTORS       = 32,
  parameter int unsigned  NUM_COPIES      = (N_SITES + FAULTS_PER_COPY - 1) / FAULTS_PER_COPY,
  parameter int unsigned  SEL_W           = sel_width(FAULTS_PER_COPY),
  parameter int unsigned  CNT_W           = $clog2(N_SITES + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  output logic                   busy,
  output logic                   done,
  output tv_t                    tv,
  output logic [SEL_W-1:0]       select,
  output logic [NUM_COPIES-1:0]  cmp,
  output logic [N_SITES-1:0]     detected,
  output logic [CNT_W-1:0]       fd_count,
  output logic [6:0]             fc_percent,
  output logic                   leak_err,
  input  logic [N_INPUTS-1:0]    dict_rd_addr,
  output logic [N_SITES-1:0]     dict_rd_data
);

  logic               valid;
  resp_t              golden_resp;
  resp_t              faulty_resp [NUM_COPIES];
  logic               mem_we;
  logic [N_SITES-1:0] wmask, wdata;

  tv_sequencer #(
    .N_VECTORS (N_VECTORS),
    .N_PHASES  (FAULTS_PER_COPY),
    .SEL_W     (SEL_W)
  ) u_seq (
    .clk, .rst_n, .start,
    .tv, .select, .valid, .busy, .done
  );

  c17 u_golden (.tv(tv), .resp(golden_resp));

  for (genvar c = 0; c < int'(NUM_COPIES); c++) begin : g_copy
    localparam site_mask_t SITES = copy_sites(c, FAULTS_PER_COPY);

    c17_faulty #(
      .FAULT_SITES (SITES),
      .FAULT_MODEL (FAULT_MODEL),
      .N_FAULTS    (count_ones(SITES)),
      .SEL_W       (SEL_W)
    ) u_faulty (
      .select (select),
      .tv     (tv),
      .resp   (faulty_resp[c])
    );

    response_comparator #(.W(N_OUTPUTS)) u_cmp (
      .golden   (golden_resp),
      .faulty   (faulty_resp[c]),
      .mismatch (cmp[c])
    );
  end

  fault_detector #(
    .N_FAULTS_TOTAL  (N_SITES),
    .FAULTS_PER_COPY (FAULTS_PER_COPY),
    .NUM_COPIES      (NUM_COPIES),
    .SEL_W           (SEL_W),
    .CNT_W           (CNT_W)
  ) u_det (
    .clk, .rst_n,
    .clear  (start && !busy),
    .valid  (valid),
    .select (select),
    .cmp    (cmp),
    .mem_we (mem_we),
    .wmask  (wmask),
    .wdata  (wdata),
    .detected, .fd_count, .fc_percent, .leak_err
  );

  fault_dict_mem #(
    .DEPTH  (1 << N_INPUTS),
    .WIDTH  (N_SITES),
    .ADDR_W (N_INPUTS)
  ) u_mem (
    .clk,
    .we    (mem_we),
    .waddr (tv),
    .wmask (wmask),
    .wdata (wdata),
    .raddr (dict_rd_addr),
    .rdata (dict_rd_data)
  );

  initial begin
    assert (FAULTS_PER_COPY >= 1 && FAULTS_PER_COPY <= N_SITES)
      else $error("serial_fault_sim_top: FAULTS_PER_COPY must be 1..12");
  end

endmodule
