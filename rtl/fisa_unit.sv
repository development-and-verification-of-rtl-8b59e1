// fisa_unit: Fault Injection, Selection and Activation (FISA) unit.
//
// A demultiplexer: the fault injection signal fis is routed to exactly one of
// the fault enable lines f[0..N_FAULTS-1], chosen by the select port pins; all
// other lines are held at 0. One FISA unit sits in each faulty copy of the
// circuit and each f line drives one instrumented fault site, so the select
// code decides which single fault is active.
//
// Select coding: code 0 activates no fault, code k (1..N_FAULTS) activates
// f[k-1], and any code above N_FAULTS activates none. This follows the
// single-fault copy, where select = 1 turns its fault on; the multi-fault
// listing of the original tool instead gives code 0 to the first fault and
// keeps the top code as "none". Starting at 1 lets the same code 0 mean
// "fault-free" in every copy, whatever number of faults it holds.
//
// Interface: fis (1 bit), select (SEL_W bits), f (N_FAULTS bits).
// Purely combinational.
module fisa_unit #(
  parameter int unsigned N_FAULTS = 1,
  parameter int unsigned SEL_W    = sfs_pkg::sel_width(N_FAULTS)
) (
  input  logic                fis,
  input  logic [SEL_W-1:0]    select,
  output logic [N_FAULTS-1:0] f
);

  always_comb begin
    f = '0;
    for (int unsigned k = 1; k <= N_FAULTS; k++)
      if (select == SEL_W'(k)) f[k-1] = fis;
  end

endmodule
