// c17_faulty: an instrumented (faulty) copy of the c17 benchmark.
//
// The copy has the golden netlist, but every gate input pin named in
// FAULT_SITES passes through a fault injector of model FAULT_MODEL:
// bit-flip XORs the pin with its fault enable, stuck-at-0 / stuck-at-1 force
// the pin while the enable is high. The enables come from the copy's own FISA
// unit, whose fault injection signal is tied to 1, so the select code alone
// decides which of the copy's faults (if any) is active. Sites not in
// FAULT_SITES are plain wires. Site numbering (f1..f12 = gate input pins in
// netlist order) is listed in sfs_pkg.
//
// Following the original tool, a copy is a rewritten netlist with a
// demultiplexer fault controller and a one-bit "fault on" select for a
// single-fault copy. Making the site set and fault model parameters of one
// module, rather than writing out one file per copy, is this design's choice.
//
// Interface: select (SEL_W bits; 0 = no fault, k = k-th site of the copy),
// tv in, resp out. Combinational.
module c17_faulty
  import sfs_pkg::*;
#(
  parameter site_mask_t   FAULT_SITES = 12'h001,
  parameter fault_model_e FAULT_MODEL = FM_BIT_FLIP,
  parameter int unsigned  N_FAULTS    = count_ones(FAULT_SITES),
  parameter int unsigned  SEL_W       = sel_width(N_FAULTS)
) (
  input  logic [SEL_W-1:0] select,
  input  tv_t              tv,
  output resp_t            resp
);

  // Fault injection signal: constant 1, as in the instrumented code.
  localparam logic FIS = 1'b1;

  logic [N_FAULTS-1:0] f;     // enables from the FISA unit
  site_mask_t          en;    // enable per site (0 for uninstrumented sites)

  fisa_unit #(.N_FAULTS(N_FAULTS), .SEL_W(SEL_W)) u_fisa (
    .fis    (FIS),
    .select (select),
    .f      (f)
  );

  for (genvar s = 0; s < int'(N_SITES); s++) begin : g_site
    if (FAULT_SITES[s]) begin : g_on
      assign en[s] = f[site_rank(FAULT_SITES, s)];
    end else begin : g_off
      assign en[s] = 1'b0;
    end
  end

  logic G1, G2, G3, G6, G7;
  logic G10, G11, G16, G19, G22, G23;

  assign {G7, G6, G3, G2, G1} = tv;

  always_comb begin
    G10 = ~(inject(G1,  en[0],  FAULT_MODEL) & inject(G3,  en[1],  FAULT_MODEL));  // G_1
    G11 = ~(inject(G3,  en[2],  FAULT_MODEL) & inject(G6,  en[3],  FAULT_MODEL));  // G_2
    G16 = ~(inject(G2,  en[4],  FAULT_MODEL) & inject(G11, en[5],  FAULT_MODEL));  // G_3
    G19 = ~(inject(G11, en[6],  FAULT_MODEL) & inject(G7,  en[7],  FAULT_MODEL));  // G_4
    G22 = ~(inject(G10, en[8],  FAULT_MODEL) & inject(G16, en[9],  FAULT_MODEL));  // G_5
    G23 = ~(inject(G16, en[10], FAULT_MODEL) & inject(G19, en[11], FAULT_MODEL));  // G_6
  end

  assign resp = {G23, G22};

  initial begin
    assert (N_FAULTS >= 1 && N_FAULTS == count_ones(FAULT_SITES))
      else $error("c17_faulty: N_FAULTS must equal the number of sites in FAULT_SITES");
  end

endmodule
