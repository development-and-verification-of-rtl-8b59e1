// sfs_pkg: types, constants and helper functions shared by the serial fault
// simulation blocks built around the ISCAS-85 c17 benchmark.
//
// Test vector layout: the five c17 inputs are packed as {G7, G6, G3, G2, G1},
// so G1 is the least significant bit and vector k is the binary number k.
// Response layout: {G23, G22}.
//
// Fault sites: the twelve gate input pins of the c17 netlist, numbered in the
// order the netlist lists its gates and, within a gate, its inputs. Site k
// (0-based) is fault f(k+1) of the fault dictionary. Against the line labels
// C1..C12 of the c17 schematic the order is
//   f1=C1  (G1  -> G_1)   f2=C2  (G3  -> G_1)   f3=C3  (G3  -> G_2)
//   f4=C4  (G6  -> G_2)   f5=C5  (G2  -> G_3)   f6=C8  (G11 -> G_3)
//   f7=C9  (G11 -> G_4)   f8=C6  (G7  -> G_4)   f9=C7  (G10 -> G_5)
//   f10=C10 (G16 -> G_5)  f11=C11 (G16 -> G_6)  f12=C12 (G19 -> G_6)
// This numbering is what makes the published fault dictionary line up.
//
// Fault models: bit-flip (the pin is inverted while its fault is active),
// stuck-at-0 and stuck-at-1 (the pin is forced while active).
package sfs_pkg;

  localparam int unsigned N_INPUTS  = 5;
  localparam int unsigned N_OUTPUTS = 2;
  localparam int unsigned N_SITES   = 12;

  typedef logic [N_INPUTS-1:0]  tv_t;    // {G7, G6, G3, G2, G1}
  typedef logic [N_OUTPUTS-1:0] resp_t;  // {G23, G22}
  typedef logic [N_SITES-1:0]   site_mask_t;

  typedef enum logic [1:0] {
    FM_BIT_FLIP   = 2'd0,
    FM_STUCK_AT_0 = 2'd1,
    FM_STUCK_AT_1 = 2'd2
  } fault_model_e;

  // Value seen by a gate input pin carrying a fault of model fm, with the
  // fault enable en coming from the FISA unit.
  function automatic logic inject(input logic sig, input logic en,
                                  input fault_model_e fm);
    unique case (fm)
      FM_STUCK_AT_0: return sig & ~en;
      FM_STUCK_AT_1: return sig | en;
      default:       return sig ^ en;
    endcase
  endfunction

  function automatic int unsigned count_ones(input site_mask_t m);
    int unsigned n = 0;
    for (int i = 0; i < int'(N_SITES); i++) n += int'(m[i]);
    return n;
  endfunction

  // Position of site s among the sites set in m (0 for the lowest set site).
  function automatic int unsigned site_rank(input site_mask_t m, input int unsigned s);
    int unsigned n = 0;
    for (int i = 0; i < int'(N_SITES); i++)
      if (i < int'(s) && m[i]) n++;
    return n;
  endfunction

  // Sites held by faulty copy c when faults are spread over the copies in
  // contiguous groups of k: copy c holds faults c*k .. c*k+k-1.
  function automatic site_mask_t copy_sites(input int unsigned c, input int unsigned k);
    site_mask_t m = '0;
    for (int i = 0; i < int'(N_SITES); i++)
      if (i >= int'(c * k) && i < int'(c * k + k)) m[i] = 1'b1;
    return m;
  endfunction

  // Width of a select code that can name n faults plus "no fault" (code 0).
  function automatic int unsigned sel_width(input int unsigned n);
    return (n < 1) ? 1 : $clog2(n + 1);
  endfunction

endpackage
