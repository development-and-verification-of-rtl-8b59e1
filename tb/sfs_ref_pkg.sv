// sfs_ref_pkg: reference data and a reference model for the c17 serial fault
// simulation testbenches, written independently of the RTL.
//
// GOLDEN_TT is the c17 truth table, two bits {G23, G22} per vector, vector k
// at bits [2k+1:2k] (vector layout {G7, G6, G3, G2, G1}). BITFLIP_DICT[f] is
// the fault dictionary row of bit-flip fault f+1: bit v is set when test
// vector v detects it. Both were worked out by hand from the c17 netlist and
// agree with the published c17 fault dictionary (12 faults, 32 vectors,
// 100 % coverage).
//
// ref_resp() evaluates c17 with one gate input pin forced by a fault model;
// it is a separate behavioural description (explicit pin table), used for the
// stuck-at models where no published data exist.
package sfs_ref_pkg;

  localparam logic [63:0] GOLDEN_TT = 64'h44fafefa44f0f4f0;

  localparam logic [31:0] BITFLIP_DICT [12] = '{
    32'hf030f030,  // f1  : G1  into G_1
    32'ha222a222,  // f2  : G3  into G_1
    32'hff00cc00,  // f3  : G3  into G_2
    32'hf0f0c0c0,  // f4  : G6  into G_2
    32'h0f5f0fff,  // f5  : G2  into G_3
    32'hcc4ccccc,  // f6  : G11 into G_3
    32'hf3330000,  // f7  : G11 into G_4
    32'h03330333,  // f8  : G7  into G_4
    32'hf333f333,  // f9  : G10 into G_5
    32'h5f5f5f5f,  // f10 : G16 into G_5
    32'hf000ffff,  // f11 : G16 into G_6
    32'hf333f333   // f12 : G19 into G_6
  };

  // model: 0 bit-flip, 1 stuck-at-0, 2 stuck-at-1. site: 0..11, or -1 for none.
  function automatic logic pin(input logic v, input int site, input int me, input int model);
    if (site != me) return v;
    case (model)
      1:       return 1'b0;
      2:       return 1'b1;
      default: return !v;
    endcase
  endfunction

  function automatic logic [1:0] ref_resp(input logic [4:0] tv, input int site, input int model);
    logic a1, a2, a3, a6, a7, n10, n11, n16, n19, o22, o23;
    a1 = tv[0]; a2 = tv[1]; a3 = tv[2]; a6 = tv[3]; a7 = tv[4];
    n10 = !(pin(a1, site, 0, model)  && pin(a3, site, 1, model));
    n11 = !(pin(a3, site, 2, model)  && pin(a6, site, 3, model));
    n16 = !(pin(a2, site, 4, model)  && pin(n11, site, 5, model));
    n19 = !(pin(n11, site, 6, model) && pin(a7, site, 7, model));
    o22 = !(pin(n10, site, 8, model) && pin(n16, site, 9, model));
    o23 = !(pin(n16, site, 10, model) && pin(n19, site, 11, model));
    return {o23, o22};
  endfunction

  function automatic logic [1:0] golden(input logic [4:0] tv);
    return GOLDEN_TT[2*tv +: 2];
  endfunction

endpackage
