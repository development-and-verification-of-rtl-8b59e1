// c17: the fault-free ("golden") ISCAS-85 c17 benchmark circuit.
//
// Six two-input NAND gates, G_1..G_6, connect five inputs to two outputs:
//   G10 = NAND(G1, G3)    G11 = NAND(G3, G6)    G16 = NAND(G2, G11)
//   G19 = NAND(G11, G7)   G22 = NAND(G10, G16)  G23 = NAND(G16, G19)
// The netlist is the standard benchmark one. Packing the inputs into a
// vector {G7, G6, G3, G2, G1} and the outputs into {G23, G22} is this
// design's own choice; the serial fault simulator drives every copy of c17
// from the same vector.
//
// Interface: tv (test vector) in, resp (response) out. Purely combinational,
// no clock.
module c17
  import sfs_pkg::*;
(
  input  tv_t   tv,
  output resp_t resp
);

  logic G1, G2, G3, G6, G7;
  logic G10, G11, G16, G19, G22, G23;

  assign {G7, G6, G3, G2, G1} = tv;

  always_comb begin
    G10 = ~(G1  & G3);   // G_1
    G11 = ~(G3  & G6);   // G_2
    G16 = ~(G2  & G11);  // G_3
    G19 = ~(G11 & G7);   // G_4
    G22 = ~(G10 & G16);  // G_5
    G23 = ~(G16 & G19);  // G_6
  end

  assign resp = {G23, G22};

endmodule
