// fault_dict_mem: memory that stores the simulation responses as a fault
// dictionary.
//
// One WIDTH-bit word per test vector, one bit per fault: bit f of word v is
// set when test vector v detected fault f (its faulty copy's comparator fired
// with that fault active). A write updates only the bits set in wmask, so the
// bits of different faults of the same vector can be written in different
// cycles. Reading the bits of one fault across all words gives that fault's
// row of the fault dictionary (the list of vectors that detect it).
//
// The source says only that the top level holds memory for storing the
// responses; word layout, bit-masked writes and the registered read port are
// this design's choices.
//
// Interface: write port (we, waddr, wmask, wdata) and read port (raddr in,
// rdata one clock later). No reset: every bit is written once per run.
module fault_dict_mem #(
  parameter int unsigned DEPTH  = 32,
  parameter int unsigned WIDTH  = 12,
  parameter int unsigned ADDR_W = (DEPTH < 2) ? 1 : $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [WIDTH-1:0]  wmask,
  input  logic [WIDTH-1:0]  wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [WIDTH-1:0]  rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int b = 0; b < int'(WIDTH); b++)
        if (wmask[b]) mem[waddr][b] <= wdata[b];
    end
    rdata <= mem[raddr];
  end

endmodule
