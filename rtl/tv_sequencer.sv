// tv_sequencer: test vector source and fault select sequencer.
//
// After start it applies the N_VECTORS test vectors 0, 1, ..., N_VECTORS-1 in
// order (for c17, all 32 input combinations). Each vector is held for
// N_PHASES+1 clock cycles: select = 0 first (every faulty copy fault-free),
// then select = 1 .. N_PHASES, activating in turn each of the faults a copy
// holds. With one fault per copy this gives the alternating select of the
// reference waveform: two cycles per vector, fault off then fault on. A run
// therefore lasts N_VECTORS*(N_PHASES+1) cycles with valid high; done then
// rises and stays high until the next start.
//
// Exhaustive, counting-order vectors match the published example (32
// vectors, G1 toggling fastest). The select-0 phase, the cycle timing and the
// start/done handshake are this design's choices.
//
// Interface: start (pulse, sampled when not busy); tv, select, valid (held
// stable for one cycle each, registered); busy, done. Synchronous active-low
// reset.
module tv_sequencer
  import sfs_pkg::*;
#(
  parameter int unsigned N_VECTORS = 32,
  parameter int unsigned N_PHASES  = 1,
  parameter int unsigned SEL_W     = sel_width(N_PHASES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output tv_t              tv,
  output logic [SEL_W-1:0] select,
  output logic             valid,
  output logic             busy,
  output logic             done
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;
  state_e state;

  localparam tv_t        LAST_TV  = tv_t'(N_VECTORS - 1);
  localparam logic [SEL_W-1:0] LAST_SEL = SEL_W'(N_PHASES);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      tv     <= '0;
      select <= '0;
    end else begin
      unique case (state)
        S_RUN: begin
          if (select == LAST_SEL) begin
            select <= '0;
            if (tv == LAST_TV) state <= S_DONE;
            else               tv    <= tv + 1'b1;
          end else begin
            select <= select + 1'b1;
          end
        end
        default: begin  // S_IDLE, S_DONE
          if (start) begin
            state  <= S_RUN;
            tv     <= '0;
            select <= '0;
          end
        end
      endcase
    end
  end

  assign valid = (state == S_RUN);
  assign busy  = (state == S_RUN);
  assign done  = (state == S_DONE);

  initial begin
    assert (N_VECTORS >= 1 && N_VECTORS <= (1 << N_INPUTS))
      else $error("tv_sequencer: N_VECTORS out of range");
  end

endmodule
