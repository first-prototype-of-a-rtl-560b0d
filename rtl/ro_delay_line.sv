// Behavioural model of the event-driven ring oscillator with its
// single-to-differential (S2D) converters. Not synthesizable: the real block
// is a chain of NAND delay cells whose ~30 ps delay is the TDC's time unit.
//
// Fifteen 2-input NAND cells form a ring. The first cell's second input is
// RO_key; every other cell has its second input tied high, so it acts as an
// inverter. With RO_key low the first cell is forced high and the chain
// settles to the alternating reset pattern 1,0,1,0,...; when RO_key rises the
// edge runs around the ring, each cell switching STAGE_DELAY_PS after its
// predecessor, and the ring oscillates with a period of 30 cell delays.
// The S2D stage turns each cell output into a complementary pair; after
// polarity correction this gives 30 phases phase[0..29], ordered so that
// phase[k] rises (k+1) cell delays after RO_key (modulo 30). In the reset
// state phase[14:0] = 0 and phase[29:15] = 1. Sampling the phases at time t
// after RO_key therefore gives floor(t / delay) mod 30 as a cyclic
// thermometer pattern, and phase[29] rises exactly once per period, at the
// wrap from fine value 29 to 0, which clocks the coarse counter.
//
// The stage count, the NAND cells, the gating of only the first stage and
// the 30 phases follow the chip description. Identical cell delays and an
// ideal, skew-free S2D are this model's simplifications.
//
// Circuit note: the ring is a combinational loop by design.
module ro_delay_line
  import latric0_pkg::*;
#(
  parameter real STAGE_DELAY_PS = 30.0
) (
  input  logic                ro_key,
  output logic [N_PHASES-1:0] phase
);
  timeunit 1ps;
  timeprecision 1fs;

  logic stage [N_STAGES];

  assign #(STAGE_DELAY_PS) stage[0] = ~(ro_key & stage[N_STAGES-1]);

  for (genvar j = 1; j < N_STAGES; j++) begin : g_cell
    assign #(STAGE_DELAY_PS) stage[j] = ~(1'b1 & stage[j-1]);
  end

  // S2D converters with polarity correction: even cells fall first after
  // RO_key, odd cells rise first.
  for (genvar k = 0; k < N_STAGES; k++) begin : g_s2d
    if (k % 2 == 0) begin : g_even
      assign phase[k]            = ~stage[k];
      assign phase[N_STAGES + k] =  stage[k];
    end else begin : g_odd
      assign phase[k]            =  stage[k];
      assign phase[N_STAGES + k] = ~stage[k];
    end
  end

endmodule
