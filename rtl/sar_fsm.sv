// sar_fsm: conversion sequencer of the successive approximation register.
//
// A Moore machine that walks through one conversion in NBITS+2 clock cycles:
//   SAMPLE           1 cycle : SAR_sampling = 1, the bootstrap switches track
//                              the inputs and every DAC switch sits at VCM.
//   CONVERT (bit k)  NBITS cycles, k = NBITS-1 down to 0: at the clock edge
//                              that ends the cycle, bit k is decided
//                              (decide = 1, bit_idx = k).
//   READY            1 cycle : SAR_ready = 1, the result is complete.
// and then starts the next conversion with SAMPLE. With the document's 10
// bits this is the 12-cycle conversion period used by its ramp test.
//
// Reset (nrst low, asynchronous) and enable low (synchronous) both park the
// machine in SAMPLE; that reset state shows SAR_sampling high, as in the
// document's simulations. Holding SAMPLE while disabled is this design's
// choice: the document only says that enable low turns the module off.
//
// Outputs depend only on the state register, so no input reaches an output
// combinationally.
module sar_fsm
  import sar_pkg::*;
#(
  parameter int unsigned NBITS = ADC_BITS
) (
  input  logic                     clk,
  input  logic                     nrst,
  input  logic                     en,
  output logic                     sampling,  // SAMPLE cycle
  output logic                     ready,     // READY cycle
  output logic                     clear,     // next edge returns result and switches to start
  output logic                     decide,    // next edge decides bit_idx
  output logic [$clog2(NBITS)-1:0] bit_idx
);

  sar_state_e                 state;
  logic [$clog2(NBITS)-1:0]   idx;

  always_ff @(posedge clk or negedge nrst) begin
    if (!nrst) begin
      state <= ST_SAMPLE;
      idx   <= '0;
    end else if (!en) begin
      state <= ST_SAMPLE;
      idx   <= '0;
    end else begin
      unique case (state)
        ST_SAMPLE: begin
          state <= ST_CONVERT;
          idx   <= ($clog2(NBITS))'(NBITS - 1);
        end
        ST_CONVERT: begin
          if (idx == '0) state <= ST_READY;
          else           idx   <= idx - 1'b1;
        end
        ST_READY:  state <= ST_SAMPLE;
        default:   state <= ST_SAMPLE;
      endcase
    end
  end

  assign sampling = (state == ST_SAMPLE);
  assign ready    = (state == ST_READY);
  assign decide   = (state == ST_CONVERT);
  assign clear    = (state == ST_READY) || (state == ST_SAMPLE);
  assign bit_idx  = idx;

endmodule
