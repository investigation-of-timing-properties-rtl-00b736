// shared_bus: the shared digital data bus with its default-state circuitry.
//
// Each channel contributes a word that is zero unless it drives the bus
// (the AND-OR equivalent of tri-state drivers on one set of wires). When no
// channel drives, the bus is forced to IDLE_WORD, so that a downstream
// serializer always sees a defined bit stream and idle periods can be told
// from data. busy reports that some channel drives. Purely combinational.
// The default state follows the design description; the AND-OR form and the
// idle pattern are this design's choices. At most one channel may drive at a
// time; the arbitration guarantees it and the top level checks it.
`timescale 1ns/1ps
module shared_bus #(
  parameter int unsigned            N_CH      = edward_pkg::N_CH_DEF,
  parameter int unsigned            DATA_W    = edward_pkg::DATA_W_DEF,
  parameter logic [DATA_W-1:0]      IDLE_WORD = edward_pkg::IDLE_WORD_DEF
) (
  input  logic [N_CH-1:0]             drive,
  input  logic [N_CH-1:0][DATA_W-1:0] data,
  output logic [DATA_W-1:0]           bus,
  output logic                        busy
);
  logic [DATA_W-1:0] wired;

  always_comb begin
    wired = '0;
    for (int i = 0; i < N_CH; i++)
      wired |= data[i] & {DATA_W{drive[i]}};
  end

  assign busy = |drive;
  assign bus  = busy ? wired : IDLE_WORD;
endmodule
