// data_validator: behavioural model of the data-valid detector.
//
// Behavioural model, not synthesizable logic: the real circuit is analog and
// senses that the digital data lines have reached 70 % of their final level.
// The model raises dval SETTLE_NS after the bus starts being driven (busy)
// or after the driven word last changed, and drops it as soon as the bus is
// released. Inertial delay: a driven word that lasts less than SETTLE_NS
// never produces dval. The 70 % criterion follows the design description;
// the settling time is this model's own figure, chosen near the 2-4 ns data
// setup times reported for a 65 nm implementation.
`timescale 1ns/1ps
module data_validator #(
  parameter int unsigned DATA_W    = edward_pkg::DATA_W_DEF,
  parameter real         SETTLE_NS = 2.0
) (
  input  logic              busy,
  input  logic [DATA_W-1:0] bus,
  output logic              dval
);
  logic              settled;
  logic [DATA_W-1:0] bus_d;
  logic              busy_d;

  assign #(SETTLE_NS) bus_d  = bus;
  assign #(SETTLE_NS) busy_d = busy;

  assign settled = busy_d && (bus_d == bus);
  assign dval    = busy && settled;
endmodule
