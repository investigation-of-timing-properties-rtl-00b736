// arb_mutex: two-input mutual-exclusion element (Seitz-type arbiter cell).
//
// The real cell is an SR latch built from cross-coupled NAND (active-low
// inputs) or NOR (active-high inputs) gates followed by a filter that hides
// the latch's metastable output until it has resolved. Its function is kept
// here: a request that arrives while the other side holds no grant is
// granted, the grant is held for as long as that request stays active, and a
// request arriving later waits until the first one is withdrawn. The two
// grant bits are computed by one latch process, so the filter's guarantee
// (never two grants at once) holds by construction; an exact tie, which the
// real circuit resolves by metastability, goes to side a in this model.
//
// ACTIVE_LOW selects the NAND flavour: requests and grants are then active
// low, so that cells of both flavours can alternate along the arbitration
// tree without inverters. The element is purely asynchronous: no clock, no
// reset; with both requests inactive both grants are inactive.
//
// The state is a latch with feedback by design (an SR latch); a lint tool
// will report the latch and the loop through it.
`timescale 1ns/1ps
module arb_mutex #(
  parameter bit ACTIVE_LOW = 1'b0
) (
  input  logic r_a,
  input  logic r_b,
  output logic g_a,
  output logic g_b
);
  logic ra, rb;      // requests, active high
  logic la, lb;      // latch state = grants, active high

  assign ra = r_a ^ ACTIVE_LOW;
  assign rb = r_b ^ ACTIVE_LOW;

  always_latch begin
    if (!ra) la = 1'b0;
    if (!rb) lb = 1'b0;
    if (ra && !la && !lb) la = 1'b1;
    if (rb && !la && !lb) lb = 1'b1;
  end

  assign g_a = la ^ ACTIVE_LOW;
  assign g_b = lb ^ ACTIVE_LOW;
endmodule
