// arb_tree: binary arbitration tree of arb_cell elements.
//
// N_CH channel requests (active high, N_CH a power of two) are merged level by
// level into a single root request rqo; the root token acki is routed back
// down the path the winning request took, to exactly one channel (ack).
// A channel keeps the path while its request stays active; when it withdraws
// it, every cell on the path hands over to a waiting request on its other
// side immediately, so the token moves to the next channel without a dead
// period. Level l cells use the NOR flavour for even l and the NAND flavour
// for odd l, so node signals of level l are active high for even l; for an
// odd number of levels the root is inverted once to keep rqo and acki active
// high. 64 channels give 6 levels and 63 cells, as in the 8x8 array.
// Purely asynchronous and combinational apart from the arbiter latches.
`timescale 1ns/1ps
module arb_tree #(
  parameter int unsigned N_CH = edward_pkg::N_CH_DEF
) (
  input  logic [N_CH-1:0] req,   // channel requests, active high
  output logic [N_CH-1:0] ack,   // channel tokens, active high
  output logic            rqo,   // root request, active high
  input  logic            acki   // root token, active high
);
  localparam int unsigned L = $clog2(N_CH);

  // node signals; level 0 = channels, level L = root; only the low
  // N_CH >> l bits of level l are used
  logic [L:0][N_CH-1:0] rq;
  logic [L:0][N_CH-1:0] ak;

  assign rq[0] = req;
  assign ack   = ak[0];

  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int unsigned NC = N_CH >> (l + 1);   // cells on this level
    for (genvar i = 0; i < NC; i++) begin : g_cell
      arb_cell #(.IN_ACTIVE_LOW(l % 2 == 1)) u_cell (
        .req_a(rq[l][2*i]),   .req_b(rq[l][2*i+1]),
        .ack_a(ak[l][2*i]),   .ack_b(ak[l][2*i+1]),
        .rqo  (rq[l+1][i]),   .acki (ak[l+1][i])
      );
    end
    if (NC < N_CH) begin : g_pad_rq
      assign rq[l+1][N_CH-1:NC] = '0;
    end
    if (l + 1 < L) begin : g_pad_ak
      assign ak[l+1][N_CH-1:NC] = '0;
    end
  end

  if (L % 2 == 0) begin : g_root_hi
    assign rqo      = rq[L][0];
    assign ak[L][0] = acki;
  end else begin : g_root_lo
    assign rqo      = ~rq[L][0];
    assign ak[L][0] = ~acki;
  end
  if (N_CH > 1) begin : g_root_pad
    assign ak[L][N_CH-1:1] = '0;
  end
endmodule
