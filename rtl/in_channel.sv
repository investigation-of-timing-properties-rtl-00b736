// in_channel: per-pixel readout logic of the EDWARD architecture.
//
// Request: a flip-flop clocked by the pixel's data-ready signal (rdy) raises
// the readout request (req) if the channel is enabled (en). Disabling a
// channel stops new requests; a request already raised is completed.
//
// Token: the remaining flip-flops are clocked by the acknowledge token (ack,
// active high = token present at this channel). The first token edge opens
// bus access and loads the packet counter; the channel then drives packet 0
// onto the digital bus during the following token-inactive part of the
// period (drive = access & ~ack), packet 1 after the next token edge, and so
// on. A token edge without a pending request is ignored. The token edge
// that follows the last packet closes access, marks the readout done,
// clears the request - which returns the token to the tree - and asserts
// pix_rst to reset the pixel. done, and with it pix_rst, stays
// set until the pixel withdraws rdy; the next rising rdy starts a new
// readout. A channel with N_PACKETS packets thus consumes N_PACKETS + 1
// token edges, the last of which is passed on to the next channel in the
// same token pulse.
//
// The bus is modelled as AND-OR: data_o is all-zero unless drive is set,
// standing in for the channel's tri-state drivers. The flip-flop roles
// (request, access, countdown, done) follow the design description; the
// packet count, the rdy / pix_rst handshake and the enable behaviour are this
// design's choices, as is building the request and done flags from toggle
// flip-flops so that every flip-flop has one clock and one reset. rst_n
// clears everything asynchronously and must fall once before use.
// The channel adds no address of its own: a pixel whose origin must be known
// downstream puts it in its packets.
`timescale 1ns/1ps
module in_channel #(
  parameter int unsigned DATA_W    = edward_pkg::DATA_W_DEF,
  parameter int unsigned N_PACKETS = edward_pkg::N_PACKETS_DEF
) (
  input  logic                              rst_n,
  input  logic                              en,       // request enable
  input  logic                              rdy,      // data ready from pixel
  input  logic [N_PACKETS-1:0][DATA_W-1:0]  pix_data, // packets from pixel
  output logic                              req,      // to arbitration tree
  input  logic                              ack,      // token from arbitration tree
  output logic                              drive,    // channel drives the bus
  output logic [DATA_W-1:0]                 data_o,   // bus contribution
  output logic                              pix_rst   // pixel reset
);
  localparam int unsigned CW = (N_PACKETS > 1) ? $clog2(N_PACKETS) : 1;

  logic          access;   // bus may be accessed
  logic          done;     // all packets sent, token returned
  logic [CW-1:0] cnt;      // packets still to send after the current one

  // req and done are each set in one clock domain and cleared in another.
  // Each event toggles a flip-flop of its own domain, and the flags are the
  // XOR of two toggles; only one toggle moves per event, so the flags do not
  // glitch. start_t: rising rdy; fin_t: completing token edge; rel_t:
  // falling rdy after the pixel reset.
  logic start_t, fin_t, rel_t;

  assign req  = start_t ^ fin_t;
  assign done = fin_t ^ rel_t;

  // request flip-flop, clocked by data ready
  always_ff @(posedge rdy or negedge rst_n) begin
    if (!rst_n)                      start_t <= 1'b0;
    else if (en && !req && !done)    start_t <= ~start_t;
  end

  // access and packet countdown, clocked by the token
  always_ff @(posedge ack or negedge rst_n) begin
    if (!rst_n) begin
      access <= 1'b0;
      cnt    <= '0;
    end else if (!access) begin
      if (req) begin
        access <= 1'b1;
        cnt    <= CW'(N_PACKETS - 1);
      end
    end else if (cnt == '0) begin
      access <= 1'b0;
    end else begin
      cnt <= cnt - 1'b1;
    end
  end

  // readout complete: clears req, sets done (token edge after the last packet)
  always_ff @(posedge ack or negedge rst_n) begin
    if (!rst_n)                      fin_t <= 1'b0;
    else if (access && cnt == '0)    fin_t <= ~fin_t;
  end

  // pixel reset acknowledged: clears done (falling rdy)
  always_ff @(negedge rdy or negedge rst_n) begin
    if (!rst_n)                      rel_t <= 1'b0;
    else if (done)                   rel_t <= ~rel_t;
  end

  assign pix_rst = done;
  assign drive   = access & ~ack;

  logic [CW-1:0] pkt;
  assign pkt    = CW'(N_PACKETS - 1) - cnt;
  assign data_o = drive ? pix_data[pkt] : '0;
endmodule
