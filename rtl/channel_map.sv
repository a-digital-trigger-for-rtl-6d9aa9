// channel_map: maps a hit's (front-end id, channel id) to a detector channel.
//
// The mapping is a lookup table of 2**(FE_W+CH_W) entries addressed by
// {front-end id, channel id}; each entry is the DET_W-bit detector channel
// number that the later stages and the timing corrections use. The table is
// filled through the configuration write port (cfg_we/cfg_addr/cfg_data),
// e.g. by a slow-control bus; its contents are not defined after reset.
// The decoding stage has such a mapping store; its size, word width and load
// port are this design's own choices.
//
// Timing: one cycle. A hit at the input in cycle n leaves, with the looked-up
// detector channel, in cycle n+1 (synchronous table read). A configuration
// write is seen by lookups from the next cycle on.
module channel_map
  import l0_pkg::*;
(
  input  logic                  clk,
  input  logic                  reset,
  input  logic                  cfg_we,
  input  logic [FE_W+CH_W-1:0]  cfg_addr,
  input  logic [DET_W-1:0]      cfg_data,
  input  logic                  in_valid,
  input  raw_hit_t              in_hit,
  output logic                  out_valid,
  output mapped_hit_t           out_hit
);
  localparam int unsigned ENTRIES = 2 ** (FE_W + CH_W);

  logic [DET_W-1:0] table_q [ENTRIES];

  always_ff @(posedge clk) begin
    if (cfg_we) table_q[cfg_addr] <= cfg_data;
  end

  always_ff @(posedge clk) begin
    out_hit.image <= in_hit.image;
    out_hit.time_ <= in_hit.time_;
    out_hit.fe    <= in_hit.fe;
    out_hit.det   <= table_q[{in_hit.fe, in_hit.ch}];
  end

  always_ff @(posedge clk) begin
    if (reset) out_valid <= 1'b0;
    else       out_valid <= in_valid;
  end

endmodule
