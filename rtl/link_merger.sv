// link_merger: merges the decoded hit streams of all links into one stream,
// one time slice at a time.
//
// Each link's hits are written into a FIFO of their own together with an
// end-of-slice marker. A round-robin arbiter forwards one hit per cycle from
// the links whose FIFO head is a hit, starting its search after the link
// served last. When a link's FIFO head is the end-of-slice marker, the marker
// is removed and the link is held: its later entries belong to the next slice.
// Once every link is held, slice_end pulses for one cycle; the links stay held
// until `release` (the downstream buffer has emptied the slice), so that the
// hits of two slices are never mixed.
//
// The merging of sources is what the trigger's first stage does; FIFOs,
// round-robin order and the per-slice hold are this design's own choices.
// A hit that arrives while its FIFO has one free entry or none is dropped
// and counted in `dropped` (saturating at 2**16-1); the last entry is
// kept for the end-of-slice marker so that a flood cannot stall the slice.
//
// Timing: out_valid/out_hit are registered; a hit written at cycle n can leave
// at cycle n+2 at the earliest.
module link_merger
  import l0_pkg::*;
#(
  parameter int unsigned NUM_LINKS  = 64,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic [NUM_LINKS-1:0] in_valid,
  input  raw_hit_t             in_hit [NUM_LINKS],
  input  logic [NUM_LINKS-1:0] in_eos,
  input  logic                 release_slice,
  output logic                 out_valid,
  output raw_hit_t             out_hit,
  output logic                 slice_end,
  output logic [15:0]          dropped
);
  localparam int unsigned LW = (NUM_LINKS > 1) ? $clog2(NUM_LINKS) : 1;
  localparam int unsigned EW = $bits(raw_hit_t) + 1;

  logic [EW-1:0]        head   [NUM_LINKS];
  logic [NUM_LINKS-1:0] empty, full, afull, pop, push, held, req, lost;
  logic [LW-1:0]        last, grant;
  logic                 any_req, ended;

  for (genvar i = 0; i < NUM_LINKS; i++) begin : g_link
    // The last free entry is kept for the end-of-slice marker: a hit is
    // written only while two or more entries are free, so that a slice can
    // always end. The decoder never gives a hit and a marker in one cycle.
    assign push[i] = in_eos[i] ? !full[i] : (in_valid[i] && !afull[i]);
    assign lost[i] = in_eos[i] ? full[i] : (in_valid[i] && afull[i]);
    sync_fifo #(.WIDTH(EW), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .reset,
      .push (push[i]),
      .din  ({in_eos[i], in_hit[i]}),
      .pop  (pop[i]),
      .dout (head[i]),
      .empty(empty[i]),
      .full (full[i]),
      .almost_full(afull[i])
    );
    assign req[i] = !empty[i] && !held[i] && !head[i][EW-1];
  end

  logic [LW:0] lost_count;
  always_comb begin
    lost_count = '0;
    for (int i = 0; i < NUM_LINKS; i++) lost_count += (LW+1)'(lost[i]);
  end

  function automatic logic [15:0] sat_add(logic [15:0] a, logic [LW:0] b);
    logic [16:0] sum;
    sum = {1'b0, a} + 17'(b);
    return sum[16] ? 16'hffff : sum[15:0];
  endfunction

  // Round robin: first requesting link after the one served last.
  always_comb begin
    grant   = last;
    any_req = 1'b0;
    for (int k = 1; k <= NUM_LINKS; k++) begin
      int unsigned idx;
      idx = (int'(last) + k) % NUM_LINKS;
      if (!any_req && req[idx]) begin
        grant   = LW'(idx);
        any_req = 1'b1;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NUM_LINKS; i++)
      pop[i] = !empty[i] && !held[i] && (head[i][EW-1] || (any_req && grant == LW'(i)));
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      held      <= '0;
      last      <= LW'(NUM_LINKS - 1);
      out_valid <= 1'b0;
      out_hit   <= '0;
      slice_end <= 1'b0;
      ended     <= 1'b0;
      dropped   <= '0;
    end else begin
      out_valid <= any_req;
      if (any_req) begin
        out_hit <= raw_hit_t'(head[grant][EW-2:0]);
        last    <= grant;
      end
      for (int i = 0; i < NUM_LINKS; i++)
        if (pop[i] && head[i][EW-1]) held[i] <= 1'b1;
      slice_end <= 1'b0;
      if (&held && !ended) begin
        slice_end <= 1'b1;
        ended     <= 1'b1;
      end
      if (release_slice && ended) begin
        held  <= '0;
        ended <= 1'b0;
      end
      dropped <= sat_add(dropped, lost_count);
    end
  end

endmodule
