// event_builder: groups the time-ordered hit stream into events by a time gate.
//
// The first hit of an event opens it and sets the event time T_first. Every
// following hit with time T is tested against the gate
//     T > T_first  &&  T < T_first + T_CUT
// and joins the event when it passes; a hit that fails opens a new event and
// becomes its first hit. When an event is closed (by the next event's first
// hit, or by `close` at the end of a slice) its record goes out: event number,
// event time, number of hits and whether it is a coincidence candidate, i.e.
// has at least MIN_HITS hits. Each hit leaves, one cycle after it came in,
// with its event number and its time relative to the event's first hit.
//
// The gate condition and T_CUT = 25 are the document's; the hit and event
// record formats, MIN_HITS and the close input are this design's own choices.
// Event numbers count from 0 after reset and wrap.
//
// Timing: one hit per cycle, no stall. out_hit_* and ev_* are registered; an
// event record appears in the same cycle as the first hit of the next event.
module event_builder
  import l0_pkg::*;
#(
  parameter int unsigned T_CUT    = 25,
  parameter int unsigned MIN_HITS = 2,
  parameter int unsigned EVID_W   = 16,
  parameter int unsigned NH_W     = 8
) (
  input  logic               clk,
  input  logic               reset,
  input  logic               in_valid,
  input  hit_t               in_hit,
  input  logic               in_keep,
  input  logic               close,
  output logic               out_hit_valid,
  output logic [EVID_W-1:0]  out_hit_event,
  output logic [KEY_W-1:0]   out_hit_rel,
  output logic [DET_W-1:0]   out_hit_det,
  output logic               out_hit_keep,
  output logic               ev_valid,
  output logic [EVID_W-1:0]  ev_id,
  output logic [KEY_W-1:0]   ev_time,
  output logic [NH_W-1:0]    ev_nhits,
  output logic               ev_candidate
);
  logic              open_q;
  logic [KEY_W-1:0]  t_first;
  logic [NH_W-1:0]   nhits;
  logic [EVID_W-1:0] evid;
  logic              in_gate;

  always_comb begin
    in_gate = open_q
           && (in_hit.key > t_first)
           && ({1'b0, in_hit.key} < {1'b0, t_first} + (KEY_W+1)'(T_CUT));
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      open_q        <= 1'b0;
      t_first       <= '0;
      nhits         <= '0;
      evid          <= '0;
      out_hit_valid <= 1'b0;
      out_hit_event <= '0;
      out_hit_rel   <= '0;
      out_hit_det   <= '0;
      out_hit_keep  <= 1'b0;
      ev_valid      <= 1'b0;
      ev_id         <= '0;
      ev_time       <= '0;
      ev_nhits      <= '0;
      ev_candidate  <= 1'b0;
    end else begin
      out_hit_valid <= 1'b0;
      ev_valid      <= 1'b0;
      // An open event ends when a hit outside its gate arrives, or on close.
      if (open_q && ((in_valid && !in_gate) || close)) begin
        ev_valid     <= 1'b1;
        ev_id        <= evid;
        ev_time      <= t_first;
        ev_nhits     <= nhits;
        ev_candidate <= (32'(nhits) >= 32'(MIN_HITS));
        evid         <= evid + 1'b1;
        open_q       <= 1'b0;
      end
      if (in_valid) begin
        out_hit_valid <= 1'b1;
        out_hit_det   <= in_hit.det;
        out_hit_keep  <= in_keep;
        if (in_gate && !close) begin
          out_hit_event <= evid;
          out_hit_rel   <= in_hit.key - t_first;
          if (nhits != '1) nhits <= nhits + 1'b1;
        end else begin
          // First hit of a new event.
          out_hit_event <= (open_q) ? evid + 1'b1 : evid;
          out_hit_rel   <= '0;
          t_first       <= in_hit.key;
          nhits         <= NH_W'(1);
          open_q        <= 1'b1;
        end
      end
    end
  end

endmodule
