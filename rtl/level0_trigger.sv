// level0_trigger: first stage of the digital trigger for a free-running,
// continuously read-out data acquisition.
//
// The front-ends send their data without any trigger, cut into time slices
// and, inside a slice, into images. This stage turns the parallel link streams
// of the trigger detectors into candidate events:
//
//   link words -> raw_decoder (one per link) -> link_merger
//              -> channel_map -> time_correction -> hit_buffer (sorting)
//              -> event_builder -> event records and tagged hits
//
// Decoding with channel mapping, timing corrections (coarse per front-end in
// images, fine per channel in TDC units), sorting and merging in time, and
// time-coincidence filtering are the stages of the document's design. The
// slice handshake that ties them together is this design's own: the merger
// holds every link at its end-of-slice word; when all links have ended the
// slice, a flush (delayed by the 3-cycle map and correction pipeline) drains
// the hit buffer, the event builder closes its open event, and the links are
// let go into the next slice.
//
// Interface: one 32-bit word per link per cycle with a valid bit; lookup
// tables are loaded through three configuration write ports; events come out
// as records (ev_*) and as hits tagged with their event (hit_*).
// Synchronous active-high reset.
module level0_trigger
  import l0_pkg::*;
#(
  parameter int unsigned NUM_LINKS  = 64,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned NUM_CELLS  = 128,
  parameter int unsigned NUM_IMAGES = 3,
  parameter int unsigned KEEP_GATE  = 25,
  parameter int unsigned T_CUT      = 25,
  parameter int unsigned MIN_HITS   = 2
) (
  input  logic                    clk,
  input  logic                    reset,
  // links
  input  logic [NUM_LINKS-1:0]    link_valid,
  input  logic [WORD_W-1:0]       link_data [NUM_LINKS],
  // configuration
  input  logic                    map_we,
  input  logic [FE_W+CH_W-1:0]    map_addr,
  input  logic [DET_W-1:0]        map_data,
  input  logic                    ctc_we,
  input  logic [FE_W-1:0]         ctc_addr,
  input  logic [IMG_W-1:0]        ctc_data,
  input  logic                    t0_we,
  input  logic [DET_W-1:0]        t0_addr,
  input  logic signed [15:0]      t0_data,
  // hits tagged with their event
  output logic                    hit_valid,
  output logic [15:0]             hit_event,
  output logic [KEY_W-1:0]        hit_rel_time,
  output logic [DET_W-1:0]        hit_det,
  output logic                    hit_keep,
  // event records
  output logic                    ev_valid,
  output logic [15:0]             ev_id,
  output logic [KEY_W-1:0]        ev_time,
  output logic [7:0]              ev_nhits,
  output logic                    ev_candidate,
  // status
  output logic [NUM_LINKS-1:0]    decode_error,
  output logic                    slice_done,
  output logic [15:0]             fifo_dropped,
  output logic [15:0]             early_releases
);
  raw_hit_t              dec_hit [NUM_LINKS];
  logic [NUM_LINKS-1:0]  dec_valid, dec_eos;

  for (genvar i = 0; i < NUM_LINKS; i++) begin : g_dec
    raw_decoder u_dec (
      .clk, .reset,
      .enable              (link_valid[i]),
      .data_in             (link_data[i]),
      .slice_number        (),
      .start_time_of_slice (),
      .start_time_of_image (),
      .src_id              (),
      .view_id             (),
      .frontend_id         (),
      .first_hit_in_group  (),
      .new_slice           (),
      .new_image           (),
      .new_data            (),
      .hit_valid           (dec_valid[i]),
      .hit                 (dec_hit[i]),
      .adata_valid         (),
      .adata               (),
      .crc_valid           (),
      .crc                 (),
      .end_of_slice        (dec_eos[i]),
      .error               (decode_error[i]),
      .fsm_state           ()
    );
  end

  logic        m_valid, slice_end, flush_done;
  raw_hit_t    m_hit;

  link_merger #(.NUM_LINKS(NUM_LINKS), .FIFO_DEPTH(FIFO_DEPTH)) u_merge (
    .clk, .reset,
    .in_valid      (dec_valid),
    .in_hit        (dec_hit),
    .in_eos        (dec_eos),
    .release_slice (flush_done),
    .out_valid     (m_valid),
    .out_hit       (m_hit),
    .slice_end,
    .dropped       (fifo_dropped)
  );

  logic        c_valid;
  mapped_hit_t c_hit;

  channel_map u_map (
    .clk, .reset,
    .cfg_we   (map_we),
    .cfg_addr (map_addr),
    .cfg_data (map_data),
    .in_valid (m_valid),
    .in_hit   (m_hit),
    .out_valid(c_valid),
    .out_hit  (c_hit)
  );

  logic        t_valid;
  hit_t        t_hit;

  time_correction u_tc (
    .clk, .reset,
    .ctc_we, .ctc_addr, .ctc_data,
    .t0_we, .t0_addr, .t0_data,
    .in_valid (c_valid),
    .in_hit   (c_hit),
    .out_valid(t_valid),
    .out_hit  (t_hit)
  );

  // End of slice follows the slice's last hit through map and correction.
  logic [2:0] eos_pipe;
  always_ff @(posedge clk) begin
    if (reset) eos_pipe <= '0;
    else       eos_pipe <= {eos_pipe[1:0], slice_end};
  end

  logic        s_valid, s_keep;
  hit_t        s_hit;

  hit_buffer #(.NUM_CELLS(NUM_CELLS), .KEEP_GATE(KEEP_GATE), .NUM_IMAGES(NUM_IMAGES)) u_hbuf (
    .clk, .reset,
    .in_valid      (t_valid),
    .in_hit        (t_hit),
    .flush         (eos_pipe[2]),
    .out_valid     (s_valid),
    .out_hit       (s_hit),
    .out_keep      (s_keep),
    .flush_done,
    .flushing      (),
    .early_releases,
    .cell_state    ()
  );

  event_builder #(.T_CUT(T_CUT), .MIN_HITS(MIN_HITS)) u_evb (
    .clk, .reset,
    .in_valid      (s_valid),
    .in_hit        (s_hit),
    .in_keep       (s_keep),
    .close         (flush_done),
    .out_hit_valid (hit_valid),
    .out_hit_event (hit_event),
    .out_hit_rel   (hit_rel_time),
    .out_hit_det   (hit_det),
    .out_hit_keep  (hit_keep),
    .ev_valid, .ev_id, .ev_time, .ev_nhits, .ev_candidate
  );

  assign slice_done = flush_done;

endmodule
