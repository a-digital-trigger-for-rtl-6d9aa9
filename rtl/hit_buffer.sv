// hit_buffer: time-sorting hit buffer between the timing corrections and the
// event builder.
//
// Calibrated hits of all sources arrive in arbitrary order and are written
// into a sorting array, keyed by their corrected time {image, time}. The
// buffer spans three consecutive images: while hits of image k come in, the
// hits of image k-1 are held so that late hits of other sources can still be
// merged in, and the hits of image k-2 and earlier are read out in time order.
// Here "image k" is the highest image number written since the slice began;
// a hit is released once its image number is at most k-2 (in general
// k-(NUM_IMAGES-1)). The output is thus
// a hit-based, time-ordered stream instead of the slice/image structure.
//
// `flush` (end of a slice, all sources done) releases everything: the buffer
// reads out until empty, then pulses flush_done and starts the next slice
// from image 0. A write into a full buffer forces a read in the same cycle, so
// the earliest hit leaves early rather than a hit being lost; such forced
// reads are counted in early_releases.
//
// The window is NUM_IMAGES images wide; the default of three (one read out,
// one held, one coming in) follows the design's description of the hit
// buffer. A wider window lets sources lag further behind, which larger coarse
// corrections may need, at the cost of more cells. The release rule, the
// forced read and the flush are this design's own choices.
//
// Timing: one hit in and one hit out per cycle; out_* are registered (one
// cycle after the read decision).
module hit_buffer
  import l0_pkg::*;
#(
  parameter int unsigned NUM_CELLS  = 128,
  parameter int unsigned KEEP_GATE  = 25,
  parameter int unsigned NUM_IMAGES = 3    // images spanned by the buffer, at least 2
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         in_valid,
  input  hit_t         in_hit,
  input  logic         flush,
  output logic         out_valid,
  output hit_t         out_hit,
  output logic         out_keep,
  output logic         flush_done,
  output logic         flushing,
  output logic [15:0]  early_releases,
  output logic [NUM_CELLS-1:0] cell_state
);
  logic              read, full, empty, overflow, rd_valid, rd_keep;
  logic [HIT_W-1:0]  head, rd_data;
  logic [IMG_W-1:0]  cur_img, head_img, in_img;
  logic              release_due;

  assign head_img    = head[HIT_W-1 -: IMG_W];
  assign in_img      = in_hit.key[KEY_W-1 -: IMG_W];
  assign release_due = !empty && (32'(head_img) + NUM_IMAGES - 1 <= 32'(cur_img));
  assign read        = flushing ? !empty : (release_due || (full && in_valid));

  sorting_array #(
    .NUM_CELLS(NUM_CELLS), .N(HIT_W), .KEY_W(KEY_W), .KEEP_GATE(KEEP_GATE)
  ) u_array (
    .clk, .reset,
    .enable    (1'b1),
    .write     (in_valid),
    .wdata     (in_hit),
    .read,
    .rd_valid, .rd_data, .rd_keep,
    .head,
    .cell_state,
    .keep_data (),
    .full, .empty, .overflow
  );

  assign out_valid = rd_valid;
  assign out_hit   = hit_t'(rd_data);
  assign out_keep  = rd_keep;

  always_ff @(posedge clk) begin
    if (reset) begin
      cur_img        <= '0;
      flushing       <= 1'b0;
      flush_done     <= 1'b0;
      early_releases <= '0;
    end else begin
      flush_done <= 1'b0;
      if (in_valid && in_img > cur_img) cur_img <= in_img;
      if (flush) flushing <= 1'b1;
      if (flushing && empty && !in_valid) begin
        flushing   <= 1'b0;
        flush_done <= 1'b1;
        cur_img    <= '0;
      end
      if (!flushing && full && in_valid && !release_due && early_releases != '1)
        early_releases <= early_releases + 1'b1;
    end
  end

  // The forced read keeps the array from ever losing an element.
  always_ff @(posedge clk) begin
    if (!reset) assert (!overflow) else $error("hit_buffer: sorting array overflow");
  end

endmodule
