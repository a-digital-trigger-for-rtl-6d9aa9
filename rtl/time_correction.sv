// time_correction: the two stages of timing correction.
//
// Coarse timing correction (CTC) shifts a hit by a whole number of images,
// one value per front-end; fine timing correction (FTC, the T0 correction)
// shifts its time by a signed number of TDC units, one value per detector
// channel. Both are applied to the 24-bit key {image, time}, so a fine
// correction that crosses an image boundary borrows from the image number:
//   key = {image, time} - (ctc[fe] << HT_W) - t0[det]
// (modulo 2**KEY_W). Both tables are loaded through configuration write ports.
// The split into a per-front-end image shift and a per-channel shift in TDC
// units follows the design's two correction stages; table widths, the signs
// (a positive value makes the hit earlier) and the load ports are this
// design's own choices.
//
// Timing: two cycles. Cycle 1 reads both tables (synchronous reads), cycle 2
// forms the corrected key. A hit at the input in cycle n leaves in cycle n+2.
module time_correction
  import l0_pkg::*;
#(
  parameter int unsigned CTC_W = IMG_W,   // coarse correction, in images
  parameter int unsigned T0_W  = 16       // fine correction, signed TDC units
) (
  input  logic                    clk,
  input  logic                    reset,
  input  logic                    ctc_we,
  input  logic [FE_W-1:0]         ctc_addr,
  input  logic [CTC_W-1:0]        ctc_data,
  input  logic                    t0_we,
  input  logic [DET_W-1:0]        t0_addr,
  input  logic signed [T0_W-1:0]  t0_data,
  input  logic                    in_valid,
  input  mapped_hit_t             in_hit,
  output logic                    out_valid,
  output hit_t                    out_hit
);
  logic [CTC_W-1:0]        ctc_tab [2**FE_W];
  logic signed [T0_W-1:0]  t0_tab  [2**DET_W];

  logic                    v1;
  mapped_hit_t             h1;
  logic [CTC_W-1:0]        ctc1;
  logic signed [T0_W-1:0]  t01;
  logic [KEY_W-1:0]        key;

  always_ff @(posedge clk) begin
    if (ctc_we) ctc_tab[ctc_addr] <= ctc_data;
    if (t0_we)  t0_tab[t0_addr]   <= t0_data;
  end

  // Stage 1: table lookups.
  always_ff @(posedge clk) begin
    h1   <= in_hit;
    ctc1 <= ctc_tab[in_hit.fe];
    t01  <= t0_tab[in_hit.det];
  end

  // Stage 2: corrected key.
  always_comb begin
    key = {h1.image, h1.time_}
        - (KEY_W'(ctc1) << HT_W)
        - KEY_W'(signed'(t01));
  end

  always_ff @(posedge clk) begin
    out_hit.key <= key;
    out_hit.det <= h1.det;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
    end
  end

endmodule
