// raw_decoder: decodes the word stream of one link into hits.
//
// The link sends, per time slice, a two-word slice header (slice number,
// then start time of the slice), a sequence of images each opened by an image
// header, inside an image one or more groups (group header with source, view
// and front-end ids; hit words, each optionally followed by additional-data
// words; a group trailer), and an end-of-slice word. A finite state machine
// follows this structure word by word. Its states and the transitions it
// accepts are those of the decoder's state diagram: raw bit stream -> begin of
// slice (two words) -> begin of image -> begin of group (repeatable) -> data
// (repeatable) -> additional data (repeatable) -> end of group (repeatable),
// and from end of group on to another group, another image or end of slice;
// an empty slice may end right after either slice header word.
//
// Own choices: the word layout of l0_pkg, a synchronous active-high reset,
// `enable` as the word-valid strobe, fill words inside a slice being ignored,
// and any word the diagram does not allow in the current state raising
// `error` for one cycle and returning the machine to the raw-bit-stream state
// (it then waits for the next slice header). An error also pulses
// end_of_slice: the rest of that slice is lost on this link, and the merge
// stage downstream must not wait for it. The group check word is passed
// out, not verified: its code is not specified. first_hit_in_group holds the
// hit time of the first hit after the latest group header; the signal and
// its width are the original decoder's, this reading of it is an assumption.
//
// Timing: all outputs are registered; a hit word accepted in cycle n appears
// on hit_valid/hit in cycle n+1. One word per cycle, no back-pressure.
module raw_decoder
  import l0_pkg::*;
(
  input  logic                clk,
  input  logic                reset,
  input  logic                enable,          // data_in holds a word
  input  logic [WORD_W-1:0]   data_in,

  output logic [SLICE_W-1:0]  slice_number,
  output logic [STIME_W-1:0]  start_time_of_slice,
  output logic [STIME_W-1:0]  start_time_of_image,
  output logic [SRC_W-1:0]    src_id,
  output logic [VIEW_W-1:0]   view_id,
  output logic [FE_W-1:0]     frontend_id,
  output logic [HT_W-1:0]     first_hit_in_group, // hit time of the group's first hit

  output logic                new_slice,       // slice header complete
  output logic                new_image,       // image header accepted
  output logic                new_data,        // = hit_valid
  output logic                hit_valid,
  output raw_hit_t            hit,
  output logic                adata_valid,     // additional-data word
  output logic [28:0]         adata,
  output logic                crc_valid,       // group trailer seen
  output logic [CRC_W-1:0]    crc,
  output logic                end_of_slice,    // end-of-slice word seen
  output logic                error,           // word not allowed here
  output logic [3:0]          fsm_state
);

  typedef enum logic [3:0] {
    S_RAW, S_BOS1, S_BOS2, S_BOI, S_BOG, S_DATA, S_ADATA, S_EOG, S_EOS
  } state_e;

  state_e     state, next;
  word_type_e wtype;
  logic       bad;
  logic       take;      // word that moves the machine (fill words inside a slice do not)

  assign wtype     = word_type_e'(data_in[31:29]);
  assign fsm_state = state;
  assign take      = enable && (wtype != W_FILL || state inside {S_RAW, S_EOS});

  // Next state for an accepted word; `bad` marks a word the diagram forbids.
  always_comb begin
    next = state;
    bad  = 1'b0;
    if (take) begin
      unique case (state)
        S_RAW, S_EOS: next = (wtype == W_SLICE) ? S_BOS1 : S_RAW;
        S_BOS1: case (wtype)
                  W_SLICE: next = S_BOS2;
                  W_EOS:   next = S_EOS;
                  default: bad  = 1'b1;
                endcase
        S_BOS2: case (wtype)
                  W_IMAGE: next = S_BOI;
                  W_EOS:   next = S_EOS;
                  default: bad  = 1'b1;
                endcase
        S_BOI:  if (wtype == W_GROUP) next = S_BOG; else bad = 1'b1;
        S_BOG:  case (wtype)
                  W_GROUP: next = S_BOG;
                  W_DATA:  next = S_DATA;
                  default: bad  = 1'b1;
                endcase
        S_DATA: case (wtype)
                  W_DATA:  next = S_DATA;
                  W_ADATA: next = S_ADATA;
                  W_GTRL:  next = S_EOG;
                  default: bad  = 1'b1;
                endcase
        S_ADATA: case (wtype)
                  W_ADATA: next = S_ADATA;
                  W_GTRL:  next = S_EOG;
                  default: bad  = 1'b1;
                endcase
        S_EOG:  case (wtype)
                  W_GTRL:  next = S_EOG;
                  W_GROUP: next = S_BOG;
                  W_IMAGE: next = S_BOI;
                  W_EOS:   next = S_EOS;
                  default: bad  = 1'b1;
                endcase
        default: bad = 1'b1;
      endcase
      if (bad) next = S_RAW;
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state               <= S_RAW;
      slice_number        <= '0;
      start_time_of_slice <= '0;
      start_time_of_image <= '0;
      src_id              <= '0;
      view_id             <= '0;
      frontend_id         <= '0;
      first_hit_in_group  <= '0;
      new_slice           <= 1'b0;
      new_image           <= 1'b0;
      hit_valid           <= 1'b0;
      hit                 <= '0;
      adata_valid         <= 1'b0;
      adata               <= '0;
      crc_valid           <= 1'b0;
      crc                 <= '0;
      end_of_slice        <= 1'b0;
      error               <= 1'b0;
    end else begin
      new_slice    <= 1'b0;
      new_image    <= 1'b0;
      hit_valid    <= 1'b0;
      adata_valid  <= 1'b0;
      crc_valid    <= 1'b0;
      end_of_slice <= 1'b0;
      error        <= 1'b0;
      if (take) begin
        state        <= next;
        error        <= bad;
        // A broken slice is closed at once, so that merging does not wait
        // for an end-of-slice word that will not be recognised.
        end_of_slice <= bad;
        if (!bad) begin
          unique case (next)
            S_BOS1:  slice_number <= data_in[SLICE_W-1:0];
            S_BOS2: begin
              start_time_of_slice <= data_in[STIME_W-1:0];
              new_slice           <= 1'b1;
            end
            S_BOI: begin
              start_time_of_image <= data_in[STIME_W-1:0];
              new_image           <= 1'b1;
            end
            S_BOG: begin
              src_id      <= data_in[22:13];
              view_id     <= data_in[12:8];
              frontend_id <= data_in[7:0];
            end
            S_DATA: begin
              hit_valid   <= 1'b1;
              hit.image   <= start_time_of_image[IMG_W-1:0];
              hit.time_   <= data_in[HT_W-1:0];
              hit.fe      <= frontend_id;
              hit.ch      <= data_in[HT_W +: CH_W];
              if (state == S_BOG) first_hit_in_group <= data_in[HT_W-1:0];
            end
            S_ADATA: begin
              adata_valid <= 1'b1;
              adata       <= data_in[28:0];
            end
            S_EOG: begin
              crc_valid <= 1'b1;
              crc       <= data_in[CRC_W-1:0];
            end
            S_EOS:   end_of_slice <= 1'b1;
            default: ;
          endcase
        end
      end
    end
  end

  assign new_data = hit_valid;

endmodule
