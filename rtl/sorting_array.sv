// sorting_array: parallel insertion sorter built from a chain of sorting cells.
//
// NUM_CELLS cells of N bits hold the stored elements in ascending order, the
// smallest in cell 0. A write (`write` with wdata) inserts an element in one
// cycle, every cell deciding in parallel by the cell rule set; a read (`read`)
// removes the smallest element in the same cycle, all cells moving one place
// up. Read and write may be given together: the element inserted in that cycle
// takes part, so the read returns the smaller of wdata and the stored minimum.
// So one element per cycle can go in and one come out, O(N) in time for N
// elements, paid for with N comparators.
//
// Read data is registered: rd_valid/rd_data/rd_keep appear in the cycle after
// the read. rd_keep marks an element whose key (top KEY_W bits) is within
// KEEP_GATE of its neighbour in sorted order: the next stored element or the
// element read before it (in either direction, since a late write can make
// a read smaller than the one before). cell_state shows which cells are occupied. Writing
// into a full array without a read loses the largest element and pulses
// `overflow`. Reading an empty array returns nothing (rd_valid stays low).
module sorting_array #(
  parameter int unsigned NUM_CELLS = 128,
  parameter int unsigned N         = 40,
  parameter int unsigned KEY_W     = 24,
  parameter int unsigned KEEP_GATE = 25
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 enable,
  input  logic                 write,
  input  logic [N-1:0]         wdata,
  input  logic                 read,
  output logic                 rd_valid,
  output logic [N-1:0]         rd_data,
  output logic                 rd_keep,
  output logic [N-1:0]         head,        // smallest stored element
  output logic [NUM_CELLS-1:0] cell_state,
  output logic [NUM_CELLS-1:0] keep_data,
  output logic                 full,
  output logic                 empty,
  output logic                 overflow
);
  logic [N-1:0]         data   [NUM_CELLS+1];
  logic [N-1:0]         wd     [NUM_CELLS+1];
  logic [NUM_CELLS:0]   st, wst, pushed, pulled;
  logic [KEY_W-1:0]     last_key;
  logic                 last_valid;
  logic [KEY_W-1:0]     k0, k1;

  // Below the last cell: an always-empty place that follows the empty-cell
  // rules for one cycle. It catches the element the last cell kicks out, or
  // the incoming element when it is larger than everything in a full array,
  // so that a read in the same cycle pulls it back into the last cell.
  assign data[NUM_CELLS] = '0;
  assign st[NUM_CELLS]   = 1'b0;
  assign wd[NUM_CELLS]   = pushed[NUM_CELLS-1] ? data[NUM_CELLS-1] : wdata;
  assign wst[NUM_CELLS]  = enable && write && st[NUM_CELLS-1];

  for (genvar i = 0; i < NUM_CELLS; i++) begin : g_cell
    sorting_cell #(
      .N(N), .KEY_W(KEY_W), .KEEP_GATE(KEEP_GATE), .FIRST(i == 0)
    ) u_cell (
      .clk, .reset, .enable, .write,
      .cell_data_input       (wdata),
      .prev_cell_data        ((i == 0) ? '0 : data[(i == 0) ? 0 : i-1]),
      .prev_cell_data_pushed ((i == 0) ? 1'b0 : pushed[(i == 0) ? 0 : i-1]),
      .prev_cell_data_pulled ((i == 0) ? read : pulled[(i == 0) ? 0 : i-1]),
      .prev_cell_state       ((i == 0) ? 1'b1 : st[(i == 0) ? 0 : i-1]),
      .next_cell_data        (data[i+1]),
      .next_cell_state       (st[i+1]),
      .next_cell_wdata       (wd[i+1]),
      .next_cell_wstate      (wst[i+1]),
      .cell_data             (data[i]),
      .cell_data_is_pushed   (pushed[i]),
      .cell_data_is_pulled   (pulled[i]),
      .keep_data             (keep_data[i]),
      .cell_state            (st[i]),
      .cell_wdata            (wd[i]),
      .cell_wstate           (wst[i])
    );
  end

  assign pushed[NUM_CELLS] = 1'b0;
  assign pulled[NUM_CELLS] = 1'b0;
  assign cell_state = st[NUM_CELLS-1:0];
  assign head       = data[0];
  assign full       = st[NUM_CELLS-1];
  assign empty      = !st[0];

  function automatic logic [KEY_W-1:0] key_dist(logic [KEY_W-1:0] a, logic [KEY_W-1:0] b);
    return (a >= b) ? a - b : b - a;
  endfunction

  // Keys of the leaving element and of the one that follows it.
  assign k0 = wd[0][N-1 -: KEY_W];
  assign k1 = wd[1][N-1 -: KEY_W];

  always_ff @(posedge clk) begin
    if (reset) begin
      rd_valid   <= 1'b0;
      rd_data    <= '0;
      rd_keep    <= 1'b0;
      overflow   <= 1'b0;
      last_valid <= 1'b0;
      last_key   <= '0;
    end else begin
      rd_valid <= 1'b0;
      overflow <= enable && write && st[NUM_CELLS-1] && !read;
      if (enable && read && wst[0]) begin
        rd_valid   <= 1'b1;
        rd_data    <= wd[0];
        rd_keep    <= (wst[1] && (k1 - k0) <= KEY_W'(KEEP_GATE))
                   || (last_valid && key_dist(k0, last_key) <= KEY_W'(KEEP_GATE));
        last_valid <= 1'b1;
        last_key   <= k0;
      end
    end
  end

endmodule
