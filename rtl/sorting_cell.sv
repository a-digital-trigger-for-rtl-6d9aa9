// sorting_cell: one cell of the parallel insertion sorter.
//
// A chain of these cells keeps its elements in ascending order, smallest in
// the first cell, occupied cells forming a prefix of the chain. Every incoming
// element is offered to all cells at once and each cell decides locally, from
// its own content and the signals of the cell above it (the previous cell),
// by the sorter's rule set:
//   - an empty cell claims the incoming element if the cell above is occupied;
//   - an occupied cell claims the incoming element if it is smaller than the
//     stored one and the cell above does not kick out its element;
//   - if the cell above kicks out its element, this cell must take it,
//     whatever its own state;
//   - an occupied cell that accepts new data kicks out its current element.
// The first cell sees a permanently occupied cell above it (FIRST = 1).
// So a write takes one cycle whatever the number of stored elements.
//
// Parallel read: when `prev_cell_data_pulled` is high the cell's content
// moves one cell up and the cell takes what its lower neighbour holds after
// the write of the same cycle (next_cell_wdata/next_cell_wstate), so a read
// and a write can happen in the same cycle. The pulled signal ripples down
// the chain (cell_data_is_pulled), the read strobe entering at the first cell.
//
// keep_data marks an occupied cell whose key lies within KEEP_GATE of the key
// of an occupied neighbour, above or below. The key is the top KEY_W bits of
// the element; elements compare as whole words, so the key orders them.
//
// The ports are those of the sorter cell (clk, reset, enable, prev cell data,
// pushed, pulled and state, incoming data; cell data, pushed, pulled,
// keep_data, state); this design adds `write`, the lower neighbour's
// write-phase result for the parallel read, and its data and state for
// keep_data. `enable` low freezes the cell. Synchronous active-high reset
// empties the cell.
module sorting_cell #(
  parameter int unsigned N         = 40,    // element width
  parameter int unsigned KEY_W     = 24,    // key bits at the top of an element
  parameter int unsigned KEEP_GATE = 25,    // neighbour gate for keep_data
  parameter bit          FIRST     = 1'b0   // first cell of the chain
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         enable,
  input  logic         write,                  // cell_data_input is valid
  input  logic [N-1:0] cell_data_input,
  input  logic [N-1:0] prev_cell_data,
  input  logic         prev_cell_data_pushed,
  input  logic         prev_cell_data_pulled,
  input  logic         prev_cell_state,
  input  logic [N-1:0] next_cell_data,
  input  logic         next_cell_state,
  input  logic [N-1:0] next_cell_wdata,
  input  logic         next_cell_wstate,
  output logic [N-1:0] cell_data,
  output logic         cell_data_is_pushed,
  output logic         cell_data_is_pulled,
  output logic         keep_data,
  output logic         cell_state,
  output logic [N-1:0] cell_wdata,              // content after this cycle's write
  output logic         cell_wstate
);
  logic             above_full;
  logic [KEY_W-1:0] my_key, prev_key, next_key;

  assign above_full = FIRST ? 1'b1 : prev_cell_state;

  // Write phase.
  always_comb begin
    cell_wdata          = cell_data;
    cell_wstate         = cell_state;
    cell_data_is_pushed = 1'b0;
    if (enable && write) begin
      if (!FIRST && prev_cell_data_pushed) begin
        cell_wdata          = prev_cell_data;
        cell_wstate         = 1'b1;
        cell_data_is_pushed = cell_state;
      end else if (!cell_state) begin
        if (above_full) begin
          cell_wdata  = cell_data_input;
          cell_wstate = 1'b1;
        end
      end else if (cell_data_input < cell_data) begin
        cell_wdata          = cell_data_input;
        cell_data_is_pushed = 1'b1;
      end
    end
  end

  assign cell_data_is_pulled = enable && prev_cell_data_pulled;

  always_ff @(posedge clk) begin
    if (reset) begin
      cell_state <= 1'b0;
      cell_data  <= '0;
    end else if (enable) begin
      if (cell_data_is_pulled) begin
        cell_state <= next_cell_wstate;
        cell_data  <= next_cell_wdata;
      end else begin
        cell_state <= cell_wstate;
        cell_data  <= cell_wdata;
      end
    end
  end

  // Neighbour marking.
  assign my_key   = cell_data[N-1 -: KEY_W];
  assign prev_key = prev_cell_data[N-1 -: KEY_W];
  assign next_key = next_cell_data[N-1 -: KEY_W];

  always_comb begin
    keep_data = 1'b0;
    if (cell_state) begin
      if (!FIRST && prev_cell_state && (my_key - prev_key) <= KEY_W'(KEEP_GATE))
        keep_data = 1'b1;
      if (next_cell_state && (next_key - my_key) <= KEY_W'(KEEP_GATE))
        keep_data = 1'b1;
    end
  end

endmodule
